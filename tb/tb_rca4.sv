// Self-checking testbench for rca4: compares {cout, s} with the integer sum
// a + b + cin over every input combination.
module tb_rca4;
  logic [3:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  rca4 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic check();
    logic [4:0] exp;
    #1;
    exp = {1'b0, a} + {1'b0, b} + 4'(cin);
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d cin=%0d got %0d exp %0d", a, b, cin, {cout, s}, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**4; i++)
      for (int j = 0; j < 2**4; j++)
        for (int c = 0; c < 2; c++) begin
          a = 4'(i); b = 4'(j); cin = c[0];
          check();
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
