// Self-checking testbench for rca8: compares {cout, s} with the integer sum
// a + b + cin over every input combination.
module tb_rca8;
  logic [7:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  rca8 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic check();
    logic [8:0] exp;
    #1;
    exp = {1'b0, a} + {1'b0, b} + 8'(cin);
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
    for (int i = 0; i < 2**8; i++)
      for (int j = 0; j < 2**8; j++)
        for (int c = 0; c < 2; c++) begin
          a = 8'(i); b = 8'(j); cin = c[0];
          check();
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
