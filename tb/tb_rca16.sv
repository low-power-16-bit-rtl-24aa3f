// Self-checking testbench for rca16: compares {cout, s} with the integer sum
// a + b + cin over corner cases and 20000 random inputs.
module tb_rca16;
  logic [15:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  rca16 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic check();
    logic [16:0] exp;
    #1;
    exp = {1'b0, a} + {1'b0, b} + 16'(cin);
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
    a = '1; b = '1; cin = 1'b1; check();
    a = '1; b = '0; cin = 1'b1; check();
    a = 16'h00FF; b = 16'h0001; cin = 1'b0; check();
    for (int i = 0; i < 20000; i++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
