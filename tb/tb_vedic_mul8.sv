// Self-checking testbench for vedic_mul8: compares the product with the
// integer product a * b over every input pair.
module tb_vedic_mul8;
  logic [7:0] a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  vedic_mul8 dut (.a(a), .b(b), .p(p));

  task automatic check();
    logic [15:0] exp;
    #1;
    exp = 16'(a) * 16'(b);
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d: got %0d exp %0d", a, b, p, exp);
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
      for (int j = 0; j < 2**8; j++) begin
        a = 8'(i); b = 8'(j);
        check();
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
