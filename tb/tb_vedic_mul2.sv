// Self-checking testbench for vedic_mul2: compares the product with the
// integer product a * b over every input pair.
module tb_vedic_mul2;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  vedic_mul2 dut (.a(a), .b(b), .p(p));

  task automatic check();
    logic [3:0] exp;
    #1;
    exp = 4'(a) * 4'(b);
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
    for (int i = 0; i < 2**2; i++)
      for (int j = 0; j < 2**2; j++) begin
        a = 2'(i); b = 2'(j);
        check();
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
