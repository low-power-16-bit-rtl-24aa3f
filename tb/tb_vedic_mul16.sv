// Self-checking testbench for vedic_mul16: compares the product with the
// integer product a * b over corner cases, the worked example 252 x 846 = 213192 and 30000 random pairs.
module tb_vedic_mul16;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;

  vedic_mul16 dut (.a(a), .b(b), .p(p));

  task automatic check();
    logic [31:0] exp;
    #1;
    exp = 32'(a) * 32'(b);
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
    a = 16'd252; b = 16'd846; check();
    if (p !== 32'd213192) failures++;
    checks++;
    a = '1; b = '1; check();
    a = '1; b = 16'd1; check();
    a = 16'h8000; b = 16'h8000; check();
    a = 16'h00FF; b = 16'hFF00; check();
    for (int i = 0; i < 30000; i++) begin
      a = 16'($urandom); b = 16'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
