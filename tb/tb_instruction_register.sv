// Self-checking testbench for instruction_register: random load/hold sequences against a
// reference register, plus reset to zero.
module tb_instruction_register;
  logic       clk = 1'b0, rst, load;
  logic [7:0] din, ir, exp;
  int checks = 0, failures = 0;

  instruction_register dut (.clk(clk), .rst(rst), .load(load), .din(din), .ir(ir));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load = 1'b1; din = '1;
    @(posedge clk); #1;
    rst = 1'b0; exp = '0;
    checks++; if (ir !== exp) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 2000; i++) begin
      load = 1'($urandom); din = 8'($urandom);
      @(posedge clk); #1;
      if (load) exp = din;
      checks++;
      if (ir !== exp) begin failures++; $display("FAIL load=%0d got %h exp %h", load, ir, exp); end
    end
    rst = 1'b1;
    @(posedge clk); #1;
    checks++; if (ir !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
