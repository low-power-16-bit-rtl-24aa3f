// Self-checking testbench for memory_address_register: random load/hold sequences against a
// reference register, plus reset to zero.
module tb_memory_address_register;
  logic       clk = 1'b0, rst, load;
  logic [3:0] din, mar, exp;
  int checks = 0, failures = 0;

  memory_address_register dut (.clk(clk), .rst(rst), .load(load), .din(din), .mar(mar));

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
    checks++; if (mar !== exp) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 2000; i++) begin
      load = 1'($urandom); din = 4'($urandom);
      @(posedge clk); #1;
      if (load) exp = din;
      checks++;
      if (mar !== exp) begin failures++; $display("FAIL load=%0d got %h exp %h", load, mar, exp); end
    end
    rst = 1'b1;
    @(posedge clk); #1;
    checks++; if (mar !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
