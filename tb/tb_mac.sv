// Self-checking testbench for the Vedic MAC: checks that z holds a*b
// (zero-extended to 33 bits) exactly one clock after an enabled edge, that
// it holds while en is low, and that reset clears it. Includes the worked
// example 252 x 846 = 213192.
module tb_mac;
  logic        clk = 1'b0, rst, en;
  logic [15:0] a, b;
  logic [32:0] z, exp;
  int checks = 0, failures = 0;

  mac dut (.clk(clk), .rst(rst), .en(en), .a(a), .b(b), .z(z));

  always #5 clk = ~clk;

  task automatic expect_z(logic [32:0] e, string what);
    checks++;
    if (z !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s: z=%0d exp %0d", what, z, e);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0; a = '0; b = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    expect_z('0, "after reset");
    // worked example, one-cycle latency
    a = 16'd252; b = 16'd846; en = 1'b1;
    #1 expect_z('0, "before edge");
    @(posedge clk); #1;
    expect_z(33'd213192, "252*846");
    // hold while en is low
    en = 1'b0; a = 16'd3; b = 16'd5;
    @(posedge clk); #1;
    expect_z(33'd213192, "hold");
    for (int i = 0; i < 3000; i++) begin
      a = 16'($urandom); b = 16'($urandom); en = 1'b1;
      exp = {1'b0, 32'(a) * 32'(b)};
      @(posedge clk); #1;
      expect_z(exp, "random");
    end
    rst = 1'b1;
    @(posedge clk); #1;
    expect_z('0, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
