// Self-checking testbench for the program counter: random inc/load
// sequences against a reference counter (load before increment, wrap at 16),
// plus reset to zero.
module tb_program_counter;
  logic       clk = 1'b0, rst, inc, load;
  logic [3:0] din, pc, exp;
  int checks = 0, failures = 0;

  program_counter dut (.clk(clk), .rst(rst), .inc(inc), .load(load), .din(din), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; inc = 0; load = 0; din = 0;
    @(posedge clk); #1;
    rst = 1'b0; exp = '0;
    checks++; if (pc !== 4'd0) failures++;
    // count through a full wrap
    inc = 1'b1;
    for (int i = 1; i <= 17; i++) begin
      @(posedge clk); #1;
      checks++;
      if (pc !== 4'(i)) begin failures++; $display("FAIL count %0d got %0d", i, pc); end
    end
    exp = pc;
    for (int i = 0; i < 2000; i++) begin
      inc = 1'($urandom); load = 1'($urandom); din = 4'($urandom);
      @(posedge clk); #1;
      if (load) exp = din; else if (inc) exp = exp + 1'b1;
      checks++;
      if (pc !== exp) begin failures++; $display("FAIL inc=%0d load=%0d got %0d exp %0d", inc, load, pc, exp); end
    end
    rst = 1'b1;
    @(posedge clk); #1;
    checks++; if (pc !== 4'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
