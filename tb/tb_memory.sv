// Self-checking testbench for the unified memory: fills every word through
// the load port, reads it back combinationally, then mixes random bus writes
// and reads against a reference array (load port has priority over we).
module tb_memory;
  logic        clk = 1'b0, we, ld_en;
  logic [3:0]  addr, ld_addr;
  logic [15:0] wdata, rdata, ld_data;
  logic [15:0] ref_mem [16];
  int checks = 0, failures = 0;

  memory dut (.clk(clk), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata),
              .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data));

  always #5 clk = ~clk;

  task automatic check_all();
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i); #1;
      checks++;
      if (rdata !== ref_mem[i]) begin failures++; $display("FAIL word %0d got %h exp %h", i, rdata, ref_mem[i]); end
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
    we = 0; ld_en = 0; addr = 0; ld_addr = 0; wdata = 0; ld_data = 0;
    for (int i = 0; i < 16; i++) begin
      ld_en = 1; ld_addr = 4'(i); ld_data = 16'($urandom);
      ref_mem[i] = ld_data;
      @(posedge clk); #1;
    end
    ld_en = 0;
    check_all();
    for (int i = 0; i < 500; i++) begin
      we = 1'($urandom); ld_en = (i % 5 == 0);
      addr = 4'($urandom); wdata = 16'($urandom);
      ld_addr = 4'($urandom); ld_data = 16'($urandom);
      @(posedge clk); #1;
      if (ld_en) ref_mem[ld_addr] = ld_data; else if (we) ref_mem[addr] = wdata;
      we = 0; ld_en = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
