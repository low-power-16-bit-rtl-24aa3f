// Self-checking testbench for the register file: random writes on both
// ports (including same-register collisions, where port B must win) are
// mirrored in a reference array; both read ports are compared with it after
// every clock. Also checks that reset clears all registers.
module tb_register_file;
  logic        clk = 1'b0, rst;
  logic [1:0]  ra_addr, rb_addr, wa_addr, wb_addr;
  logic [15:0] ra_data, rb_data, wa_data, wb_data;
  logic        wa_en, wb_en;
  logic [15:0] ref_regs [4];
  int checks = 0, failures = 0;

  register_file dut (.clk(clk), .rst(rst), .ra_addr(ra_addr), .rb_addr(rb_addr),
    .ra_data(ra_data), .rb_data(rb_data), .wa_en(wa_en), .wa_addr(wa_addr), .wa_data(wa_data),
    .wb_en(wb_en), .wb_addr(wb_addr), .wb_data(wb_data));

  always #5 clk = ~clk;

  task automatic check_reads();
    for (int r = 0; r < 4; r++) begin
      ra_addr = 2'(r); rb_addr = 2'(3 - r);
      #1;
      checks += 2;
      if (ra_data !== ref_regs[r])     begin failures++; $display("FAIL A r%0d", r); end
      if (rb_data !== ref_regs[3 - r]) begin failures++; $display("FAIL B r%0d", 3 - r); end
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
    rst = 1'b1; wa_en = 0; wb_en = 0; wa_addr = 0; wb_addr = 0; wa_data = 0; wb_data = 0;
    ra_addr = 0; rb_addr = 0;
    for (int r = 0; r < 4; r++) ref_regs[r] = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    check_reads();
    for (int i = 0; i < 2000; i++) begin
      wa_en = 1'($urandom); wb_en = 1'($urandom);
      wa_addr = 2'($urandom); wb_addr = (i % 8 == 0) ? wa_addr : 2'($urandom);
      wa_data = 16'($urandom); wb_data = 16'($urandom);
      @(posedge clk); #1;
      if (wa_en) ref_regs[wa_addr] = wa_data;
      if (wb_en) ref_regs[wb_addr] = wb_data;
      wa_en = 0; wb_en = 0;
      check_reads();
    end
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int r = 0; r < 4; r++) ref_regs[r] = '0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
