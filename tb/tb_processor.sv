// Self-checking testbench for the processor on its own. The testbench
// plays the memory: a 16-word array answers the address bus combinationally
// and takes writes on mem_we. An instruction-level reference model of the
// instruction set, written here independently of the RTL, runs the same
// program; after every instruction the PC, Z flag, ALU result and cycle
// count are compared through the debug port, and every memory write (STA)
// is compared with the model's store, address and data. Programs: the
// worked example 252 x 846 and NUM_RANDOM random 16-word programs.
module tb_processor;
  import risc_pkg::*;

  localparam int NUM_RANDOM = 100;
  localparam int STEPS      = 60;   // instructions per program

  logic        clk = 1'b0, rst, mem_we;
  logic [3:0]  mem_addr;
  logic [15:0] mem_rdata, mem_wdata;
  logic [15:0] tb_mem [16];
  dbg_t        dbg;
  int checks = 0, failures = 0;
  logic [31:0] m_res;
  logic        m_alu;
  logic        m_st;
  logic [3:0]  m_st_addr;
  int          writes_seen;

  processor dut (.clk(clk), .rst(rst), .mem_addr(mem_addr), .mem_rdata(mem_rdata),
                 .mem_we(mem_we), .mem_wdata(mem_wdata), .dbg(dbg));

  assign mem_rdata = tb_mem[mem_addr];
  always @(posedge clk) begin
    if (mem_we && !rst) begin
      writes_seen++;
      checks += 2;
      if (!m_st || mem_addr !== m_st_addr) begin
        failures++; $display("FAIL unexpected store to %0d", mem_addr);
      end
      if (mem_wdata !== m_mem[m_st_addr]) begin
        failures++; $display("FAIL store data %h exp %h", mem_wdata, m_mem[m_st_addr]);
      end
      tb_mem[mem_addr] <= mem_wdata;
    end
  end

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  logic [15:0] m_mem [16];
  logic [15:0] m_reg [4];
  logic [3:0]  m_pc;
  logic        m_z;
  int          m_cycles;
  int          seen [string];

  function automatic void note(string what);
    if (seen.exists(what)) seen[what]++; else seen[what] = 1;
  endfunction

  function automatic void model_step();
    logic [7:0]  ins;
    logic [3:0]  opc, ad;
    logic [1:0]  rd, rs;
    logic [15:0] a, b;
    logic [31:0] res;
    ins = m_mem[m_pc][7:0];
    m_pc = m_pc + 1'b1;
    opc = ins[7:4]; rd = ins[3:2]; rs = ins[1:0]; ad = ins[3:0];
    a = m_reg[rd]; b = m_reg[rs];
    m_cycles = 2;
    m_alu = 1'b0; m_st = 1'b0;
    if (opc <= 4'd9) begin
      m_cycles = 4;
      case (opc)
        4'd0: res = 32'(a) + 32'(b);
        4'd1: res = 32'(16'(a - b));
        4'd2: res = 32'(a) * 32'(b);
        4'd3: res = (b == 0) ? {a, 16'hFFFF} : {16'(a % b), 16'(a / b)};
        4'd4: res = 32'(a & b);
        4'd5: res = 32'(a | b);
        4'd6: res = 32'(a ^ b);
        4'd7: res = 32'(16'(~b));
        4'd8: res = 32'(16'(a << b[3:0]));
        default: res = 32'(16'(a >> b[3:0]));
      endcase
      if (opc == 4'd0 && res[16]) note("add carry out");
      if (opc == 4'd3 && b == 0) note("divide by zero");
      if (opc == 4'd2 && res[31:16] != 0) note("multiply upper half non-zero");
      m_z = (res == 0);
      m_res = res; m_alu = 1'b1;
      if (m_z) note("Z flag set");
      m_reg[rd] = res[15:0];
      if (opc == 4'd2 || opc == 4'd3) m_reg[rs] = res[31:16];
    end else if (opc == 4'hA) begin
      m_cycles = 3; m_reg[0] = m_mem[ad];
    end else if (opc == 4'hB) begin
      m_cycles = 3; m_mem[ad] = m_reg[0]; m_st = 1'b1; m_st_addr = ad;
    end else if (opc == 4'hC) begin
      m_pc = ad;
    end else if (opc == 4'hD) begin
      if (m_z) begin m_pc = ad; note("JZ taken"); end
      else note("JZ not taken");
    end
    if (opc <= 4'hD) note($sformatf("opcode %0d", opc));
  endfunction

  // ---------------- DUT helpers ----------------
  task automatic load_and_reset(logic [15:0] prog [16]);
    rst = 1'b1;
    for (int i = 0; i < 16; i++) begin
      tb_mem[i] = prog[i];
      m_mem[i] = prog[i];
    end
    @(posedge clk); #1;
    rst = 1'b0;
    for (int r = 0; r < 4; r++) m_reg[r] = '0;
    m_pc = '0; m_z = 1'b0;
  endtask

  task automatic compare_state(string tag);
    checks++;
    if (dbg.pc !== m_pc) begin failures++; $display("FAIL %s pc=%0d exp %0d", tag, dbg.pc, m_pc); end
    checks++;
    if (dbg.zero !== m_z) begin failures++; $display("FAIL %s Z=%0d exp %0d", tag, dbg.zero, m_z); end
    if (m_alu) begin
      checks++;
      if (dbg.alu_result !== m_res) begin
        failures++; $display("FAIL %s ALU result %h exp %h", tag, dbg.alu_result, m_res);
      end
    end
  endtask

  task automatic run_program(logic [15:0] prog [16], int steps, string tag);
    load_and_reset(prog);
    for (int s = 0; s < steps; s++) begin
      int cyc = 0;
      model_step();
      // one instruction: leave FETCH, run until back in FETCH
      do begin
        @(posedge clk); #1;
        cyc++;
      end while (dbg.state != S_FETCH && cyc < 20);
      checks++;
      if (cyc != m_cycles) begin
        failures++;
        $display("FAIL %s step %0d took %0d cycles, expected %0d", tag, s, cyc, m_cycles);
      end
      compare_state($sformatf("%s step %0d", tag, s));
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (tb_mem[i] !== m_mem[i]) begin
        failures++;
        $display("FAIL %s M[%0d]=%h exp %h", tag, i, tb_mem[i], m_mem[i]);
      end
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] prog [16];
    rst = 1'b1; writes_seen = 0;
    @(posedge clk); #1;

    // 1. 252 x 846 = 213192 = 32'h0003_40C8
    prog = '{16'h00AE,   // 0: LDA 14      R0 = 846
             16'h0065,   // 1: XOR R1,R1   R1 = 0
             16'h0054,   // 2: OR  R1,R0   R1 = 846
             16'h00AD,   // 3: LDA 13      R0 = 252
             16'h0021,   // 4: MUL R0,R1   R0 = low, R1 = high
             16'h00BF,   // 5: STA 15      M[15] = low
             16'h0060,   // 6: XOR R0,R0
             16'h0051,   // 7: OR  R0,R1   R0 = high (Z clear)
             16'h00BC,   // 8: STA 12      M[12] = high
             16'h00D0,   // 9: JZ 0        not taken
             16'h00CA,   // 10: JMP 10     stop
             16'h0000, 16'h0000,
             16'd252,    // 13
             16'd846,    // 14
             16'h0000};
    run_program(prog, 14, "mul-example");
    checks += 2;
    if (tb_mem[15] !== 16'h40C8) begin failures++; $display("FAIL product low %h", tb_mem[15]); end
    if (tb_mem[12] !== 16'h0003) begin failures++; $display("FAIL product high %h", tb_mem[12]); end

    // 3. random programs
    for (int t = 0; t < NUM_RANDOM; t++) begin
      for (int i = 0; i < 16; i++) prog[i] = 16'($urandom);
      // give a quarter of the programs extra ALU density
      if (t % 4 == 0) for (int i = 0; i < 8; i++) prog[i][7:4] = 4'($urandom_range(0, 9));
      run_program(prog, STEPS, $sformatf("random %0d", t));
    end

    // every mechanism must have occurred
    begin
      string need [$] = '{"add carry out", "divide by zero", "multiply upper half non-zero",
                          "Z flag set", "JZ taken", "JZ not taken"};
      for (int o = 0; o < 14; o++) need.push_back($sformatf("opcode %0d", o));
      foreach (need[i]) begin
        checks++;
        if (!seen.exists(need[i])) begin
          failures++;
          $display("FAIL mechanism never exercised: %s", need[i]);
        end else $display("  %-30s %0d times", need[i], seen[need[i]]);
      end
    end
    checks++;
    if (writes_seen == 0) begin failures++; $display("FAIL no store seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
