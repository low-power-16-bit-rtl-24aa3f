// The 16-bit Vedic RISC processor: control unit, instruction register,
// program counter, memory address register, address multiplexer, register
// file and the Vedic ALU (whose multiplier is the Urdhva Tiryakbhyam MAC),
// wired as in the processor's block diagram. Memory is outside; the
// processor drives one address bus and reads/writes one 16-bit data bus.
//
// Instructions are 8 bits, {opcode, rd, rs} or {opcode, addr} (see
// risc_pkg). The ALU reads rd (port A) and rs (port B) of the register file;
// LDA and STA use R0 through port A. Every instruction starts with one fetch
// cycle at the PC; see control_unit for the per-state behaviour and the
// cycle counts. rst is synchronous and active high.
//
// Interface: mem_addr/mem_rdata/mem_we/mem_wdata to the memory, and dbg,
// which shows PC, IR, Z flag, ALU result and the control state.
module processor
  import risc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  output logic [ADDR_W-1:0] mem_addr,
  input  logic [DATA_W-1:0] mem_rdata,
  output logic              mem_we,
  output logic [DATA_W-1:0] mem_wdata,
  output dbg_t              dbg
);
  ctrl_t              ctrl;
  cpu_state_t         state;
  logic [INSTR_W-1:0] ir;
  logic [ADDR_W-1:0]  pc, mar;
  logic [DATA_W-1:0]  ra_data, rb_data, wa_data;
  logic [REG_AW-1:0]  ra_addr, wa_addr, rd, rs;
  logic [31:0]        alu_result;
  logic               zero, mem_op;

  assign rd     = ir[3:2];
  assign rs     = ir[1:0];
  assign mem_op = (ir[7:4] == OP_LDA) || (ir[7:4] == OP_STA);

  control_unit v0 (.clk(clk), .rst(rst), .ir(ir), .zero(zero), .ctrl(ctrl), .state(state));

  instruction_register #(.IW(INSTR_W)) v1 (
    .clk(clk), .rst(rst), .load(ctrl.ir_load), .din(mem_rdata[INSTR_W-1:0]), .ir(ir));

  // Port A reads rd, or R0 for memory instructions; port B reads rs.
  assign ra_addr = mem_op ? '0 : rd;
  assign wa_addr = mem_op ? '0 : rd;
  assign wa_data = ctrl.rf_wa_mem ? mem_rdata : alu_result[15:0];

  register_file #(.NREGS(4), .W(DATA_W)) v2 (
    .clk(clk), .rst(rst),
    .ra_addr(ra_addr), .rb_addr(rs), .ra_data(ra_data), .rb_data(rb_data),
    .wa_en(ctrl.rf_wa_en), .wa_addr(wa_addr), .wa_data(wa_data),
    .wb_en(ctrl.rf_wb_en), .wb_addr(rs),      .wb_data(alu_result[31:16]));

  program_counter #(.AW(ADDR_W)) v3 (
    .clk(clk), .rst(rst), .inc(ctrl.pc_inc), .load(ctrl.pc_load), .din(ir[3:0]), .pc(pc));

  memory_address_register #(.AW(ADDR_W)) v4 (
    .clk(clk), .rst(rst), .load(ctrl.mar_load), .din(ir[3:0]), .mar(mar));

  address_mux #(.AW(ADDR_W)) v5 (.sel_mar(ctrl.addr_sel), .pc(pc), .mar(mar), .addr(mem_addr));

  alu v6 (.clk(clk), .rst(rst), .en(ctrl.alu_en), .op(ctrl.alu_op),
          .a(ra_data), .b(rb_data), .result(alu_result), .zero(zero));

  assign mem_we    = ctrl.mem_we;
  assign mem_wdata = ra_data;

  assign dbg = '{pc: pc, ir: ir, zero: zero, alu_result: alu_result, state: state};
endmodule
