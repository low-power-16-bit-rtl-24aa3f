// Control unit: a four-state machine that sequences every instruction
// through FETCH, DECODE, EXECUTE and WRITEBACK and turns the instruction
// register's opcode into the data path's control signals (ctrl_t).
//
//   FETCH   address bus = PC; IR <= memory; PC <= PC + 1
//   DECODE  MAR <= address field; JMP loads PC; JZ loads PC if Z is set;
//           jumps and the two unused codes then return to FETCH
//   EXECUTE ALU ops: the ALU captures rd OP rs (and updates Z)
//           LDA: R0 <= memory[MAR];  STA: memory[MAR] <= R0; then FETCH
//   WB      rd <= result[15:0]; MUL/DIV also write result[31:16] to rs
//
// Cycle counts: ALU instructions 4, LDA/STA 3, JMP/JZ/no-op 2. rst
// (synchronous, active high) returns to FETCH. ctrl.alu_op is the opcode
// field itself (opcodes 0..9 double as ALU select codes), so those four
// bits are wired straight from ir. The fetch/decode/execute
// sequence follows the design description; the four states, the write-back
// step and the cycle counts are this design's choices.
module control_unit
  import risc_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [INSTR_W-1:0] ir,
  input  logic               zero,
  output ctrl_t              ctrl,
  output cpu_state_t         state
);
  cpu_state_t state_n;
  opcode_t    opc;

  assign opc = opcode_t'(ir[7:4]);

  always_comb begin
    ctrl    = '0;
    ctrl.alu_op = ir[7:4];
    state_n = state;
    unique case (state)
      S_FETCH: begin
        ctrl.ir_load = 1'b1;
        ctrl.pc_inc  = 1'b1;
        state_n      = S_DECODE;
      end
      S_DECODE: begin
        ctrl.mar_load = 1'b1;
        state_n       = S_EXEC;
        if (opc == OP_JMP) begin
          ctrl.pc_load = 1'b1;
          state_n      = S_FETCH;
        end else if (opc == OP_JZ) begin
          ctrl.pc_load = zero;
          state_n      = S_FETCH;
        end else if (opc == OP_NOP_E || opc == OP_NOP_F) begin
          state_n      = S_FETCH;
        end
      end
      S_EXEC: begin
        state_n = S_FETCH;
        if (is_alu_op(ir[7:4])) begin
          ctrl.alu_en = 1'b1;
          state_n     = S_WB;
        end else if (opc == OP_LDA) begin
          ctrl.addr_sel  = 1'b1;
          ctrl.rf_wa_en  = 1'b1;
          ctrl.rf_wa_mem = 1'b1;
        end else if (opc == OP_STA) begin
          ctrl.addr_sel = 1'b1;
          ctrl.mem_we   = 1'b1;
        end
      end
      S_WB: begin
        ctrl.rf_wa_en = 1'b1;
        ctrl.rf_wb_en = (opc == OP_MUL) || (opc == OP_DIV);
        state_n       = S_FETCH;
      end
      default: state_n = S_FETCH;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S_FETCH;
    else     state <= state_n;
  end
endmodule
