// Shared types and constants of the 16-bit Vedic RISC processor.
//
// The machine is 16 bits wide and executes fourteen instructions: ten ALU
// operations (selected by a 4-bit code that is also the opcode), LDA, STA,
// JMP and JZ. An instruction is 8 bits, {opcode[3:0], operand[3:0]}:
//   ALU ops       operand = {rd[1:0], rs[1:0]}   rd <= rd OP rs
//   LDA/STA/JMP/JZ operand = 4-bit memory address
// The fourteen-instruction count and the 4-bit ALU select come from the
// design description; the encodings, the operand split and the choice of the
// four non-ALU instructions are this design's own.
package risc_pkg;

  localparam int unsigned DATA_W = 16;   // data path width
  localparam int unsigned ADDR_W = 4;    // PC / MAR / memory address width
  localparam int unsigned INSTR_W = 8;   // instruction register width
  localparam int unsigned REG_AW = 2;    // register number width (4 registers)

  // Opcodes 0..9 are also the ALU select codes.
  typedef enum logic [3:0] {
    OP_ADD = 4'h0,  // rd <= rd + rs            (result bit 16 = carry)
    OP_SUB = 4'h1,  // rd <= rd - rs
    OP_MUL = 4'h2,  // {rs, rd} <= rd * rs      (Vedic multiplier)
    OP_DIV = 4'h3,  // rd <= rd / rs, rs <= rd % rs
    OP_AND = 4'h4,
    OP_OR  = 4'h5,
    OP_XOR = 4'h6,
    OP_NOT = 4'h7,  // rd <= ~rs
    OP_SHL = 4'h8,  // rd <= rd << rs[3:0]
    OP_SHR = 4'h9,  // rd <= rd >> rs[3:0]
    OP_LDA = 4'hA,  // R0 <= M[addr]
    OP_STA = 4'hB,  // M[addr] <= R0
    OP_JMP = 4'hC,  // PC <= addr
    OP_JZ  = 4'hD,  // if Z: PC <= addr
    OP_NOP_E = 4'hE,  // unused code, no operation
    OP_NOP_F = 4'hF   // unused code, no operation
  } opcode_t;

  typedef enum logic [1:0] {
    S_FETCH  = 2'd0,
    S_DECODE = 2'd1,
    S_EXEC   = 2'd2,
    S_WB     = 2'd3
  } cpu_state_t;

  // Control signals from the control unit to the data path.
  typedef struct packed {
    logic       ir_load;    // capture the fetched instruction
    logic       pc_inc;     // step the program counter
    logic       pc_load;    // jump
    logic       mar_load;   // capture the instruction's address field
    logic       addr_sel;   // address bus source: 0 = PC, 1 = MAR
    logic       alu_en;     // ALU captures a result (and updates Z)
    logic [3:0] alu_op;     // ALU select
    logic       rf_wa_en;   // write rd (or R0 for LDA)
    logic       rf_wa_mem;  // write port A data from memory instead of ALU
    logic       rf_wb_en;   // write rs with the upper half of the result
    logic       mem_we;     // store R0 to memory
  } ctrl_t;

  // What the processor shows to the outside for observation.
  typedef struct packed {
    logic [ADDR_W-1:0]  pc;
    logic [INSTR_W-1:0] ir;
    logic               zero;
    logic [31:0]        alu_result;
    cpu_state_t         state;
  } dbg_t;

  function automatic bit is_alu_op(logic [3:0] op);
    return op <= 4'h9;
  endfunction

endpackage
