// 16-bit ALU of the Vedic processor, in its modified form: additions use the
// hierarchical adder (16 = 2 x 8 = 4 x 4 bits, rca16) and multiplication uses
// the Vedic MAC. A 4-bit select chooses one of ten operations:
//   ADD  result = {carry, a + b}         SUB  result = a - b (a + ~b + 1)
//   MUL  result = a * b (Vedic MAC)      DIV  result = {a % b, a / b}
//   AND, OR, XOR                         NOT  result = ~b
//   SHL  result = a << b[3:0]            SHR  result = a >> b[3:0]
// Results are 32 bits, zero-extended where narrower. Division by zero
// gives quotient 16'hFFFF and remainder a.
//
// Timing: on a clock edge with en high the result is registered (result is
// valid from the next cycle and held until the next enabled edge) and the
// single-bit Z flag register records whether that result is zero. For MUL
// the product is held in the MAC's own register and Z is set when either
// operand is zero. rst is synchronous and active high.
// Add, subtract, multiply and divide, the 4-bit select, the 32-bit
// registered output and the Z flag follow the design description; the other
// six operations, their codes and the divider are this design's choices.
module alu
  import risc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            en,
  input  logic [3:0]      op,
  input  logic [15:0]     a,
  input  logic [15:0]     b,
  output logic [31:0]     result,
  output logic            zero
);
  localparam int unsigned W = DATA_W;  // fixed by the 16-bit adder and MAC

  logic [15:0]    add_s, sub_s;
  logic           add_c, sub_c_unused;
  logic [32:0]    mac_z;
  logic [2*W-1:0] res_d, res_q;
  logic           zero_d;
  logic [3:0]     op_q;

  rca16 u_add (.a(a), .b(b),  .cin(1'b0), .s(add_s), .cout(add_c));
  rca16 u_sub (.a(a), .b(~b), .cin(1'b1), .s(sub_s), .cout(sub_c_unused));
  mac   u_mac (.clk(clk), .rst(rst), .en(en && op == OP_MUL), .a(a), .b(b), .z(mac_z));

  always_comb begin
    res_d = '0;
    unique case (op)
      OP_ADD: res_d = {{(W-1){1'b0}}, add_c, add_s};
      OP_SUB: res_d = {{W{1'b0}}, sub_s};
      OP_DIV: res_d = (b == '0) ? {a, {W{1'b1}}} : {a % b, a / b};
      OP_AND: res_d = {{W{1'b0}}, a & b};
      OP_OR:  res_d = {{W{1'b0}}, a | b};
      OP_XOR: res_d = {{W{1'b0}}, a ^ b};
      OP_NOT: res_d = {{W{1'b0}}, ~b};
      OP_SHL: res_d = {{W{1'b0}}, a << b[3:0]};
      OP_SHR: res_d = {{W{1'b0}}, a >> b[3:0]};
      default: res_d = '0;  // OP_MUL comes from the MAC; other codes give 0
    endcase
    zero_d = (op == OP_MUL) ? (a == '0 || b == '0) : (res_d == '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      res_q <= '0;
      op_q  <= OP_ADD;
      zero  <= 1'b0;
    end else if (en) begin
      res_q <= res_d;
      op_q  <= op;
      zero  <= zero_d;
    end
  end

  assign result = (op_q == OP_MUL) ? mac_z[2*W-1:0] : res_q;
endmodule
