// Vedic MAC unit: the 16x16 Urdhva Tiryakbhyam multiplier (vedic_mul16)
// followed by a 33-bit product register (regis_mod), as in the MAC's RTL
// schematic, which holds exactly these two cells and no adder.
// Example from the design: 252 * 846 = 213192.
//
// Timing: z shows a*b one clock edge after the edge at which en was high;
// it then holds until the next enabled edge. rst (synchronous, active high)
// clears z. The 32-bit product is zero-extended into the 33-bit register.
// The enable input is this design's addition.
module mac (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [32:0] z
);
  logic [31:0] q;
  vedic_mul16 u_mul (.a(a), .b(b), .p(q));
  regis_mod #(.W(33)) u_reg (.clk(clk), .rst(rst), .en(en), .inp({1'b0, q}), .oup(z));
endmodule
