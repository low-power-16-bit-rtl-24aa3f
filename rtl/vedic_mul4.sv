// 4x4-bit Vedic multiplier (Urdhva Tiryakbhyam), built from four
// 2x2 Vedic multipliers (vedic_mul2) and three 4-bit adders (rca4).
//
// Split a = {aH, aL} and b = {bH, bL} into 2-bit halves. Then
//   a*b = aH*bH * 2^4 + (aH*bL + aL*bH) * 2^2 + aL*bL
// The four half-size products are formed in parallel ("vertical" q0, q3 and
// "crosswise" q1, q2) and summed:
//   gate1: s1 = q1 + q2                          (carry c1)
//   gate2: s2 = s1 + (q0 >> 2)                   (carry c2)
//   ha_1 : merges c1 and c2 (at most one is set)
//   gate3: p[7:4] = q3 + {ha carry, ha sum, s2[3:2]}
//   p[3:2] = s2[1:0],  p[1:0] = q0[1:0]
// This arrangement of three adders and one half adder follows the 16x16
// schematic of the design; smaller sizes repeat it. Purely combinational.
module vedic_mul4 (
  input  logic [3:0]   a,
  input  logic [3:0]   b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3, s1, s2, hi_in;
  logic c1, c2, hs, hc;

  vedic_mul2 vedic_1 (.a(a[1:0]),  .b(b[1:0]),  .p(q0));  // aL*bL
  vedic_mul2 vedic_2 (.a(a[3:2]), .b(b[1:0]),  .p(q1));  // aH*bL
  vedic_mul2 vedic_3 (.a(a[1:0]),  .b(b[3:2]), .p(q2));  // aL*bH
  vedic_mul2 vedic_4 (.a(a[3:2]), .b(b[3:2]), .p(q3));  // aH*bH

  rca4 gate1 (.a(q1), .b(q2), .cin(1'b0), .s(s1), .cout(c1));
  rca4 gate2 (.a(s1), .b({2'b0, q0[3:2]}), .cin(1'b0), .s(s2), .cout(c2));
  half_adder ha_1 (.a(c1), .b(c2), .s(hs), .c(hc));
  assign hi_in = {hc, hs, s2[3:2]};
  // The top half of a product never overflows, so gate3's carry is unused.
  rca4 gate3 (.a(q3), .b(hi_in), .cin(1'b0), .s(p[7:4]), .cout());

  assign p[3:2] = s2[1:0];
  assign p[1:0] = q0[1:0];
endmodule
