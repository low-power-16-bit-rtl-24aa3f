// 2x2-bit Vedic multiplier after the Urdhva Tiryakbhyam ("vertically and
// crosswise") rule. With a = a1a0 and b = b1b0:
//   p0        = a0*b0                       (vertical, least significant bits)
//   p1, c1    = a1*b0 + a0*b1               (crosswise, half adder)
//   p2, p3    = a1*b1 + c1                  (vertical, most significant bits,
//                                            half adder)
// Four AND gates and two half adders; purely combinational.
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic c1;
  assign p[0] = a[0] & b[0];
  half_adder u_ha0 (.a(a[1] & b[0]), .b(a[0] & b[1]), .s(p[1]), .c(c1));
  half_adder u_ha1 (.a(a[1] & b[1]), .b(c1),          .s(p[2]), .c(p[3]));
endmodule
