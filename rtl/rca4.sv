// 4-bit ripple-carry adder: four full adders chained through their carries.
// This is the "regular" adder at the bottom of the modified adder hierarchy
// (16 bits = two 8-bit adders, 8 bits = two 4-bit adders, 4 bits = this).
// Ripple carry is this design's reading of "regular adder".
// Combinational: s + 16*cout = a + b + cin.
module rca4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  logic [4:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < 4; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end
  assign cout = c[4];
endmodule
