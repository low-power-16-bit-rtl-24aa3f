// 8-bit adder made of two 4-bit adders: the low half's carry out is the high
// half's carry in. This two-halves construction is the one the design uses at
// every level of its adder. Combinational: s + 256*cout = a + b + cin.
module rca8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] s,
  output logic       cout
);
  logic c_mid;
  rca4 u_lo (.a(a[3:0]), .b(b[3:0]), .cin(cin),   .s(s[3:0]), .cout(c_mid));
  rca4 u_hi (.a(a[7:4]), .b(b[7:4]), .cin(c_mid), .s(s[7:4]), .cout(cout));
endmodule
