// 16-bit adder of the modified ALU: two 8-bit adders (instances gate1 and
// gate2) with the carry passed from the low byte to the high byte. The
// 17-bit sum {cout, s} corresponds to the s[16:0] output of the original
// schematic. Combinational: s + 65536*cout = a + b + cin.
module rca16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] s,
  output logic        cout
);
  logic c_mid;
  rca8 gate1 (.a(a[7:0]),  .b(b[7:0]),  .cin(cin),   .s(s[7:0]),  .cout(c_mid));
  rca8 gate2 (.a(a[15:8]), .b(b[15:8]), .cin(c_mid), .s(s[15:8]), .cout(cout));
endmodule
