// Full adder built, as described for the modified ALU adder, from XOR gates
// for the sum and AND/OR gates for the carry:
//   s = a ^ b ^ cin,  cout = (a & b) | (cin & (a ^ b)).
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p;
  assign p    = a ^ b;
  assign s    = p ^ cin;
  assign cout = (a & b) | (cin & p);
endmodule
