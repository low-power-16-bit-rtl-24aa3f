// Half adder: sum = a XOR b, carry = a AND b. The smallest cell of the Vedic
// multipliers (2x2 level and the carry merge of the larger sizes).
// Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
