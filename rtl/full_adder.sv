// full_adder: the [3,2] counter of the multipliers.
//
// Adds three bits of equal weight into a sum bit of the same weight and a
// carry bit of the next weight. Built from XOR, AND and OR gates only, as the
// multipliers' description specifies: sum = a ^ b ^ cin and
// carry = (a & b) | (cin & (a ^ b)). Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic carry
);
  logic axb;
  assign axb   = a ^ b;
  assign sum   = axb ^ cin;
  assign carry = (a & b) | (cin & axb);
endmodule
