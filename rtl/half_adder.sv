// half_adder: the [2,2] counter of the multipliers.
//
// Adds two bits of equal weight: sum = a XOR b keeps the weight, carry =
// a AND b moves one column up. Purely combinational, one gate level. Built from
// an XOR and an AND gate as the multipliers' description specifies.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
