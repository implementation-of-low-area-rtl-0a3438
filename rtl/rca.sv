// rca: carry-propagate (ripple-carry) adder, the final addition stage.
//
// Adds two W-bit rows. Bit 0 is a half adder (no carry in); every higher bit is
// a full adder fed by the carry of the bit below, so the carry ripples from the
// least to the most significant bit. Purely combinational; the worst-case path
// passes through all W cells. The multipliers use it to merge the two rows
// left by partial-product reduction; a ripple adder is this design's choice of
// carry-propagate adder.
module rca #(
  parameter int unsigned W = 16  // row width
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:1] c;  // c[k] is the carry into bit k

  half_adder u_ha0 (.a(x[0]), .b(y[0]), .sum(sum[0]), .carry(c[1]));
  for (genvar k = 1; k < W; k++) begin : g_fa
    full_adder u_fa (.a(x[k]), .b(y[k]), .cin(c[k]), .sum(sum[k]), .carry(c[k+1]));
  end
  assign cout = c[W];
endmodule
