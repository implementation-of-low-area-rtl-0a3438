// dadda_mult: N x N unsigned Dadda tree multiplier (8 x 8 by default).
//
// The three stages of a tree multiplier: pp_gen forms the N*N partial products
// with AND gates; reduction_tree, in its Dadda setting, compresses the columns
// with full and half adders only as far as Dadda's next target height; rca
// merges the two remaining rows into the product. For N = 8 the rows go
// 8 -> 6 -> 4 -> 3 -> 2; the first stage uses 3 full and 3 half adders and the
// third uses 9 full adders and 1 half adder, as described for the 8 x 8 Dadda
// multiplier. The ripple-carry final adder is this design's choice.
//
// Interface: a (multiplicand), b (multiplier), p = a*b (2N bits). Purely
// combinational.
module dadda_mult #(
  parameter int unsigned N = 8  // operand width
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N-1:0]   pp [N];
  logic [2*N-1:0] row0, row1;

  pp_gen #(.N(N)) u_pp (.a(a), .b(b), .pp(pp));
  reduction_tree #(.N(N), .SCHEME(mult_pkg::SCHEME_DADDA)) u_tree (
    .pp(pp), .row0(row0), .row1(row1));
  // The carry out of bit 2N-1 is always 0: the product fits in 2N bits.
  rca #(.W(2 * N)) u_cpa (.x(row0), .y(row1), .sum(p), .cout());
endmodule
