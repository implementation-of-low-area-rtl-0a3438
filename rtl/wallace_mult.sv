// wallace_mult: N x N unsigned Wallace tree multiplier (8 x 8 by default).
//
// The three stages of a tree multiplier: pp_gen forms the N*N partial products
// with AND gates; reduction_tree, in its Wallace setting, compresses the
// rows in groups of three with full and half adders, leaving rows that do not
// fill a group for the next stage (8 rows -> 6 -> 4 -> 3 -> 2 for N = 8); rca
// merges the two remaining rows into the product. The ripple-carry final
// adder is this design's choice.
//
// Interface: a (multiplicand), b (multiplier), p = a*b (2N bits). Purely
// combinational.
module wallace_mult #(
  parameter int unsigned N = 8  // operand width
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N-1:0]   pp [N];
  logic [2*N-1:0] row0, row1;

  pp_gen #(.N(N)) u_pp (.a(a), .b(b), .pp(pp));
  reduction_tree #(.N(N), .SCHEME(mult_pkg::SCHEME_WALLACE)) u_tree (
    .pp(pp), .row0(row0), .row1(row1));
  // The carry out of bit 2N-1 is always 0: the product fits in 2N bits.
  rca #(.W(2 * N)) u_cpa (.x(row0), .y(row1), .sum(p), .cout());
endmodule
