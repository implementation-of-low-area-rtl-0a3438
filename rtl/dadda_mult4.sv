// dadda_mult4: 4 x 4 unsigned Dadda tree multiplier, wired counter by counter
// after the 4x4 Dadda reduction diagram.
//
// Three stages: (1) sixteen AND gates form the partial products (pp_gen);
// (2) two layers of counters cut the columns to at most two bits;
// (3) a ripple-carry adder merges the two rows.
//   Layer 1: FA(a1b2, a2b1, a3b0) -> s1 (weight 3), c1 (weight 4)
//            FA(a1b3, a2b2, a3b1) -> s2 (weight 4), c2 (weight 5)
//   Layer 2: HA(a1b1, a2b0)       -> s3 (2), c3 (3)
//            HA(a0b3, s1)         -> s4 (3), c4 (4)
//            HA(s2, c1)           -> s5 (4), c5 (5)
//            FA(a2b3, a3b2, c2)   -> s6 (5), c6 (6)
//   Rows left: {a3b3 s6 s5 s4 a0b2 a0b1 a0b0} and {c6 c5 c4 c3 s3 a1b0 -}.
// Here aibj is a[i] & b[j], of weight i+j. The counter placement and the names
// s1..s6, c1..c6 follow the diagram (which places the counters differently from
// the 4x4 Wallace diagram); the ripple-carry final adder is this design's
// choice of carry-propagate adder.
//
// Interface: a (multiplicand), b (multiplier), p = a*b (8 bits). Purely
// combinational.
module dadda_mult4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] pp [4];  // pp[j][i] = a[i] & b[j]
  pp_gen #(.N(4)) u_pp (.a(a), .b(b), .pp(pp));

  logic s1, s2, s3, s4, s5, s6;
  logic c1, c2, c3, c4, c5, c6;

  // Layer 1
  full_adder u_l1_fa3 (.a(pp[2][1]), .b(pp[1][2]), .cin(pp[0][3]), .sum(s1), .carry(c1));
  full_adder u_l1_fa4 (.a(pp[3][1]), .b(pp[2][2]), .cin(pp[1][3]), .sum(s2), .carry(c2));

  // Layer 2
  half_adder u_l2_ha2 (.a(pp[1][1]), .b(pp[0][2]), .sum(s3), .carry(c3));
  half_adder u_l2_ha3 (.a(pp[3][0]), .b(s1),       .sum(s4), .carry(c4));
  half_adder u_l2_ha4 (.a(s2),       .b(c1),       .sum(s5), .carry(c5));
  full_adder u_l2_fa5 (.a(pp[3][2]), .b(pp[2][3]), .cin(c2), .sum(s6), .carry(c6));

  // Final addition over weights 1 .. 6
  logic [5:0] row_x, row_y;
  assign row_x = {pp[3][3], s6, s5, s4, pp[2][0], pp[1][0]};
  assign row_y = {c6, c5, c4, c3, s3, pp[0][1]};
  assign p[0]  = pp[0][0];
  rca #(.W(6)) u_cpa (.x(row_x), .y(row_y), .sum(p[6:1]), .cout(p[7]));
endmodule
