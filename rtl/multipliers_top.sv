// multipliers_top: the three multiplier architectures compared in this design,
// each at 4 and 8 bits, side by side.
//
// The 4-bit operands a4, b4 feed the 4-bit array, Wallace and Dadda
// multipliers; the 8-bit operands a8, b8 feed the 8-bit ones. All six compute
// the same unsigned product; they differ only in how the partial products are
// added (carry-save array, Wallace tree, Dadda tree), which is what sets their
// delay and area. Every output is purely combinational. Sharing the operands
// between the architectures of one width is this design's choice; it lets one
// stimulus exercise all three.
module multipliers_top #(
  parameter int unsigned N_WIDE = 8  // width of the larger multipliers
) (
  input  logic [3:0]          a4,
  input  logic [3:0]          b4,
  output logic [7:0]          p_array4,
  output logic [7:0]          p_wallace4,
  output logic [7:0]          p_dadda4,
  input  logic [N_WIDE-1:0]   a8,
  input  logic [N_WIDE-1:0]   b8,
  output logic [2*N_WIDE-1:0] p_array8,
  output logic [2*N_WIDE-1:0] p_wallace8,
  output logic [2*N_WIDE-1:0] p_dadda8
);
  array_mult    #(.N(4))      u_array4   (.a(a4), .b(b4), .p(p_array4));
  wallace_mult4               u_wallace4 (.a(a4), .b(b4), .p(p_wallace4));
  dadda_mult4                 u_dadda4   (.a(a4), .b(b4), .p(p_dadda4));

  array_mult    #(.N(N_WIDE)) u_array8   (.a(a8), .b(b8), .p(p_array8));
  wallace_mult  #(.N(N_WIDE)) u_wallace8 (.a(a8), .b(b8), .p(p_wallace8));
  dadda_mult    #(.N(N_WIDE)) u_dadda8   (.a(a8), .b(b8), .p(p_dadda8));
endmodule
