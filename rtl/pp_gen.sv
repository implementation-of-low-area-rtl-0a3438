// pp_gen: partial-product generation, the first stage of every multiplier.
//
// Forms the N*N bits pp[j][i] = a[i] & b[j] with one AND gate each. Row j is
// the multiplicand `a` gated by multiplier bit b[j]; its bit i has weight
// 2**(i+j). Purely combinational.
module pp_gen #(
  parameter int unsigned N = 8  // operand width (4 and 8 are the sizes used)
) (
  input  logic [N-1:0] a,               // multiplicand
  input  logic [N-1:0] b,               // multiplier
  output logic [N-1:0] pp [N]           // pp[j][i] = a[i] & b[j]
);
  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_bit
      assign pp[j][i] = a[i] & b[j];
    end
  end
endmodule
