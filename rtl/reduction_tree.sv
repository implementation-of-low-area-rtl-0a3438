// reduction_tree: column compression of an N x N partial-product matrix down
// to two rows, using full adders ([3,2] counters) and half adders ([2,2]
// counters). This is the middle stage shared by the Wallace and Dadda
// multipliers.
//
// The partial products are sorted into 2N columns by weight (column c holds
// every a[i]&b[j] with i+j = c). Each stage takes, in every column, groups of
// three bits into full adders and pairs into half adders; the sums stay in the
// column and the carries move to the column above, entering the next stage.
// How many counters each column gets in each stage is fixed at elaboration by
// mult_pkg::make_plan, according to SCHEME:
//   SCHEME_WALLACE  Wallace's rule: counters within groups of three rows;
//   SCHEME_DADDA    reduce only to Dadda's next target height (..., 6, 4, 3, 2).
// Inside a column, the next stage's bits are ordered: full-adder sums,
// half-adder sums, bits passed through untouched, then the carries arriving
// from the column below (full-adder carries first).
//
// Interface: pp[j][i] = a[i] & b[j] in; row0 and row1 out, 2N bits each, with
// row0 + row1 = sum over all partial products of pp[j][i] * 2**(i+j).
// Purely combinational; the depth is num_stages counter levels.
// Carries out of the top column, which are always zero because the product
// fits in 2N bits, are not passed on. Lint therefore reports the top column's
// carries, and the bits above bit 1 of the last stage's columns (always 0),
// as unused.
module reduction_tree
  import mult_pkg::*;
#(
  parameter int unsigned    N      = 8,             // operand width
  parameter reduce_scheme_e SCHEME = SCHEME_DADDA   // counter placement rule
) (
  input  logic [N-1:0]   pp [N],
  output logic [2*N-1:0] row0,
  output logic [2*N-1:0] row1
);
  localparam int    W    = 2 * N;
  localparam plan_t PLAN = make_plan(N, SCHEME);
  localparam int    S    = plan_stages(PLAN, N);
  localparam int    MH   = (plan_max_height(PLAN, N) < 2) ? 2 : plan_max_height(PLAN, N);

  if (2 * N > MAX_COLS || S >= MAX_STAGES) begin : g_too_wide
    $error("reduction_tree: N = %0d exceeds the planning table", N);
  end

  // Each column of each stage holds its bits packed from bit 0 upward, bits
  // above the column's height being 0: g_load[c].v is column c of the
  // partial-product matrix and g_stage[s].g_col[c].ob column c after stage s.
  // g_stage[s].g_col[c].cys holds the carries leaving column c in stage s
  // (full-adder carries first, then half-adder carries).

  // Stage 0: load the partial-product matrix column by column.
  for (genvar c = 0; c < W; c++) begin : g_load
    localparam int H0   = pp_height(N, c);
    localparam int IMIN = (c > N - 1) ? c - (N - 1) : 0;
    logic [MH-1:0] v;
    for (genvar k = 0; k < MH; k++) begin : g_bit
      if (k < H0) begin : g_pp
        assign v[k] = pp[c-(IMIN+k)][IMIN+k];
      end else begin : g_zero
        assign v[k] = 1'b0;
      end
    end
  end

  for (genvar s = 0; s < S; s++) begin : g_stage
    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int H  = plan_get(PLAN, s, c, 0);
      localparam int F  = plan_get(PLAN, s, c, 1);
      localparam int A  = plan_get(PLAN, s, c, 2);
      localparam int P  = H - 3 * F - 2 * A;           // bits passed through
      localparam int CF = (c > 0) ? plan_get(PLAN, s, c - 1, 1) : 0;
      localparam int CA = (c > 0) ? plan_get(PLAN, s, c - 1, 2) : 0;
      localparam int HN = plan_get(PLAN, s + 1, c, 0);
      localparam logic [MH-1:0] PMASK = (P >= MH) ? '1 : ((MH'(1) << P) - MH'(1));

      if (P < 0 || F + A + P + CF + CA != HN || HN > MH) begin : g_bad_plan
        $error("reduction_tree: inconsistent plan at stage %0d column %0d", s, c);
      end

      logic [MH-1:0] ib;
      logic [MH-1:0] sums;
      logic [MH-1:0] cys;
      logic [MH-1:0] from_below;
      logic [MH-1:0] ob;
      if (s == 0) begin : g_first
        assign ib = g_load[c].v;
      end else begin : g_next
        assign ib = g_stage[s-1].g_col[c].ob;
      end

      for (genvar k = 0; k < F; k++) begin : g_fa
        full_adder u_fa (.a(ib[3*k]), .b(ib[3*k+1]), .cin(ib[3*k+2]),
                         .sum(sums[k]), .carry(cys[k]));
      end
      for (genvar k = 0; k < A; k++) begin : g_ha
        half_adder u_ha (.a(ib[3*F+2*k]), .b(ib[3*F+2*k+1]),
                         .sum(sums[F+k]), .carry(cys[F+k]));
      end
      for (genvar k = F + A; k < MH; k++) begin : g_idle
        assign sums[k] = 1'b0;
        assign cys[k]  = 1'b0;
      end
      if (c > 0) begin : g_cin
        assign from_below = g_col[c-1].cys;
      end else begin : g_nocin
        assign from_below = '0;
      end

      assign ob = sums
              | (((ib >> (3 * F + 2 * A)) & PMASK) << (F + A))
              | (from_below << (F + A + P));
    end
  end

  // The two rows left for the carry-propagate adder.
  for (genvar c = 0; c < W; c++) begin : g_rows
    if (S == 0) begin : g_direct
      assign row0[c] = g_load[c].v[0];
      assign row1[c] = g_load[c].v[1];
    end else begin : g_reduced
      assign row0[c] = g_stage[S-1].g_col[c].ob[0];
      assign row1[c] = g_stage[S-1].g_col[c].ob[1];
    end
  end
endmodule
