// array_mult: N x N unsigned array multiplier (carry-save array with a
// ripple-carry final row).
//
// Partial products pp[j][i] = a[i] & b[j] come from pp_gen. Row 1 of the array
// is a line of N-1 half adders that add rows 0 and 1 of the partial products
// bit by bit. Each of the rows 2 .. N-1 is a line of N-1 full adders: cell i of
// row r adds a[i]&b[r], the sum leaving cell i+1 of the row above (or, for the
// leftmost cell, the top partial product a[N-1]&b[r-1]) and the carry leaving
// cell i of the row above. Carries therefore move straight down and sums move
// down and one column right, so no carry ripples inside a row. The rightmost
// sum of row r is product bit r. The last row is a ripple-carry adder (one half
// adder, then N-2 full adders) that merges the remaining sums and carries into
// product bits N .. 2N-1.
//
// This follows the 4-bit and 8-bit array diagrams: a half adder at the start of
// the last row and, in the 8-bit diagram, half adders across the first row. The
// 4-bit diagram draws the first row as full adders with one input tied to 0,
// which computes the same function; half adders are used here for both sizes,
// the variant the text describes as the faster one.
//
// Interface: a (multiplicand) and b (multiplier), N bits each, unsigned; p is
// the 2N-bit product. Purely combinational; the longest path crosses N-1 array
// rows and then the N-1 cells of the final ripple row.
module array_mult #(
  parameter int unsigned N = 8  // operand width; the sizes described are 4 and 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N-1:0] pp [N];
  pp_gen #(.N(N)) u_pp (.a(a), .b(b), .pp(pp));

  // s[r][i], c[r][i]: sum and carry of cell i in array row r (weights r+i and
  // r+i+1).
  logic [N-2:0] s [1:N-1];
  logic [N-2:0] c [1:N-1];

  // Row 1: half adders on partial-product rows 0 and 1.
  for (genvar i = 0; i < N - 1; i++) begin : g_row1
    half_adder u_ha (.a(pp[0][i+1]), .b(pp[1][i]), .sum(s[1][i]), .carry(c[1][i]));
  end

  // Rows 2 .. N-1: carry-save rows of full adders.
  for (genvar r = 2; r < N; r++) begin : g_row
    for (genvar i = 0; i < N - 1; i++) begin : g_cell
      logic s_in;
      if (i == N - 2) begin : g_top
        assign s_in = pp[r-1][N-1];
      end else begin : g_mid
        assign s_in = s[r-1][i+1];
      end
      full_adder u_fa (.a(pp[r][i]), .b(s_in), .cin(c[r-1][i]),
                       .sum(s[r][i]), .carry(c[r][i]));
    end
  end

  // Product bits 1 .. N-1 are the rightmost sums of the rows.
  assign p[0] = pp[0][0];
  for (genvar r = 1; r < N; r++) begin : g_plow
    assign p[r] = s[r][0];
  end

  // Final row: ripple-carry merge of the last row's sums and carries.
  logic [N-2:0] fx;
  for (genvar k = 0; k < N - 1; k++) begin : g_fx
    if (k == N - 2) begin : g_top
      assign fx[k] = pp[N-1][N-1];
    end else begin : g_mid
      assign fx[k] = s[N-1][k+1];
    end
  end
  rca #(.W(N - 1)) u_final (.x(fx), .y(c[N-1]), .sum(p[2*N-2:N]), .cout(p[2*N-1]));
endmodule
