// mult_pkg: shared types and elaboration-time planning functions for the
// column-compression (tree) multipliers.
//
// A tree multiplier lays its N*N partial-product bits out in 2N columns by
// weight and shrinks every column, stage by stage, with [3,2] counters (full
// adders) and [2,2] counters (half adders) until at most two bits are left in
// each column; a carry-propagate adder then merges the two rows. The functions
// below decide, for a given operand width and reduction scheme, how many
// counters of each kind sit in every column of every stage. They are evaluated
// only while the design is elaborated, so they produce no hardware.
//
// Two schemes are provided:
//   * SCHEME_WALLACE: Wallace's rule. The rows of each stage are taken in
//     groups of three (rows 0-2, 3-5, ...); inside a group, a column with three
//     bits gets a full adder and a column with two bits a half adder, and each
//     group leaves a sum row and a carry row. Rows left over when the row count
//     is not a multiple of three pass to the next stage untouched. For 8x8
//     operands this gives 8 -> 6 -> 4 -> 3 -> 2 rows.
//   * SCHEME_DADDA: Dadda's rule. Target heights 2, 3, 4, 6, 9, 13, ... (each
//     floor(1.5x) the previous); a stage lowers every column to the largest
//     target below the current maximum height, using as few counters as
//     possible and counting the carries that arrive from the column below in
//     the same stage. For 8x8 operands this gives 8 -> 6 -> 4 -> 3 -> 2 rows,
//     with 3 full and 3 half adders in the first stage and 9 full and 1 half
//     adder in the third.
// The plan fixes only how many counters of each kind every column gets; which
// bits of a column a counter takes is left to reduction_tree.
package mult_pkg;

  typedef enum logic {
    SCHEME_WALLACE = 1'b0,
    SCHEME_DADDA   = 1'b1
  } reduce_scheme_e;

  // Limits of the planning table: operands of up to 16 bits (32 columns) and
  // up to 8 reduction stages, which covers every width up to 16 bits for both
  // schemes.
  localparam int unsigned MAX_COLS   = 32;
  localparam int unsigned MAX_STAGES = 8;
  localparam int unsigned FIELD_W    = 8;   // bits per table entry
  localparam int unsigned MAX_ROWS   = 16;  // rows tracked by the Wallace rule

  // The counter plan of a whole tree, packed: for each stage s and column c,
  // three FIELD_W-bit entries: column height at the stage input, full adders,
  // half adders (see plan_get). Stage s = num_stages holds the final heights.
  typedef logic [MAX_STAGES*MAX_COLS*3*FIELD_W-1:0] plan_t;

  // Height of column `col` of the initial partial-product matrix.
  function automatic int pp_height(input int n, input int col);
    if (col < 0 || col > 2 * n - 2) return 0;
    return (col < n) ? col + 1 : 2 * n - 1 - col;
  endfunction

  // Largest Dadda target height strictly below `h`.
  function automatic int dadda_target(input int h);
    int d;
    int next;
    d = 2;
    next = 3;
    while (next < h) begin
      d    = next;
      next = (next * 3) / 2;
    end
    return d;
  endfunction

  // Works out the plan of an n x n tree under `scheme`, stage by stage.
  function automatic plan_t make_plan(input int n, input reduce_scheme_e scheme);
    plan_t t;
    int h  [MAX_COLS];
    int fa [MAX_COLS];
    int ha [MAX_COLS];
    int nh [MAX_COLS];
    int rlo [MAX_ROWS];   // Wallace rule: first and last column of each row
    int rhi [MAX_ROWS];
    int nlo [MAX_ROWS];
    int nhi [MAX_ROWS];
    int rows;
    int nrows;
    int k;
    int cmin;
    int cmax;
    int w;
    int hmax;
    int d;
    int heff;
    t = '0;
    w = 2 * n;
    for (int c = 0; c < MAX_COLS; c++) h[c] = (c < w) ? pp_height(n, c) : 0;
    rows = n;
    for (int r = 0; r < MAX_ROWS; r++) begin
      rlo[r] = r;
      rhi[r] = r + n - 1;
    end
    for (int s = 0; s < MAX_STAGES; s++) begin
      hmax = 0;
      for (int c = 0; c < w; c++) begin
        if (h[c] > hmax) hmax = h[c];
        fa[c] = 0;
        ha[c] = 0;
      end
      if (hmax > 2) begin
        d = dadda_target(hmax);
        for (int c = 0; c < w; c++) begin
          if (scheme == SCHEME_WALLACE) begin
            // Counted per group of three rows below.
          end else begin
            heff = h[c] + ((c > 0) ? fa[c-1] + ha[c-1] : 0);
            while (heff > d) begin
              if (heff == d + 1) begin
                ha[c] = ha[c] + 1;
                heff  = heff - 1;
              end else begin
                fa[c] = fa[c] + 1;
                heff  = heff - 2;
              end
            end
          end
        end
      end
      if (hmax > 2 && scheme == SCHEME_WALLACE) begin
        nrows = 0;
        for (int g = 0; g < rows / 3; g++) begin
          cmin = w;
          cmax = -1;
          for (int c = 0; c < w; c++) begin
            k = 0;
            for (int r = 3 * g; r < 3 * g + 3; r++)
              if (c >= rlo[r] && c <= rhi[r]) k++;
            if (k == 3) fa[c] = fa[c] + 1;
            if (k == 2) ha[c] = ha[c] + 1;
            if (k >= 2 && c < cmin) cmin = c;
            if (k >= 2) cmax = c;
          end
          // Sum row: every column the group covers.
          nlo[nrows] = rlo[3*g];
          nhi[nrows] = rhi[3*g];
          for (int r = 3 * g + 1; r < 3 * g + 3; r++) begin
            if (rlo[r] < nlo[nrows]) nlo[nrows] = rlo[r];
            if (rhi[r] > nhi[nrows]) nhi[nrows] = rhi[r];
          end
          nrows++;
          // Carry row: one column above every counter, clipped to the product.
          if (cmax >= 0 && cmin + 1 < w) begin
            nlo[nrows] = cmin + 1;
            nhi[nrows] = (cmax + 1 < w) ? cmax + 1 : w - 1;
            nrows++;
          end
        end
        for (int r = 3 * (rows / 3); r < rows; r++) begin
          nlo[nrows] = rlo[r];
          nhi[nrows] = rhi[r];
          nrows++;
        end
        rows = nrows;
        for (int r = 0; r < MAX_ROWS; r++) begin
          rlo[r] = (r < rows) ? nlo[r] : 0;
          rhi[r] = (r < rows) ? nhi[r] : -1;
        end
      end
      for (int c = 0; c < w; c++) begin
        t[((s * MAX_COLS + c) * 3 + 0) * FIELD_W +: FIELD_W] = FIELD_W'(h[c]);
        t[((s * MAX_COLS + c) * 3 + 1) * FIELD_W +: FIELD_W] = FIELD_W'(fa[c]);
        t[((s * MAX_COLS + c) * 3 + 2) * FIELD_W +: FIELD_W] = FIELD_W'(ha[c]);
      end
      // Heights after this stage; carries out of the top column are dropped
      // (they are always zero because the product fits in 2N bits).
      for (int c = 0; c < w; c++)
        nh[c] = h[c] - 2 * fa[c] - ha[c] + ((c > 0) ? fa[c-1] + ha[c-1] : 0);
      for (int c = 0; c < w; c++) h[c] = nh[c];
    end
    return t;
  endfunction

  // One entry of a plan. what: 0 = column height at the input of stage s,
  // 1 = full adders in the column, 2 = half adders in the column.
  function automatic int plan_get(input plan_t t, input int s, input int col,
                                  input int what);
    if (s < 0 || s >= MAX_STAGES || col < 0 || col >= MAX_COLS) return 0;
    return int'(t[((s * MAX_COLS + col) * 3 + what) * FIELD_W +: FIELD_W]);
  endfunction

  // Number of stages before every column of an n x n plan holds <= 2 bits.
  function automatic int plan_stages(input plan_t t, input int n);
    int hmax;
    for (int s = 0; s < MAX_STAGES; s++) begin
      hmax = 0;
      for (int c = 0; c < 2 * n; c++)
        if (plan_get(t, s, c, 0) > hmax) hmax = plan_get(t, s, c, 0);
      if (hmax <= 2) return s;
    end
    return MAX_STAGES;
  endfunction

  // Tallest column over all stages of a plan.
  function automatic int plan_max_height(input plan_t t, input int n);
    int m;
    m = 1;
    for (int s = 0; s < MAX_STAGES; s++)
      for (int c = 0; c < 2 * n; c++)
        if (plan_get(t, s, c, 0) > m) m = plan_get(t, s, c, 0);
    return m;
  endfunction

endpackage
