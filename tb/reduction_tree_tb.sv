// reduction_tree_tb: self-check of the column-compression tree in both of its
// settings. The testbench forms the 8 x 8 partial-product matrix itself and
// checks, for every operand pair, that the two rows left by the tree add up to
// a * b and that every column is down to two bits. It also checks the counter
// plan of the Dadda setting against the counts stated for the 8 x 8 Dadda
// multiplier: rows 8 -> 6 -> 4 -> 3 -> 2, 3 full and 3 half adders in the first
// stage, 9 full adders and 1 half adder in the third; and the Wallace plan:
// the same row sequence, with rows grouped in threes in the first stage.
module reduction_tree_tb;
  import mult_pkg::*;

  logic [7:0]  a, b;
  logic [7:0]  pp [8];
  logic [15:0] w0, w1, d0, d1;
  int checks = 0, failures = 0;

  reduction_tree #(.N(8), .SCHEME(SCHEME_WALLACE)) dut_w (.pp(pp), .row0(w0), .row1(w1));
  reduction_tree                                   dut_d (.pp(pp), .row0(d0), .row1(d1));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam plan_t WPLAN = make_plan(8, SCHEME_WALLACE);
  localparam plan_t DPLAN = make_plan(8, SCHEME_DADDA);

  function automatic int stage_count(input plan_t t, input int s, input int what);
    int n;
    n = 0;
    for (int c = 0; c < 16; c++) n += plan_get(t, s, c, what);
    return n;
  endfunction

  function automatic int stage_rows(input plan_t t, input int s);
    int m;
    m = 0;
    for (int c = 0; c < 16; c++) if (plan_get(t, s, c, 0) > m) m = plan_get(t, s, c, 0);
    return m;
  endfunction

  task automatic expect_int(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    // Counter plan of the 8 x 8 Dadda tree.
    expect_int("dadda stages", plan_stages(DPLAN, 8), 4);
    expect_int("dadda rows after stage 1", stage_rows(DPLAN, 1), 6);
    expect_int("dadda rows after stage 2", stage_rows(DPLAN, 2), 4);
    expect_int("dadda rows after stage 3", stage_rows(DPLAN, 3), 3);
    expect_int("dadda rows after stage 4", stage_rows(DPLAN, 4), 2);
    expect_int("dadda stage 1 full adders", stage_count(DPLAN, 0, 1), 3);
    expect_int("dadda stage 1 half adders", stage_count(DPLAN, 0, 2), 3);
    expect_int("dadda stage 3 full adders", stage_count(DPLAN, 2, 1), 9);
    expect_int("dadda stage 3 half adders", stage_count(DPLAN, 2, 2), 1);
    expect_int("wallace stages", plan_stages(WPLAN, 8), 4);
    expect_int("wallace rows after stage 1", stage_rows(WPLAN, 1), 6);
    expect_int("wallace rows after stage 2", stage_rows(WPLAN, 2), 4);
    expect_int("wallace rows after stage 3", stage_rows(WPLAN, 3), 3);
    expect_int("wallace rows after stage 4", stage_rows(WPLAN, 4), 2);
    // Stage 1 of the 8 x 8 Wallace tree: rows 0-2 and rows 3-5 each need 6
    // full and 2 half adders; rows 6 and 7 pass, so column 13 (a6b7, a7b6)
    // gets no counter.
    expect_int("wallace stage 1 full adders", stage_count(WPLAN, 0, 1), 12);
    expect_int("wallace stage 1 half adders", stage_count(WPLAN, 0, 2), 4);
    expect_int("wallace stage 1 column 13 half adders", plan_get(WPLAN, 0, 13, 2), 0);

    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      for (int j = 0; j < 8; j++) pp[j] = a & {8{b[j]}};
      #1;
      checks++;
      if (17'(w0) + 17'(w1) != 17'(16'(a) * 16'(b))) begin
        failures++;
        if (failures < 20) $display("FAIL wallace %0d * %0d: rows %h + %h", a, b, w0, w1);
      end
      checks++;
      if (17'(d0) + 17'(d1) != 17'(16'(a) * 16'(b))) begin
        failures++;
        if (failures < 20) $display("FAIL dadda %0d * %0d: rows %h + %h", a, b, d0, d1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
