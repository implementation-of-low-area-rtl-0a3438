// multipliers_top_tb: end-to-end check of the whole design at its default
// size. Every one of the 65536 pairs of 8-bit operands is applied to the three
// 8-bit multipliers, and at the same time the 4-bit multipliers get operands
// taken from the same counter, so that all 256 pairs of 4-bit operands occur
// (each 256 times). Each of the six products is compared with a * b worked out
// by the testbench, and the three architectures of each width are also
// compared with one another. Finally the worked example 1011 x 1001 =
// 1100011 is applied to the 4-bit multipliers by name.
//
// Coverage counters, each of which must be non-zero at the end: a zero
// operand (every partial product 0), all-ones operands (every partial product
// 1, tallest columns full), and products whose top bit is set (the final
// carry-propagate addition carries into bit 2N-1), for each width.
module multipliers_top_tb;
  logic [3:0]  a4, b4;
  logic [7:0]  p_array4, p_wallace4, p_dadda4;
  logic [7:0]  a8, b8;
  logic [15:0] p_array8, p_wallace8, p_dadda8;
  int checks = 0, failures = 0;
  int zero_hits4 = 0, ones_hits4 = 0, top_hits4 = 0;
  int zero_hits8 = 0, ones_hits8 = 0, top_hits8 = 0;

  multipliers_top dut (
    .a4(a4), .b4(b4), .p_array4(p_array4), .p_wallace4(p_wallace4), .p_dadda4(p_dadda4),
    .a8(a8), .b8(b8), .p_array8(p_array8), .p_wallace8(p_wallace8), .p_dadda8(p_dadda8));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string name, input logic [15:0] got, input logic [15:0] want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", name, got, want);
    end
  endtask

  task automatic expect_seen(input string name, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL never exercised: %s", name);
    end else begin
      $display("exercised %0d times: %s", count, name);
    end
  endtask

  initial begin
    logic [15:0] want4, want8;
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      {a4, b4} = 8'(v) ^ 8'(v >> 8);
      #1;
      want4 = 16'(a4) * 16'(b4);
      want8 = 16'(a8) * 16'(b8);
      check("array 4-bit",   16'(p_array4),   want4);
      check("wallace 4-bit", 16'(p_wallace4), want4);
      check("dadda 4-bit",   16'(p_dadda4),   want4);
      check("array 8-bit",   p_array8,   want8);
      check("wallace 8-bit", p_wallace8, want8);
      check("dadda 8-bit",   p_dadda8,   want8);
      check("4-bit architectures agree", 16'(p_wallace4 ^ p_dadda4 ^ p_array4), 16'(p_array4));
      check("8-bit architectures agree", p_wallace8 ^ p_dadda8 ^ p_array8, p_array8);
      if (a4 == 0 || b4 == 0)          zero_hits4++;
      if (a4 == '1 && b4 == '1)        ones_hits4++;
      if (p_dadda4[7])                 top_hits4++;
      if (a8 == 0 || b8 == 0)          zero_hits8++;
      if (a8 == '1 && b8 == '1)        ones_hits8++;
      if (p_dadda8[15])                top_hits8++;
    end
    // The worked example: 1011 x 1001 = 1100011.
    a4 = 4'b1011;
    b4 = 4'b1001;
    #1;
    check("example array",   16'(p_array4),   16'b1100011);
    check("example wallace", 16'(p_wallace4), 16'b1100011);
    check("example dadda",   16'(p_dadda4),   16'b1100011);
    expect_seen("4-bit zero operand", zero_hits4);
    expect_seen("4-bit all-ones operands", ones_hits4);
    expect_seen("4-bit carry into the top product bit", top_hits4);
    expect_seen("8-bit zero operand", zero_hits8);
    expect_seen("8-bit all-ones operands", ones_hits8);
    expect_seen("8-bit carry into the top product bit", top_hits8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
