// dadda_mult4_tb: self-check of the 4 x 4 Dadda multiplier. All 256 operand
// pairs are applied.
// Every product is compared with the reference a * b worked out by the
// testbench; the cases where the top product bit is set (the final carry
// reaches bit 2N-1) are counted and must occur.
module dadda_mult4_tb;
  logic [3:0] a4, b4;
  logic [7:0] p4;
  int checks = 0, failures = 0;
  int top_bit_hits = 0;

  dadda_mult4 dut4 (.a(a4), .b(b4), .p(p4));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if (p4 != 8'(a4) * 8'(b4)) begin
        failures++;
        if (failures < 20) $display("FAIL N=4 %0d * %0d -> %0d", a4, b4, p4);
      end
      if (p4[7]) top_bit_hits++;
    end
    checks++;
    if (top_bit_hits == 0) begin
      failures++;
      $display("FAIL top product bit never set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
