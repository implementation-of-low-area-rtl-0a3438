// array_mult_tb: self-check of the array multiplier. The default 8-bit
// multiplier and a 4-bit instance are checked exhaustively, a 16-bit instance
// with random operands.
// Every product is compared with the reference a * b worked out by the
// testbench; the cases where the top product bit is set (the final carry
// reaches bit 2N-1) are counted and must occur.
module array_mult_tb;
  logic [7:0] a8, b8;
  logic [15:0] p8;
  logic [3:0] a4, b4;
  logic [7:0] p4;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  int checks = 0, failures = 0;
  int top_bit_hits = 0;

  array_mult dut8 (.a(a8), .b(b8), .p(p8));
  array_mult #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));
  array_mult #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      checks++;
      if (p8 != 16'(a8) * 16'(b8)) begin
        failures++;
        if (failures < 20) $display("FAIL N=8 %0d * %0d -> %0d", a8, b8, p8);
      end
      if (p8[15]) top_bit_hits++;
    end
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
    for (int v = 0; v < 20000; v++) begin
      a16 = (v == 0) ? '1 : 16'($urandom);
      b16 = (v == 0) ? '1 : 16'($urandom);
      #1;
      checks++;
      if (p16 != 32'(a16) * 32'(b16)) begin
        failures++;
        if (failures < 20) $display("FAIL N=16 %0d * %0d -> %0d", a16, b16, p16);
      end
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
