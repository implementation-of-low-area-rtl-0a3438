// half_adder_tb: exhaustive self-check of the half adder. Applies all four
// input pairs and compares {carry, sum} with the arithmetic sum a + b.
module half_adder_tb;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({carry, sum} != 2'(a + b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> carry=%0b sum=%0b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
