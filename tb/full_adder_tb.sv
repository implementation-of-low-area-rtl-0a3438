// full_adder_tb: exhaustive self-check of the full adder. Applies all eight
// input combinations and compares {carry, sum} with a + b + cin.
module full_adder_tb;
  logic a, b, cin, sum, carry;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} != 2'(a + b + cin)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> carry=%0b sum=%0b", a, b, cin, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
