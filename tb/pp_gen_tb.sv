// pp_gen_tb: self-check of partial-product generation. For the default 8-bit
// instance and a 4-bit instance it applies random and corner operands and
// checks every bit pp[j][i] against a[i] & b[j], and that the weighted sum of
// all partial products equals a * b.
module pp_gen_tb;
  logic [7:0] a8, b8;
  logic [7:0] pp8 [8];
  logic [3:0] a4, b4;
  logic [3:0] pp4 [4];
  int checks = 0, failures = 0;

  pp_gen              dut8 (.a(a8), .b(b8), .pp(pp8));
  pp_gen #(.N(4))     dut4 (.a(a4), .b(b4), .pp(pp4));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8();
    logic [15:0] total;
    total = '0;
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (pp8[j][i] !== (a8[i] & b8[j])) begin
          failures++;
          $display("FAIL N=8 a=%h b=%h pp[%0d][%0d]=%0b", a8, b8, j, i, pp8[j][i]);
        end
        total += 16'(pp8[j][i]) << (i + j);
      end
    checks++;
    if (total != 16'(a8) * 16'(b8)) begin
      failures++;
      $display("FAIL N=8 a=%h b=%h weighted sum %h", a8, b8, total);
    end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      a8 = (v < 4) ? {8{v[0]}} : 8'($urandom);
      b8 = (v < 4) ? {8{v[1]}} : 8'($urandom);
      #1;
      check8();
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (pp4[j][i] !== (a4[i] & b4[j])) begin
            failures++;
            $display("FAIL N=4 a=%h b=%h pp[%0d][%0d]=%0b", a4, b4, j, i, pp4[j][i]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
