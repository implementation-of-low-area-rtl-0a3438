// rca_tb: self-check of the ripple-carry adder. The default 16-bit adder gets
// random operands plus the operands that ripple a carry through every bit; a
// 4-bit instance is checked exhaustively. Reference: {cout, sum} = x + y.
module rca_tb;
  logic [15:0] x16, y16, s16;
  logic        c16;
  logic [3:0]  x4, y4, s4;
  logic        c4;
  int checks = 0, failures = 0;
  int full_ripples = 0;

  rca           dut16 (.x(x16), .y(y16), .sum(s16), .cout(c16));
  rca #(.W(4))  dut4  (.x(x4), .y(y4), .sum(s4), .cout(c4));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      case (v)
        0:       begin x16 = 16'hFFFF; y16 = 16'h0001; end
        1:       begin x16 = 16'h7FFF; y16 = 16'h0001; end
        2:       begin x16 = 16'hFFFF; y16 = 16'hFFFF; end
        3:       begin x16 = 16'hAAAA; y16 = 16'h5555; end
        default: begin x16 = 16'($urandom); y16 = 16'($urandom); end
      endcase
      {x4, y4} = 8'(v);
      #1;
      checks++;
      if ({c16, s16} != 17'(x16) + 17'(y16)) begin
        failures++;
        $display("FAIL W=16 %h + %h -> %0b %h", x16, y16, c16, s16);
      end
      if (x16 == 16'hFFFF && y16 == 16'h0001 && s16 == 16'h0 && c16) full_ripples++;
      checks++;
      if ({c4, s4} != 5'(x4) + 5'(y4)) begin
        failures++;
        $display("FAIL W=4 %h + %h -> %0b %h", x4, y4, c4, s4);
      end
    end
    checks++;
    if (full_ripples == 0) begin
      failures++;
      $display("FAIL carry never rippled through all bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
