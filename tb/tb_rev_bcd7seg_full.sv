// tb_rev_bcd7seg_full: the decoder at its default configuration taken through
// the BCD sequence 0000..1001, one digit every 100 time units, as a display would be
// stepped through the ten digits, then through the six non-BCD codes.
// Each output is compared with the expected segment pattern (lit = 1).
module tb_rev_bcd7seg_full;
  logic [3:0] i;
  logic a, b, c, d, e, f, g;
  int checks = 0, failures = 0;

  // {G,F,E,D,C,B,A} for digits 0..9.
  localparam logic [6:0] DIGIT [10] = '{
    7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7C, 7'h07, 7'h7F, 7'h67
  };

  rev_bcd7seg dut (.i(i), .a(a), .b(b), .c(c), .d(d), .e(e), .f(f), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] exp;
    for (int v = 0; v < 16; v++) begin
      i = 4'(v);
      #100;
      exp = (v < 10) ? DIGIT[v] : 7'h00;
      checks++;
      if ({g, f, e, d, c, b, a} !== exp) begin
        failures++;
        $display("FAIL i=%b seg=%b exp=%b", i, {g, f, e, d, c, b, a}, exp);
      end else if (v < 10) begin
        $display("i=%b shows digit %0d (gfedcba=%b)", i, v, {g, f, e, d, c, b, a});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
