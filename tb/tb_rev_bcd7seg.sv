// tb_rev_bcd7seg: end-to-end test of the reversible BCD to seven segment
// decoder.
//
// Two instances are driven with every 4-bit code: one at the default
// (common-cathode, segment lit = 1) and one built for a common-anode display
// (segment lit = 0). Expected patterns are written out digit by digit below
// from the segment sums, not taken from the design's package. Codes 10..15
// must blank the display. The test counts how often each behaviour occurred
// (digit shown on each polarity, blanking on each polarity) and counts a
// failure for one that never did.
module tb_rev_bcd7seg;
  logic [3:0] i;
  logic [6:0] seg_k;   // {G,F,E,D,C,B,A} of the common-cathode instance
  logic [6:0] seg_a;   // {G,F,E,D,C,B,A} of the common-anode instance
  int checks = 0, failures = 0;
  int n_digit_k = 0, n_digit_a = 0, n_blank_k = 0, n_blank_a = 0;

  // {G,F,E,D,C,B,A} for digits 0..9, lit = 1. Digit 6 has no top bar (A) and
  // digit 9 no bottom bar (D).
  localparam logic [6:0] DIGIT [10] = '{
    7'b0111111,  // 0
    7'b0000110,  // 1
    7'b1011011,  // 2
    7'b1001111,  // 3
    7'b1100110,  // 4
    7'b1101101,  // 5
    7'b1111100,  // 6
    7'b0000111,  // 7
    7'b1111111,  // 8
    7'b1100111   // 9
  };

  rev_bcd7seg dut_k (
    .i(i), .a(seg_k[0]), .b(seg_k[1]), .c(seg_k[2]), .d(seg_k[3]),
    .e(seg_k[4]), .f(seg_k[5]), .g(seg_k[6])
  );

  rev_bcd7seg #(.COMMON_ANODE(1'b1)) dut_a (
    .i(i), .a(seg_a[0]), .b(seg_a[1]), .c(seg_a[2]), .d(seg_a[3]),
    .e(seg_a[4]), .f(seg_a[5]), .g(seg_a[6])
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] exp;
    for (int pass = 0; pass < 2; pass++) begin
      for (int v = 0; v < 16; v++) begin
        // second pass walks the codes downwards
        i = pass == 0 ? 4'(v) : 4'(15 - v);
        #10;
        exp = (i < 10) ? DIGIT[i] : 7'b0000000;
        checks++;
        if (seg_k !== exp) begin
          failures++;
          $display("FAIL common-cathode i=%0d seg=%b exp=%b", i, seg_k, exp);
        end else if (i < 10) n_digit_k++;
        else n_blank_k++;
        checks++;
        if (seg_a !== ~exp) begin
          failures++;
          $display("FAIL common-anode i=%0d seg=%b exp=%b", i, seg_a, ~exp);
        end else if (i < 10) n_digit_a++;
        else n_blank_a++;
      end
    end
    $display("digits shown: cathode %0d anode %0d; blanked codes: cathode %0d anode %0d",
             n_digit_k, n_digit_a, n_blank_k, n_blank_a);
    if (n_digit_k == 0) begin failures++; $display("FAIL no digit shown, common cathode"); end
    if (n_digit_a == 0) begin failures++; $display("FAIL no digit shown, common anode"); end
    if (n_blank_k == 0) begin failures++; $display("FAIL no code blanked, common cathode"); end
    if (n_blank_a == 0) begin failures++; $display("FAIL no code blanked, common anode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
