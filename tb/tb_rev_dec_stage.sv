// tb_rev_dec_stage: checks the decoder expansion stage at its default width
// (4 lines, as in the 3-to-8 decoder) and at 8 lines (as in the 4-to-16
// decoder). Every one-hot d and both select levels are applied, plus random
// non-one-hot d words, and y[2k+1] = sel.d[k], y[2k] = sel'.d[k], g = sel is
// checked.
module tb_rev_dec_stage;
  logic        sel;
  logic [3:0]  d4;
  logic [7:0]  y4;
  logic        g4;
  logic [7:0]  d8;
  logic [15:0] y8;
  logic        g8;
  int checks = 0, failures = 0;

  rev_dec_stage            dut4 (.sel(sel), .d(d4), .y(y4), .g(g4));
  rev_dec_stage #(.LINES(8)) dut8 (.sel(sel), .d(d8), .y(y8), .g(g8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [3:0] a4, input logic [7:0] a8, input logic s);
    logic [7:0]  e4;
    logic [15:0] e8;
    d4 = a4; d8 = a8; sel = s;
    #1;
    for (int k = 0; k < 4; k++) begin
      e4[2*k+1] = s & a4[k];
      e4[2*k]   = ~s & a4[k];
    end
    for (int k = 0; k < 8; k++) begin
      e8[2*k+1] = s & a8[k];
      e8[2*k]   = ~s & a8[k];
    end
    checks++;
    if (y4 !== e4 || g4 !== s) begin
      failures++;
      $display("FAIL 4-line sel=%b d=%b y=%b exp=%b g=%b", s, a4, y4, e4, g4);
    end
    checks++;
    if (y8 !== e8 || g8 !== s) begin
      failures++;
      $display("FAIL 8-line sel=%b d=%b y=%b exp=%b g=%b", s, a8, y8, e8, g8);
    end
  endtask

  initial begin
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < 8; k++)
        check(4'(1 << (k % 4)), 8'(1 << k), 1'(s));
    for (int t = 0; t < 50; t++)
      check(4'($urandom), 8'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
