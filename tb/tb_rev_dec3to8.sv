// tb_rev_dec3to8: exhaustive check of the reversible 3-to-8 decoder.
// With the enable high exactly output 'in' must be high; with it low all
// outputs must be low. The garbage outputs must carry the select bits, one
// each (the most significant bit leaves the first gate, in[0] the last).
module tb_rev_dec3to8;
  logic [2:0] in;
  logic       en;
  logic [7:0] out;
  logic [2:0] g;
  int checks = 0, failures = 0;

  rev_dec3to8 dut (.in(in), .en(en), .out(out), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    for (int v = 0; v < 16; v++) begin
      {en, in} = 4'(v);
      #1;
      exp = '0;
      if (en) exp[in] = 1'b1;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL en=%b in=%0d out=%b exp=%b", en, in, out, exp);
      end
      checks++;
      if (g !== {in[0], in[1], in[2]}) begin
        failures++;
        $display("FAIL garbage en=%b in=%b g=%b", en, in, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
