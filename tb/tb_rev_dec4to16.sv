// tb_rev_dec4to16: exhaustive check of the reversible 4-to-16 decoder.
// With the enable high exactly output 'in' must be high; with it low all
// outputs must be low. The garbage outputs must carry the select bits, one
// each (the most significant bit leaves the first gate, in[0] the last).
module tb_rev_dec4to16;
  logic [3:0] in;
  logic       en;
  logic [15:0] out;
  logic [3:0] g;
  int checks = 0, failures = 0;

  rev_dec4to16 dut (.in(in), .en(en), .out(out), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp;
    for (int v = 0; v < 32; v++) begin
      {en, in} = 5'(v);
      #1;
      exp = '0;
      if (en) exp[in] = 1'b1;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL en=%b in=%0d out=%b exp=%b", en, in, out, exp);
      end
      checks++;
      if (g !== {in[0], in[1], in[2], in[3]}) begin
        failures++;
        $display("FAIL garbage en=%b in=%b g=%b", en, in, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
