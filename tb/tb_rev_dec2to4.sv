// tb_rev_dec2to4: checks the reversible 2-to-4 decoder against its truth
// table for both enable levels, and that the garbage outputs carry the select
// inputs (so inputs can be recovered from outputs).
module tb_rev_dec2to4;
  logic       in1, in0, en;
  logic [3:0] out;
  logic [1:0] g;
  int checks = 0, failures = 0;
  // Outputs {Out3..Out0} for {In1,In0} = 00, 01, 10, 11 with the enable high.
  localparam logic [3:0] TABLE [4] = '{4'b0001, 4'b0010, 4'b0100, 4'b1000};

  rev_dec2to4 dut (.in1(in1), .in0(in0), .en(en), .out(out), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp;
    for (int v = 0; v < 8; v++) begin
      {en, in1, in0} = 3'(v);
      #1;
      exp = en ? TABLE[v % 4] : 4'b0000;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL en=%b in=%b%b out=%b exp=%b", en, in1, in0, out, exp);
      end
      checks++;
      if (g !== {in0, in1}) begin
        failures++;
        $display("FAIL garbage en=%b in=%b%b g=%b", en, in1, in0, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
