// tb_rev_or_n: exhaustive check of the reversible OR chain at its default
// two inputs and at nine inputs (segment C's minterm count), against the
// reduction OR of the inputs.
module tb_rev_or_n;
  logic [1:0]  x2;
  logic        y2;
  logic [1:0]  g2;
  logic [8:0]  x9;
  logic        y9;
  logic [15:0] g9;
  int checks = 0, failures = 0;

  rev_or_n            dut2 (.x(x2), .y(y2), .g(g2));
  rev_or_n #(.N(9))   dut9 (.x(x9), .y(y9), .g(g9));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      x9 = 9'(v);
      x2 = 2'(v);
      #1;
      checks++;
      if (y9 !== (x9 != 0)) begin
        failures++;
        $display("FAIL 9-input x=%b y=%b", x9, y9);
      end
      if (v < 4) begin
        checks++;
        if (y2 !== (x2 != 0) || g2 !== {~x2[0] | x2[1], x2[0]}) begin
          failures++;
          $display("FAIL 2-input x=%b y=%b g=%b", x2, y2, g2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
