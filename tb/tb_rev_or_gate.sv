// tb_rev_or_gate: exhaustive check of the Fredkin-based OR gate
// (Q = x+y, R = x'+y, P = x).
module tb_rev_or_gate;
  logic x, y, p, q, r;
  int checks = 0, failures = 0;

  rev_or_gate dut (.x(x), .y(y), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x, y} = 2'(v);
      #1;
      checks++;
      if (q !== (x | y)) begin
        failures++;
        $display("FAIL OR x=%b y=%b got %b", x, y, q);
      end
      checks++;
      if (r !== (~x | y) || p !== x) begin
        failures++;
        $display("FAIL garbage x=%b y=%b p=%b r=%b", x, y, p, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
