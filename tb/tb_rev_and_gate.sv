// tb_rev_and_gate: exhaustive check of the Fredkin-based AND gate
// (R = xy, Q = x'y, P = x).
module tb_rev_and_gate;
  logic x, y, p, q, r;
  int checks = 0, failures = 0;

  rev_and_gate dut (.x(x), .y(y), .p(p), .q(q), .r(r));

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
      if (r !== (x & y)) begin
        failures++;
        $display("FAIL AND x=%b y=%b got %b", x, y, r);
      end
      checks++;
      if (q !== (~x & y) || p !== x) begin
        failures++;
        $display("FAIL garbage x=%b y=%b p=%b q=%b", x, y, p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
