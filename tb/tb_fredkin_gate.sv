// tb_fredkin_gate: exhaustive check of the Fredkin gate.
// For all 8 inputs it compares (P,Q,R) with a controlled swap (A = 1 swaps B
// and C), checks that no two inputs give the same output (bijection) and that
// a second gate fed with the outputs gives back the inputs (self-inverse).
module tb_fredkin_gate;
  logic a, b, c, p, q, r, p2, q2, r2;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  fredkin_gate dut  (.a(a),  .b(b),  .c(c),  .p(p),  .q(q),  .r(r));
  fredkin_gate dut2 (.a(p),  .b(q),  .c(r),  .p(p2), .q(q2), .r(r2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      exp = a ? {a, c, b} : {a, b, c};
      checks++;
      if ({p, q, r} !== exp) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", {a, b, c}, {p, q, r}, exp);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b repeated", {p, q, r});
      end
      seen[{p, q, r}] = 1'b1;
      checks++;
      if ({p2, q2, r2} !== {a, b, c}) begin
        failures++;
        $display("FAIL not self-inverse for %b", {a, b, c});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
