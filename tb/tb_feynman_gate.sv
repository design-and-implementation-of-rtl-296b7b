// tb_feynman_gate: exhaustive check of the Feynman gate against its truth
// table (P = A, Q = A xor B), the copy case (B = 0 gives Q = A) and
// self-inversion through a second gate.
module tb_feynman_gate;
  logic a, b, p, q, p2, q2;
  int checks = 0, failures = 0;
  // Expected {P,Q} for inputs {A,B} = 00, 01, 10, 11.
  localparam logic [1:0] TABLE [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  feynman_gate dut  (.a(a), .b(b), .p(p),  .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({p, q} !== TABLE[v]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", {a, b}, {p, q}, TABLE[v]);
      end
      checks++;
      if ({p2, q2} !== {a, b}) begin
        failures++;
        $display("FAIL not self-inverse for %b", {a, b});
      end
      if (!b) begin
        checks++;
        if (!(p === a && q === a)) begin
          failures++;
          $display("FAIL copy of %b gave %b", a, {p, q});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
