// tb_rev_not_gate: checks both inputs of the reversible NOT gate.
module tb_rev_not_gate;
  logic a, p;
  int checks = 0, failures = 0;

  rev_not_gate dut (.a(a), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b0; #1; checks++; if (p !== 1'b1) begin failures++; $display("FAIL NOT 0"); end
    a = 1'b1; #1; checks++; if (p !== 1'b0) begin failures++; $display("FAIL NOT 1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
