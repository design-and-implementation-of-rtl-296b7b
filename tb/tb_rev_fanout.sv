// tb_rev_fanout: checks that every copy equals the source line, for the
// default two copies, for seven copies (the largest fan-out in the decoder,
// minterm 8) and for a single copy.
module tb_rev_fanout;
  logic       a;
  logic [1:0] y2;
  logic [6:0] y7;
  logic [0:0] y1;
  int checks = 0, failures = 0;

  rev_fanout                dut2 (.a(a), .y(y2));
  rev_fanout #(.COPIES(7))  dut7 (.a(a), .y(y7));
  rev_fanout #(.COPIES(1))  dut1 (.a(a), .y(y1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      a = 1'(r);
      #1;
      checks++;
      if (y2 !== {2{a}}) begin failures++; $display("FAIL 2 copies a=%b y=%b", a, y2); end
      checks++;
      if (y7 !== {7{a}}) begin failures++; $display("FAIL 7 copies a=%b y=%b", a, y7); end
      checks++;
      if (y1 !== a)      begin failures++; $display("FAIL 1 copy a=%b y=%b", a, y1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
