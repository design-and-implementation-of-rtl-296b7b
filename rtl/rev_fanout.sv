// rev_fanout: reversible fan-out, COPIES copies of one line.
//
// Reversible logic forbids fan-out, so a line that must drive several gates is
// duplicated with Feynman gates whose B input is tied to 0 (P = A, Q = A).
// The gates form a chain: gate k copies the line onto its Q output, y[k], and
// passes the line on from its P output to gate k+1; the last P is y[COPIES-1].
// COPIES-1 Feynman gates make COPIES copies, with no garbage output. With
// COPIES = 1 no gate is needed. Duplicating with Feynman gates follows the
// document; the chain arrangement is this design's choice.
// Purely combinational, no clock.
module rev_fanout #(
  parameter int unsigned COPIES = 2
) (
  input  logic              a,
  output logic [COPIES-1:0] y
);

  if (COPIES == 1) begin : g_wire
    assign y[0] = a;
  end else begin : g_chain
    logic [COPIES-1:0] line;   // the line between consecutive gates

    assign line[0] = a;

    for (genvar k = 0; k < COPIES - 1; k++) begin : g_gate
      feynman_gate u_fy (
        .a (line[k]),
        .b (1'b0),
        .p (line[k+1]),
        .q (y[k])
      );
    end

    assign y[COPIES-1] = line[COPIES-1];
  end

endmodule
