// rev_dec_stage: one expansion stage of the reversible decoder tree.
//
// Takes the LINES one-hot outputs d[] of an n-to-2^n decoder and a further,
// less significant select bit sel, and produces 2*LINES one-hot outputs with
// one Fredkin gate per line (inputs sel, 0, d[k]):
//   y[2k+1] = Q = sel.d[k]
//   y[2k]   = R = sel'.d[k]
// The select bit is not fanned out: it enters gate 0 and travels from each
// gate's P output to the next gate's A input; the last gate's P is the single
// garbage output g. A 2-to-4 decoder followed by a 4-gate stage is a 3-to-8
// decoder and a 3-to-8 decoder followed by an 8-gate stage a 4-to-16 decoder,
// as the document generalises; the chaining of sel is this design's reading of
// how the select bit reaches every gate. Purely combinational, no clock.
module rev_dec_stage #(
  parameter int unsigned LINES = 4
) (
  input  logic                 sel,
  input  logic [LINES-1:0]     d,
  output logic [2*LINES-1:0]   y,
  output logic                 g
);

  logic [LINES:0] sel_chain;

  assign sel_chain[0] = sel;

  for (genvar k = 0; k < LINES; k++) begin : g_gate
    fredkin_gate u_fg (
      .a (sel_chain[k]),
      .b (1'b0),
      .c (d[k]),
      .p (sel_chain[k+1]),
      .q (y[2*k+1]),
      .r (y[2*k])
    );
  end

  assign g = sel_chain[LINES];

endmodule
