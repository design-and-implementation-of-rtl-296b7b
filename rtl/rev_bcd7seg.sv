// rev_bcd7seg: BCD to seven segment display decoder built from reversible gates.
//
// The 4-bit BCD input I[3:0] goes into a reversible 4-to-16 decoder (Fredkin
// gates only, enable tied to 1), whose one-hot outputs are the 16 minterms of
// the input. Each segment is the OR of its minterms (see rev_seg7_pkg):
//
//   I --> rev_dec4to16 --> minterm m[k] --> rev_fanout (Feynman copies) -->
//         rev_or_n per segment (Fredkin OR chain) --> [rev_not_gate] --> A..G
//
// Because a reversible gate output may drive only one input, minterm k is
// copied once per segment that uses it (m0 feeds six segments, m8 all seven).
// Minterms 10..15 feed no segment, so codes 10..15 blank the display.
// The decoder-plus-minterm structure, the minterm sums and the segment
// letters follow the document. Fredkin gates used: 15 in the decoder and 40 in
// the OR chains; 37 Feynman gates make the minterm copies.
//
// COMMON_ANODE = 0 (default) drives a common-cathode display: a segment is lit
// by a 1, as in the document's truth table. COMMON_ANODE = 1 inverts every
// output through a reversible NOT gate for a common-anode display, where a
// segment is lit by a 0; the document describes that inversion but the
// parameter is this design's addition.
//
// The garbage outputs of the reversible gates, and minterms 10..15, are
// deliberately left unconnected at this level: in reversible logic they exist
// only to keep each gate a bijection and carry no result, so lint reports them
// as unused signals.
//
// Ports follow the document's block diagram: inputs I[3:0], outputs A..G.
// Purely combinational, no clock; outputs settle one decoder depth plus one OR
// chain after the input changes.
module rev_bcd7seg
  import rev_seg7_pkg::*;
#(
  parameter bit COMMON_ANODE = 1'b0
) (
  input  logic [3:0] i,
  output logic       a,
  output logic       b,
  output logic       c,
  output logic       d,
  output logic       e,
  output logic       f,
  output logic       g
);

  logic [NUM_MINTERM-1:0] m;          // decoder outputs = minterms of i
  logic [3:0]             dec_garbage;
  logic [NUM_SEG-1:0]     mcopy [NUM_MINTERM];  // mcopy[k][j]: copy j of m[k]
  seg7_t                  seg_hi;     // segments, lit = 1
  seg7_t                  seg_out;    // segments at the display's polarity

  rev_dec4to16 u_dec (
    .in  (i),
    .en  (1'b1),
    .out (m),
    .g   (dec_garbage)
  );

  // One fan-out per minterm used by at least one segment.
  for (genvar k = 0; k < NUM_MINTERM; k++) begin : g_minterm
    localparam int unsigned USES = minterm_uses(k);
    if (USES > 0) begin : g_used
      rev_fanout #(.COPIES(USES)) u_fan (
        .a (m[k]),
        .y (mcopy[k][USES-1:0])
      );
    end
    if (USES < NUM_SEG) begin : g_spare
      assign mcopy[k][NUM_SEG-1:USES] = '0;
    end
  end

  // One OR chain per segment over that segment's minterm copies.
  for (genvar s = 0; s < NUM_SEG; s++) begin : g_seg
    localparam int unsigned TERMS = seg_terms(s);
    logic [TERMS-1:0]  terms;
    logic [2*(TERMS-1)-1:0] or_garbage;

    for (genvar k = 0; k < NUM_MINTERM; k++) begin : g_term
      if (SEG_MINTERMS[s][k]) begin : g_in
        assign terms[term_pos(s, k)] = mcopy[k][copy_idx(s, k)];
      end
    end

    rev_or_n #(.N(TERMS)) u_or (
      .x (terms),
      .y (seg_hi[s]),
      .g (or_garbage)
    );

    if (COMMON_ANODE) begin : g_anode
      rev_not_gate u_not (
        .a (seg_hi[s]),
        .p (seg_out[s])
      );
    end else begin : g_cathode
      assign seg_out[s] = seg_hi[s];
    end
  end

  assign a = seg_out.a;
  assign b = seg_out.b;
  assign c = seg_out.c;
  assign d = seg_out.d;
  assign e = seg_out.e;
  assign f = seg_out.f;
  assign g = seg_out.g;

endmodule
