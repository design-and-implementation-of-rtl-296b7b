// rev_not_gate: 1x1 reversible NOT gate, P = A'.
//
// Used only when the decoder is built for a common-anode display, where every
// segment is lit by a low level and the common-cathode outputs are inverted.
// Function follows the document. Purely combinational, no clock.
module rev_not_gate (
  input  logic a,
  output logic p
);

  assign p = ~a;

endmodule
