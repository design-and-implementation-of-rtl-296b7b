// rev_and_gate: two-input AND built from one Fredkin gate with C tied to 0.
//
//   P = x        (garbage)
//   Q = x'y      (garbage of the AND, but useful: the 2-to-4 decoder uses it)
//   R = xy       (the AND)
//
// The configuration (inputs x, y, 0 and the AND on R) follows the document's
// reversible AND gate; quantum cost 5. Purely combinational, no clock.
module rev_and_gate (
  input  logic x,
  input  logic y,
  output logic p,
  output logic q,
  output logic r
);

  fredkin_gate u_fg (
    .a (x),
    .b (y),
    .c (1'b0),
    .p (p),
    .q (q),
    .r (r)
  );

endmodule
