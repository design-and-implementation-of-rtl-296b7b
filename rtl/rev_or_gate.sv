// rev_or_gate: two-input OR built from one Fredkin gate with C tied to 1.
//
//   P = x        (garbage)
//   Q = x + y    (the OR)
//   R = x' + y   (garbage)
//
// The configuration (inputs x, y, 1 and the OR on Q) follows the document's
// reversible OR gate; quantum cost 5. Purely combinational, no clock.
module rev_or_gate (
  input  logic x,
  input  logic y,
  output logic p,
  output logic q,
  output logic r
);

  fredkin_gate u_fg (
    .a (x),
    .b (y),
    .c (1'b1),
    .p (p),
    .q (q),
    .r (r)
  );

endmodule
