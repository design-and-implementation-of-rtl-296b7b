// fredkin_gate: 3x3 reversible Fredkin (controlled swap) gate.
//
//   P = A
//   Q = A'B xor AC
//   R = A'C xor AB
//
// With A = 0 the lines B and C pass straight to Q and R; with A = 1 they are
// swapped. The map from (A,B,C) to (P,Q,R) is a bijection and the gate is its
// own inverse. Equations and truth table follow the document; quantum cost 5.
// This is the building block of every decoder, AND and OR gate in the design.
// Purely combinational, no clock.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = (~a & b) ^ (a & c);
    r = (~a & c) ^ (a & b);
  end

endmodule
