// feynman_gate: 2x2 reversible Feynman (CNOT) gate.
//
//   P = A
//   Q = A xor B
//
// With B tied to 0 both outputs carry A, which is how the design copies a
// signal: fan-out is not allowed between reversible gates, so every extra
// load of a line gets its own Feynman copy. Equations follow the document;
// quantum cost 1. Purely combinational, no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule
