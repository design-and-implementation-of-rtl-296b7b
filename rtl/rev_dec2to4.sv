// rev_dec2to4: reversible 2-to-4 decoder made of three Fredkin gates.
//
//   gate 1 (AND form, inputs in1, en, 0): Q = in1'.en (INT), R = in1.en, P = in1 -> g[0]
//   gate 2 (inputs in0, 0, INT):          Q = out[1] = in1'.in0.en
//                                         R = out[0] = in1'.in0'.en, P = in0 -> gate 3
//   gate 3 (inputs in0, 0, in1.en):       Q = out[3] = in1.in0.en
//                                         R = out[2] = in1.in0'.en, P = in0 -> g[1]
//
// in1 is the more significant select bit. With en = 1 exactly one output is
// high; with en = 0 all four are low. The three constant 0 inputs, the gate
// wiring and the two garbage outputs follow the document's circuit; the enable
// is the line the document ties to 1. Quantum cost 3 x 5 = 15.
// Purely combinational, no clock.
module rev_dec2to4 (
  input  logic       in1,
  input  logic       in0,
  input  logic       en,
  output logic [3:0] out,
  output logic [1:0] g     // garbage outputs G1 (= in1) and G2 (= in0)
);

  logic int_n;    // in1'.en
  logic in1_en;   // in1.en
  logic in0_p;    // in0 passed from gate 2 to gate 3

  rev_and_gate u_fg1 (
    .x (in1),
    .y (en),
    .p (g[0]),
    .q (int_n),
    .r (in1_en)
  );

  fredkin_gate u_fg2 (
    .a (in0),
    .b (1'b0),
    .c (int_n),
    .p (in0_p),
    .q (out[1]),
    .r (out[0])
  );

  fredkin_gate u_fg3 (
    .a (in0_p),
    .b (1'b0),
    .c (in1_en),
    .p (g[1]),
    .q (out[3]),
    .r (out[2])
  );

endmodule
