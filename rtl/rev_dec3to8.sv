// rev_dec3to8: reversible 3-to-8 decoder.
//
// A reversible 2-to-4 decoder decodes in[2:1]; a stage of four Fredkin gates
// then splits each of its outputs on in[0]. out[k] is high when in == k and
// en = 1; all outputs are low when en = 0. Construction (2-to-4 decoder
// followed by 4 Fredkin gates) follows the document. Seven Fredkin gates,
// three garbage outputs. Purely combinational, no clock.
module rev_dec3to8 (
  input  logic [2:0] in,
  input  logic       en,
  output logic [7:0] out,
  output logic [2:0] g     // garbage: g[1:0] from the 2-to-4 decoder, g[2] = in[0]
);

  logic [3:0] d4;

  rev_dec2to4 u_dec (
    .in1 (in[2]),
    .in0 (in[1]),
    .en  (en),
    .out (d4),
    .g   (g[1:0])
  );

  rev_dec_stage #(.LINES(4)) u_stage (
    .sel (in[0]),
    .d   (d4),
    .y   (out),
    .g   (g[2])
  );

endmodule
