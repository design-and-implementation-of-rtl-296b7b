// rev_dec4to16: reversible 4-to-16 decoder.
//
// A reversible 3-to-8 decoder decodes in[3:1]; a stage of eight Fredkin gates
// then splits each of its outputs on in[0]. out[k] is high when in == k and
// en = 1; all outputs are low when en = 0. Construction (3-to-8 decoder
// followed by 8 Fredkin gates) follows the document. Fifteen Fredkin gates,
// four garbage outputs. An immediate assertion checks that the outputs are
// one-hot while enabled. Purely combinational, no clock.
module rev_dec4to16 (
  input  logic [3:0]  in,
  input  logic        en,
  output logic [15:0] out,
  output logic [3:0]  g     // garbage: g[2:0] from the 3-to-8 decoder, g[3] = in[0]
);

  logic [7:0] d8;

  rev_dec3to8 u_dec (
    .in  (in[3:1]),
    .en  (en),
    .out (d8),
    .g   (g[2:0])
  );

  rev_dec_stage #(.LINES(8)) u_stage (
    .sel (in[0]),
    .d   (d8),
    .y   (out),
    .g   (g[3])
  );

  always_comb begin
    if (en) assert ($onehot(out)) else $error("rev_dec4to16: outputs not one-hot");
    else    assert (out == '0)    else $error("rev_dec4to16: output high while disabled");
  end

endmodule
