// rev_or_n: N-input OR as a chain of reversible Fredkin OR gates.
//
// Gate k (k = 0..N-2) ORs the running sum with x[k+1]; the running sum starts
// as x[0], travels on each gate's Q output, and the last Q is y. Each gate
// leaves two garbage outputs (P and R), collected in g: g[2k] = P and
// g[2k+1] = R of gate k. The segment outputs of the decoder are such sums of
// decoder minterms. The OR gate follows the document; arranging the gates as
// a chain is this design's choice. Purely combinational, no clock.
module rev_or_n #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0]                    x,
  output logic                            y,
  output logic [(N > 1 ? 2*(N-1) : 1)-1:0] g
);

  if (N == 1) begin : g_wire
    assign y    = x[0];
    assign g[0] = 1'b0;   // no gate, so no garbage: tie the placeholder bit
  end else begin : g_chain
    logic [N-1:0] sum;    // sum[k] = x[0] | ... | x[k]

    assign sum[0] = x[0];

    for (genvar k = 0; k < N - 1; k++) begin : g_gate
      rev_or_gate u_or (
        .x (sum[k]),
        .y (x[k+1]),
        .p (g[2*k]),
        .q (sum[k+1]),
        .r (g[2*k+1])
      );
    end

    assign y = sum[N-1];
  end

endmodule
