// pair_mem_ns: shared (triangular) synaptic memory of one pair of clusters
// (j, g) with j < g, organised for neuron-serial communication.
//
// Each connection between neuron a of cluster j and neuron b of cluster g is
// stored once (WEIGHT(a,b)) and read by both clusters. The L x L weights live
// in L flip-flop rings of L cells with
//     RING(M, N) = WEIGHT((M + N) mod L, N)
// i.e. ring M holds the M-th wrapped diagonal. At cycle t of a revolution
// (t = 0 .. L-1, t shifts done) every cluster broadcasts its neuron t, and
//   * cell 0 of ring M holds WEIGHT((M+t) mod L, t): the connection between
//     cluster j's neuron (M+t) mod L and the broadcast neuron t of cluster g;
//   * cell s of ring (L-s) mod L holds WEIGHT(t, (s+t) mod L): the connection
//     between the broadcast neuron t of cluster j and cluster g's neuron
//     (s+t) mod L.
// Both clusters therefore read fixed cells. Their local neuron index moves
// by one each cycle, and each cluster keeps its neuron values and vote
// accumulators in rings that rotate the same way, so slot s of every
// rotating vector always belongs to neuron (s+t) mod L. `row_w[s]` and
// `col_w[s]` are the weights for slot s of cluster j and of cluster g.
//
// Learning is a read-modify-write over one revolution with `store` high:
// the word leaving cell 0 of ring M re-enters the ring ORed with
// row_v[M] & col_b, where row_v is cluster j's rotating one-hot selection
// (slot M = its neuron (M+t) mod L) and col_b is cluster g's broadcast bit
// (its neuron t). So WEIGHT(a,b) is set exactly when neuron a of j and
// neuron b of g are both selected, and earlier cliques are kept.
//
// The ring organisation and Eq. (11) mapping follow the document; the fixed
// read cell used by the higher-numbered cluster and the OR-based learning
// input are derived for this design. Timing: outputs are register outputs;
// one revolution (learning or one retrieving iteration) is L cycles of
// `valid`, after which the rings are back in their initial state.
module pair_mem_ns #(
  parameter int unsigned L = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic         store,
  input  logic [L-1:0] row_v,
  input  logic         col_b,
  output logic [L-1:0] row_w,
  output logic [L-1:0] col_w
);

  logic [L-1:0][L-1:0] cells;   // cells[M][N]: ring M, cell N

  for (genvar m = 0; m < L; m++) begin : g_ring
    logic [L-1:0] ring_cells;
    logic         dout;
    logic         din;

    assign din = dout | (row_v[m] & col_b);

    ff_ring #(.DEPTH(L), .WIDTH(1)) u_ring (
      .clk   (clk),
      .rst_n (rst_n),
      .valid (valid),
      .store (store),
      .din   (din),
      .cells (ring_cells),
      .dout  (dout)
    );

    assign cells[m] = ring_cells;
  end

  for (genvar s = 0; s < L; s++) begin : g_tap
    assign row_w[s] = cells[s][0];
    assign col_w[s] = cells[(L - s) % L][s];
  end

endmodule
