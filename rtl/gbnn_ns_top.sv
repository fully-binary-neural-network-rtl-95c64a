// gbnn_ns_top: fully binary clustered associative memory (GBNN) with
// triangular synaptic storage and neuron-serial communication.
//
// The memory has C clusters of L binary neurons. A message is C symbols of
// SYM_W bits; symbol j selects one neuron of cluster j. Learning a message
// records a clique: every pair of selected neurons becomes connected.
// Retrieving presents a message with some symbols erased (`known` bit low);
// the network switches on, in each cluster, the neurons that every other
// active cluster supports, repeating this for ITER iterations, and the
// active neurons of each cluster are the answer.
//
// Structure:
//   * one cluster_ns per cluster (decoding, rotating neuron register,
//     computing module);
//   * one pair_mem_ns per unordered pair of clusters (j < g): each
//     connection weight is stored once and shared by both clusters;
//   * a serial broadcast network of C wires, `bcast[g]`, replacing a
//     crossbar: at cycle t of an iteration every cluster sends neuron t;
//   * gbnn_ctrl, which sequences learning (L cycles) and retrieving
//     (ITER iterations of L cycles).
// Cluster j reads the weights towards a higher-numbered cluster g from the
// row taps of pair (j,g) and towards a lower-numbered one from the column
// taps of pair (g,j); this is fixed wiring.
//
// Interface: pulse `start` with `op` (OP_LEARN / OP_RETRIEVE), `msg` and
// `known` while `ready` is high. `done` pulses L clock edges (learning) or
// ITER*L clock edges (retrieving) after the edge that accepted `start`. After a retrieval `neurons[j]` holds the
// neuron values of cluster j, `sym_out` the index of the lowest active
// neuron of each cluster and `ambiguous[j]` is high unless exactly one
// neuron of cluster j is active. These outputs are valid while `ready` is
// high and until the next `start`.
//
// Following the document: fully binary update with transparency, shared
// (triangular) weights, flip-flop rings with the RING(M,N) mapping,
// neuron-based serialization, four iterations, default C=8, L=16 (the
// network size used for the FPGA comparison). This design's own choices:
// the erasure flags, the symbol layout, the handshake and the
// sym_out/ambiguous summary.
module gbnn_ns_top
  import gbnn_pkg::*;
#(
  parameter int unsigned C     = 8,
  parameter int unsigned L     = 16,
  parameter int unsigned ITER  = 4,
  parameter int unsigned SYM_W = sym_w(L)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  gbnn_op_e            op,
  input  logic [C*SYM_W-1:0]  msg,
  input  logic [C-1:0]        known,
  output logic                ready,
  output logic                done,
  output logic [C-1:0][L-1:0] neurons,
  output logic [C*SYM_W-1:0]  sym_out,
  output logic [C-1:0]        ambiguous
);

  logic load, valid, store, retrieve, last;

  logic [C-1:0]        bcast;     // serial broadcast network
  logic [C-1:0][L-1:0] v_slots;
  logic [L-1:0]        row_w [C][C];
  logic [L-1:0]        col_w [C][C];

  gbnn_ctrl #(.STEPS(L), .ITER(ITER)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .op       (op),
    .ready    (ready),
    .load     (load),
    .valid    (valid),
    .store    (store),
    .retrieve (retrieve),
    .last     (last),
    .step     (),
    .done     (done)
  );

  // Shared synaptic memories, one per pair j < g.
  for (genvar j = 0; j < C; j++) begin : g_row
    for (genvar g = 0; g < C; g++) begin : g_col
      if (j < g) begin : g_pair
        pair_mem_ns #(.L(L)) u_pair (
          .clk   (clk),
          .rst_n (rst_n),
          .valid (valid),
          .store (store),
          .row_v (v_slots[j]),
          .col_b (bcast[g]),
          .row_w (row_w[j][g]),
          .col_w (col_w[j][g])
        );
      end else begin : g_none
        assign row_w[j][g] = '0;
        assign col_w[j][g] = '0;
      end
    end
  end

  for (genvar j = 0; j < C; j++) begin : g_cluster
    logic [C-1:0][L-1:0] w;

    for (genvar g = 0; g < C; g++) begin : g_w
      if (g > j) begin : g_hi
        assign w[g] = row_w[j][g];
      end else if (g < j) begin : g_lo
        assign w[g] = col_w[g][j];
      end else begin : g_self
        assign w[g] = '0;
      end
    end

    cluster_ns #(.C(C), .L(L), .IDX(j), .SYM_W(SYM_W)) u_cluster (
      .clk      (clk),
      .rst_n    (rst_n),
      .load     (load),
      .shift    (valid),
      .retrieve (retrieve),
      .last     (last),
      .msg      (msg),
      .known    (known),
      .bcast_in (bcast),
      .w        (w),
      .v_slots  (v_slots[j]),
      .bcast    (bcast[j])
    );
  end

  assign neurons = v_slots;

  // Answer summary: lowest active neuron and a flag unless exactly one.
  always_comb begin
    sym_out   = '0;
    ambiguous = '0;
    for (int unsigned j = 0; j < C; j++) begin
      logic [SYM_W-1:0] idx;
      idx = '0;
      for (int n = int'(L) - 1; n >= 0; n--) begin
        if (v_slots[j][n]) idx = SYM_W'(n);
      end
      sym_out[j*SYM_W +: SYM_W] = idx;
      ambiguous[j] = ($countones(v_slots[j]) != 1);
    end
  end

endmodule
