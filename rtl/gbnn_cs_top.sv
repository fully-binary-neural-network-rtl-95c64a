// gbnn_cs_top: fully binary clustered associative memory with cluster-based
// serialization.
//
// Same function and interface as gbnn_ns_top: C clusters of L binary
// neurons, learning records the clique of a message, retrieving completes a
// message with erased symbols by ITER iterations of the unanimous vote with
// transparency. Here one iteration takes C cycles: in cycle t cluster t
// drives its L neuron values onto a shared L-bit bus and all other clusters
// evaluate their vote towards it (cluster_cs). The bus is the OR of the
// clusters' outputs, each gated by its turn, which the controller's step
// counter gives (`step == j`).
//
// Interface: pulse `start` with `op`, `msg` and `known` while `ready` is
// high. `done` pulses C clock edges (learning) or ITER*C clock edges
// (retrieving) after the edge that accepted `start`. `neurons`, `sym_out`
// and `ambiguous` then hold the answer, as in gbnn_ns_top.
//
// Following the document: cluster-based serialization, flip-flop rings,
// fully binary update, four iterations. The document gives a shared
// (triangular) ring mapping for cluster-based serialization only for a
// three-cluster network, so this variant stores the square matrix, one copy
// of each weight per cluster, organised as the document draws it for
// square matrices. Default size C=8, L=16 as for gbnn_ns_top.
module gbnn_cs_top
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

  localparam int unsigned TW = (C > 1) ? $clog2(C) : 1;

  logic load, valid, store, retrieve, last;
  logic [TW-1:0] step;
  logic [C-1:0][L-1:0] bus_out;
  logic [L-1:0] bus;

  gbnn_ctrl #(.STEPS(C), .ITER(ITER)) u_ctrl (
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
    .step     (step),
    .done     (done)
  );

  // Shared cluster bus.
  always_comb begin
    bus = '0;
    for (int unsigned j = 0; j < C; j++) bus |= bus_out[j];
  end

  for (genvar j = 0; j < C; j++) begin : g_cluster
    cluster_cs #(.C(C), .L(L), .IDX(j), .SYM_W(SYM_W)) u_cluster (
      .clk      (clk),
      .rst_n    (rst_n),
      .load     (load),
      .valid    (valid),
      .store    (store),
      .retrieve (retrieve),
      .last     (last),
      .turn     (valid && (step == TW'(j))),
      .msg      (msg),
      .known    (known),
      .bus_in   (bus),
      .v        (neurons[j]),
      .bus_out  (bus_out[j])
    );
  end

  // Answer summary: lowest active neuron and a flag unless exactly one.
  always_comb begin
    sym_out   = '0;
    ambiguous = '0;
    for (int unsigned j = 0; j < C; j++) begin
      logic [SYM_W-1:0] idx;
      idx = '0;
      for (int n = int'(L) - 1; n >= 0; n--) begin
        if (neurons[j][n]) idx = SYM_W'(n);
      end
      sym_out[j*SYM_W +: SYM_W] = idx;
      ambiguous[j] = ($countones(neurons[j]) != 1);
    end
  end

endmodule
