// cluster_cs: one cluster of L binary neurons for cluster-serial operation.
//
// In cluster-based serialization the clusters take turns: during cycle t of
// a revolution of C cycles cluster t puts all L neuron values on the shared
// bus (`turn` high for that cluster) and every other cluster uses them.
//
// The cluster stores the weights of its neurons towards all distant neurons
// (square matrix, C-1 distant clusters) in flip-flop rings: for every pair
// (local neuron i, distant neuron index b) one ring of C-1 cells holding
// the weights towards neuron b of each distant cluster, in increasing
// cluster order with the cluster itself left out. The L*L rings share their
// controls and are built as one ring of L*L-bit words (bit i*L+b). The
// rings shift on every cycle of a revolution except the cluster's own turn,
// so cell 0 always holds the weights towards the cluster on the bus, and
// after a revolution they are back in their initial state.
//
//   load     : neuron register <= one-hot of the cluster's symbol (none if
//              erased); the vote accumulator is set to all ones.
//   learning (valid & store): the word leaving the ring is written back
//              ORed with (local selection x bus), so W(i, b of t) is set
//              when local neuron i and neuron b of cluster t are selected.
//   retrieve : on every cycle that is not the cluster's turn,
//              acc(i) &= (OR_b bus(b) & W(i,b)) | ~(OR_b bus(b)),
//              i.e. unanimous vote with transparency of an inactive
//              cluster. On `last` the neuron register takes acc unless the
//              cluster's symbol was given, and acc returns to all ones.
//
// Following the document: cluster-based serialization (C cycles per
// iteration), flip-flop rings with a store multiplexer and Valid, squared
// synaptic matrix organised per local neuron and distant neuron index with
// one cell per distant cluster, fully binary update. This design's choices:
// skipping the shift on the own turn to keep the ring aligned, the bus as
// an OR of the clusters' gated outputs, and holding clusters whose symbol
// is given. Timing: all state changes at the clock edge.
module cluster_cs
  import gbnn_pkg::*;
#(
  parameter int unsigned C     = 8,
  parameter int unsigned L     = 16,
  parameter int unsigned IDX   = 0,
  parameter int unsigned SYM_W = sym_w(L)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic               valid,
  input  logic               store,
  input  logic               retrieve,
  input  logic               last,
  input  logic               turn,
  input  logic [C*SYM_W-1:0] msg,
  input  logic [C-1:0]       known,
  input  logic [L-1:0]       bus_in,
  output logic [L-1:0]       v,
  output logic [L-1:0]       bus_out
);

  localparam int unsigned DEPTH = (C > 1) ? C - 1 : 1;

  logic [L-1:0]       sel;
  logic [L*L-1:0]     w_out, w_in;
  logic [L-1:0]       acc, acc_nx;
  logic               hold;
  logic               listen;

  neuron_select #(.C(C), .L(L), .IDX(IDX), .SYM_W(SYM_W)) u_sel (
    .msg   (msg),
    .known (known[IDX]),
    .sel   (sel)
  );

  assign listen = valid && !turn;

  // Learning input: read-modify-write of the word leaving the ring.
  always_comb begin
    for (int unsigned i = 0; i < L; i++) begin
      for (int unsigned b = 0; b < L; b++) begin
        w_in[i*L + b] = w_out[i*L + b] | (v[i] & bus_in[b]);
      end
    end
  end

  ff_ring #(.DEPTH(DEPTH), .WIDTH(L*L)) u_ring (
    .clk   (clk),
    .rst_n (rst_n),
    .valid (listen),
    .store (store),
    .din   (w_in),
    .cells (),
    .dout  (w_out)
  );

  // Unanimous vote with transparency, one distant cluster per cycle.
  always_comb begin
    acc_nx = acc;
    if (listen && retrieve) begin
      for (int unsigned i = 0; i < L; i++) begin
        acc_nx[i] = acc[i] & ((|(bus_in & w_out[i*L +: L])) | ~(|bus_in));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v    <= '0;
      acc  <= '1;
      hold <= 1'b0;
    end else if (load) begin
      v    <= sel;
      acc  <= '1;
      hold <= known[IDX];
    end else if (valid && retrieve) begin
      if (last) begin
        acc <= '1;
        if (!hold) v <= acc_nx;
      end else begin
        acc <= acc_nx;
      end
    end
  end

  assign bus_out = turn ? v : '0;

endmodule
