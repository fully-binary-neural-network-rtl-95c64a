// cluster_ns: one cluster of L binary neurons for neuron-serial operation.
//
// The cluster holds its L neuron values in a rotating register (a flip-flop
// ring of L one-bit cells, shifted towards slot 0): at cycle t of a
// revolution slot s holds neuron (s+t) mod L, and slot 0 is broadcast to all
// other clusters, so the cluster sends neuron t at cycle t. After L shifts
// the register is back in neuron order.
//
//   load     : neuron values <= one-hot selection of the cluster's symbol
//              (decoding module, all zero when the symbol is erased);
//              the computing module is cleared.
//   shift    : rotate the neuron values by one slot (learning and retrieving).
//   retrieve : also accumulate votes in the computing module; with `last`
//              (final cycle of an iteration) the neuron values are replaced
//              by the new values of the fully binary update, unless the
//              cluster's symbol was given (known at load), in which case
//              the cluster keeps its input neuron.
//
// `v_slots` (rotating view) feeds the learning input of the pair memories in
// which this cluster is the lower-numbered one; `bcast` is its broadcast bit;
// `w[g]` are the weights, per slot, towards distant cluster g. Outside a
// revolution `v_slots` is in neuron order and is the cluster's answer.
//
// The decoding, memory/computing split and neuron-serial broadcast follow
// the document. Holding the clusters whose symbol is given follows its
// statement that the clusters without a selected neuron are the ones
// provided with a selection; the rotating neuron register and the
// load/shift controls are this design's choices. Timing: all state changes at the clock edge;
// one iteration is L cycles.
module cluster_ns
  import gbnn_pkg::*;
#(
  parameter int unsigned C     = 8,
  parameter int unsigned L     = 16,
  parameter int unsigned IDX   = 0,
  parameter int unsigned SYM_W = sym_w(L)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                shift,
  input  logic                retrieve,
  input  logic                last,
  input  logic [C*SYM_W-1:0]  msg,
  input  logic [C-1:0]        known,
  input  logic [C-1:0]        bcast_in,
  input  logic [C-1:0][L-1:0] w,
  output logic [L-1:0]        v_slots,
  output logic                bcast
);

  logic [L-1:0] sel;
  logic [L-1:0] v_new;
  logic [L-1:0] v_rot;
  logic         hold;    // symbol given: keep the input neuron

  neuron_select #(.C(C), .L(L), .IDX(IDX), .SYM_W(SYM_W)) u_sel (
    .msg   (msg),
    .known (known[IDX]),
    .sel   (sel)
  );

  computing_ns #(.C(C), .L(L), .IDX(IDX)) u_comp (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (load),
    .en    (shift && retrieve),
    .last  (last),
    .bcast (bcast_in),
    .w     (w),
    .v_new (v_new)
  );

  always_comb begin
    for (int unsigned s = 0; s < L; s++) begin
      v_rot[s] = v_slots[(s + 1) % L];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_slots <= '0;
      hold    <= 1'b0;
    end else if (load) begin
      v_slots <= sel;
      hold    <= known[IDX];
    end else if (shift) begin
      v_slots <= (retrieve && last && !hold) ? v_new : v_rot;
    end
  end

  assign bcast = v_slots[0];

endmodule
