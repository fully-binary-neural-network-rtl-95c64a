// computing_ns: computing module of one cluster for the fully binary model,
// evaluated serially over one revolution of L cycles.
//
// A neuron i of cluster IDX becomes active when every distant cluster g
// either has no active neuron (transparency) or has at least one active
// neuron connected to i (unanimous vote):
//     v'(i) = AND_{g != IDX} ( OR_k (v_g(k) & w_(i)(k,g))  |  ~OR_k v_g(k) )
// Each cycle every cluster broadcasts one neuron value (`bcast[g]`), and
// `w[g][s]` is the weight between that broadcast neuron and the local neuron
// held in slot s. For each distant cluster the module keeps an L-bit OR
// accumulator, rotated one slot per cycle like the cluster's neuron ring, and
// one activity flag (OR of all broadcasts of g). On the last cycle (`last`)
// the conjunction is formed from the accumulators including that cycle's
// votes and appears on `v_new` (slot order equals neuron order then, since
// the rotation is back home); the accumulators are cleared for the next
// iteration. `clear` also empties them.
//
// The equation follows the document. The serial evaluation with rotating
// accumulators and per-cluster activity flags is this design's realisation
// of the document's statement that a cluster computes its neurons
// progressively while distant values arrive.
// Timing: `v_new` is combinational and meaningful in the cycle where `en`
// and `last` are both high.
module computing_ns #(
  parameter int unsigned C   = 8,
  parameter int unsigned L   = 16,
  parameter int unsigned IDX = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                en,
  input  logic                last,
  input  logic [C-1:0]        bcast,
  input  logic [C-1:0][L-1:0] w,
  output logic [L-1:0]        v_new
);

  logic [C-1:0][L-1:0] acc, acc_nx;
  logic [C-1:0]        act, act_nx;

  always_comb begin
    for (int unsigned g = 0; g < C; g++) begin
      act_nx[g] = act[g] | bcast[g];
      for (int unsigned s = 0; s < L; s++) begin
        acc_nx[g][s] = acc[g][(s + 1) % L] | (w[g][(s + 1) % L] & bcast[g]);
      end
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < L; i++) begin
      v_new[i] = 1'b1;
      for (int unsigned g = 0; g < C; g++) begin
        if (g != IDX) begin
          v_new[i] &= acc_nx[g][i] | ~act_nx[g];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      act <= '0;
    end else if (clear || (en && last)) begin
      acc <= '0;
      act <= '0;
    end else if (en) begin
      acc <= acc_nx;
      act <= act_nx;
    end
  end

endmodule
