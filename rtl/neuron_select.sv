// neuron_select: neuron-selection part of a cluster's decoding module.
//
// The K-bit message is cut into C sub-messages of SYM_W bits; sub-message j
// sits in bits [j*SYM_W +: SYM_W]. This block picks the sub-message of
// cluster IDX and decodes it to a one-hot vector of L neuron values: the
// neuron that represents the symbol is set, all others are clear. When the
// cluster's `known` bit is low (the symbol is erased) or the symbol is not
// below L, no neuron is selected.
//
// The split into sub-messages and the one-hot neuron selection follow the
// document; the bit order of the sub-messages and the erasure flag are this
// design's choices. Purely combinational.
module neuron_select
  import gbnn_pkg::*;
#(
  parameter int unsigned C     = 8,
  parameter int unsigned L     = 16,
  parameter int unsigned IDX   = 0,
  parameter int unsigned SYM_W = sym_w(L)
) (
  input  logic [C*SYM_W-1:0] msg,
  input  logic               known,
  output logic [L-1:0]       sel
);

  logic [SYM_W-1:0] sym;

  assign sym = msg[IDX*SYM_W +: SYM_W];

  always_comb begin
    sel = '0;
    for (int unsigned n = 0; n < L; n++) begin
      sel[n] = known && (SYM_W'(n) == sym);
    end
  end

endmodule
