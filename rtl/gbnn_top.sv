// gbnn_top: fully binary clustered associative memory (GBNN), top level.
//
// C clusters of L binary neurons store messages of C symbols as cliques of
// binary connections and complete messages with erased symbols. The
// retrieving rule is a unanimous vote: a neuron switches on when every
// other cluster that has an active neuron has at least one active neuron
// connected to it; clusters with no active neuron do not vote
// (transparency). No integer scores and no winner-take-all are needed.
//
// ARCH selects how the clusters exchange neuron values:
//   ARCH_NEURON_SERIAL  (default, gbnn_ns_top): every cycle each cluster
//       broadcasts one neuron, an iteration takes L cycles, and each weight
//       is stored once and shared by its two clusters in flip-flop rings;
//   ARCH_CLUSTER_SERIAL (gbnn_cs_top): every cycle one cluster broadcasts
//       all its neurons, an iteration takes C cycles, square weight matrix
//       in flip-flop rings.
//
// Interface (both schemes): pulse `start` with `op` (OP_LEARN or
// OP_RETRIEVE), `msg` (symbol j in bits [j*SYM_W +: SYM_W]) and `known`
// (bit j low: symbol j erased) while `ready` is high. `done` pulses when
// the operation ends: STEPS clock edges after the accepting edge for
// learning, ITER*STEPS for retrieving, STEPS being L or C. After a
// retrieval `neurons`, `sym_out` (lowest active neuron per cluster) and
// `ambiguous` (not exactly one active neuron) hold the answer until the
// next start.
//
// Defaults follow the document's main FPGA test case (C=8, L=16) and its
// four retrieving iterations.
module gbnn_top
  import gbnn_pkg::*;
#(
  parameter gbnn_arch_e  ARCH  = ARCH_NEURON_SERIAL,
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

  if (ARCH == ARCH_NEURON_SERIAL) begin : g_ns
    gbnn_ns_top #(.C(C), .L(L), .ITER(ITER), .SYM_W(SYM_W)) u_core (.*);
  end else begin : g_cs
    gbnn_cs_top #(.C(C), .L(L), .ITER(ITER), .SYM_W(SYM_W)) u_core (.*);
  end

endmodule
