// gbnn_pkg: types and helper functions shared by the fully binary clustered
// associative memory (GBNN) with neuron-serial communication.
//
// ARCH selects the serialization scheme of the top level.
// The operation code selects between storing a message (learning, which
// records a clique of connections) and recovering a partially erased message
// (retrieving). SYM_W gives the width of one cluster's sub-message: the
// document sets it to log2(L); for an L that is not a power of two (the
// 3x3 example network) the next larger width is used and only values below L
// are meaningful.
package gbnn_pkg;

  typedef enum logic {
    OP_LEARN    = 1'b0,
    OP_RETRIEVE = 1'b1
  } gbnn_op_e;

  // Serialization scheme of the whole memory.
  typedef enum logic {
    ARCH_NEURON_SERIAL  = 1'b0,   // L cycles per iteration, shared weights
    ARCH_CLUSTER_SERIAL = 1'b1    // C cycles per iteration, square matrix
  } gbnn_arch_e;

  typedef enum logic [1:0] {
    ST_IDLE     = 2'd0,
    ST_LEARN    = 2'd1,
    ST_RETRIEVE = 2'd2
  } gbnn_state_e;

  // Width of one sub-message (symbol) for clusters of l neurons.
  function automatic int unsigned sym_w(input int unsigned l);
    return (l > 1) ? $clog2(l) : 1;
  endfunction

endpackage
