// gbnn_ctrl: sequencer of the neuron-serial associative memory.
//
// One revolution is STEPS cycles: L for neuron-based serialization (one
// neuron of every cluster per cycle), C for cluster-based serialization
// (one whole cluster per cycle). `step` counts the cycles of the current
// revolution. Idle until `start`; then, with `op`:
//   OP_LEARN    : one revolution with `valid` and `store` high, recording
//                 the clique of the loaded message in the rings;
//   OP_RETRIEVE : ITER revolutions (iterations) with `valid` and
//                 `retrieve` high; `last` marks the final cycle of every
//                 iteration.
// In the cycle `start` is accepted (`ready` high) `load` is high, so the
// clusters take the message at that clock edge. `done` is high for one
// cycle right after the last working cycle, when the neuron values are in
// neuron order: it rises STEPS clock edges after the edge that accepted
// `start` for learning and ITER*STEPS edges after it for retrieving. `start` is ignored
// while busy.
//
// The L (or C) cycles per iteration and the four retrieving iterations
// follow the document; the handshake (start/ready/done) is this design's choice.
module gbnn_ctrl
  import gbnn_pkg::*;
#(
  parameter int unsigned STEPS = 16,
  parameter int unsigned ITER  = 4,
  localparam int unsigned TW   = (STEPS > 1) ? $clog2(STEPS) : 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  gbnn_op_e op,
  output logic     ready,
  output logic     load,
  output logic     valid,
  output logic     store,
  output logic     retrieve,
  output logic     last,
  output logic [TW-1:0] step,
  output logic     done
);

  localparam int unsigned IW = (ITER > 1) ? $clog2(ITER) : 1;

  gbnn_state_e       state;
  logic [TW-1:0]     t;
  logic [IW-1:0]     it;

  assign step     = t;
  assign ready    = (state == ST_IDLE);
  assign load     = ready && start;
  assign valid    = (state != ST_IDLE);
  assign store    = (state == ST_LEARN);
  assign retrieve = (state == ST_RETRIEVE);
  assign last     = valid && (t == TW'(STEPS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      t     <= '0;
      it    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          t  <= '0;
          it <= '0;
          if (start) begin
            state <= (op == OP_LEARN) ? ST_LEARN : ST_RETRIEVE;
          end
        end
        ST_LEARN: begin
          t <= last ? '0 : t + 1'b1;
          if (last) begin
            state <= ST_IDLE;
            done  <= 1'b1;
          end
        end
        ST_RETRIEVE: begin
          t <= last ? '0 : t + 1'b1;
          if (last) begin
            it <= it + 1'b1;
            if (it == IW'(ITER - 1)) begin
              state <= ST_IDLE;
              done  <= 1'b1;
            end
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

endmodule
