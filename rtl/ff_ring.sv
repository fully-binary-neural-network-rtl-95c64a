// ff_ring: flip-flop ring, a torus-connected shift register that holds one
// group of synaptic weights.
//
// The ring has DEPTH cells of WIDTH bits. Cell 0 is the ring output; every
// cycle in which `valid` is high all cells move one place towards cell 0 and
// the last cell is written by a 2:1 multiplexer: the fed-back output when
// `store` is low, `din` when `store` is high. After DEPTH shifts the ring is
// back in its initial state, so a reader that always looks at the same cell
// sees the DEPTH stored words one after the other without any read
// multiplexer. All cells are exposed on `cells` so that a reader may tap a
// fixed cell other than the output.
//
// The torus structure, the single input multiplexer, Store and Valid follow
// the document. The document gates the clock with Valid; here Valid is a
// synchronous shift enable, which behaves the same at the register outputs.
// Cells are cleared by the asynchronous active-low reset, matching the rule
// that every synaptic weight starts at 0.
//
// Timing: `dout` and `cells` are register outputs; a shift takes effect at
// the clock edge that samples `valid` high.
module ff_ring #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        valid,
  input  logic                        store,
  input  logic [WIDTH-1:0]            din,
  output logic [DEPTH-1:0][WIDTH-1:0] cells,
  output logic [WIDTH-1:0]            dout
);

  logic [WIDTH-1:0] ring_in;

  // Input multiplexer of the ring: learning input or fed-back output.
  assign ring_in = store ? din : cells[0];
  assign dout    = cells[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cells <= '0;
    end else if (valid) begin
      for (int unsigned p = 0; p + 1 < DEPTH; p++) begin
        cells[p] <= cells[p+1];
      end
      cells[DEPTH-1] <= ring_in;
    end
  end

endmodule
