// tb_ff_ring: self-checking testbench of the flip-flop ring.
//
// Drives random valid/store/din into a 4-cell ring (the size drawn in the
// document's example) with 8-bit words and compares every cell, every
// cycle, with a queue-based model. It also checks that DEPTH shifts without
// store bring the ring back to its initial contents.
module tb_ff_ring;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned WIDTH = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic valid, store;
  logic [WIDTH-1:0] din;
  logic [DEPTH-1:0][WIDTH-1:0] cells;
  logic [WIDTH-1:0] dout;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];

  ff_ring #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic compare(string what);
    for (int p = 0; p < DEPTH; p++) begin
      checks++;
      if (cells[p] !== model[p]) begin
        failures++;
        $display("FAIL %s cell %0d: got %h expected %h", what, p, cells[p], model[p]);
      end
    end
    checks++;
    if (dout !== model[0]) begin
      failures++;
      $display("FAIL %s dout", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] snap [DEPTH];
    rst_n = 1'b1; valid = 1'b0; store = 1'b0; din = '0;
    #1 rst_n = 1'b0;
    for (int p = 0; p < DEPTH; p++) model[p] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare("reset");
    // Fill the ring serially, as in a learning step.
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      valid = 1'b1; store = 1'b1; din = WIDTH'(8'hA0 + k);
      @(posedge clk); #1;
      begin
        logic [WIDTH-1:0] in;
        in = din;
        for (int p = 0; p + 1 < DEPTH; p++) model[p] = model[p+1];
        model[DEPTH-1] = in;
      end
      compare("fill");
    end
    // Cell 0 must now hold the first word stored.
    checks++;
    if (dout !== 8'hA0) begin failures++; $display("FAIL first word order"); end
    // Random operation.
    for (int k = 0; k < 400; k++) begin
      logic [WIDTH-1:0] in;
      logic v, s;
      @(negedge clk);
      v = 1'($urandom_range(0, 3) != 0);
      s = 1'($urandom_range(0, 2) == 0);
      valid = v; store = s; din = WIDTH'($urandom);
      in = s ? din : model[0];
      @(posedge clk); #1;
      if (v) begin
        for (int p = 0; p + 1 < DEPTH; p++) model[p] = model[p+1];
        model[DEPTH-1] = in;
      end
      compare("random");
    end
    // One full revolution without store returns to the start.
    for (int p = 0; p < DEPTH; p++) snap[p] = model[p];
    @(negedge clk); valid = 1'b1; store = 1'b0; din = '1;
    repeat (DEPTH) @(posedge clk);
    #1;
    @(negedge clk); valid = 1'b0;
    for (int p = 0; p < DEPTH; p++) begin
      checks++;
      if (cells[p] !== snap[p]) begin failures++; $display("FAIL revolution cell %0d", p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
