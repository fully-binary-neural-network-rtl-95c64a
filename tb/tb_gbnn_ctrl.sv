// tb_gbnn_ctrl: self-checking testbench of the sequencer (STEPS=L=5,
// ITER=3).
//
// Checks, cycle by cycle, that a learning operation gives `load` in the
// start cycle, then exactly L cycles of valid+store with `last` on the final
// one and `done` in the cycle after (L clock edges after the start edge),
// and that a retrieving operation gives ITER*L cycles of valid+retrieve,
// `last` once per iteration, `step` counting 0..L-1, and `done` ITER*L
// edges after the start edge.
// A start pulse while busy must be ignored.
module tb_gbnn_ctrl;
  import gbnn_pkg::*;
  localparam int unsigned L = 5, ITER = 3;

  logic clk = 1'b0;
  logic rst_n, start;
  gbnn_op_e op;
  logic ready, load, valid, store, retrieve, last, done;
  logic [2:0] step;
  int checks = 0, failures = 0;

  gbnn_ctrl #(.STEPS(L), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(logic got, logic exp, string what, int cyc);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %b expected %b", what, cyc, got, exp);
    end
  endtask

  task automatic run(gbnn_op_e o);
    int n = (o == OP_LEARN) ? L : ITER * L;
    @(negedge clk);
    start = 1'b1; op = o;
    #1;
    expect_bit(ready, 1'b1, "ready before start", 0);
    expect_bit(load, 1'b1, "load in start cycle", 0);
    @(negedge clk);
    start = 1'b0;
    for (int c = 1; c <= n + 1; c++) begin
      // Stray start while busy, must be ignored.
      start = (c == 2);
      op = (o == OP_LEARN) ? OP_RETRIEVE : OP_LEARN;
      #1;
      expect_bit(valid, c <= n, "valid", c);
      expect_bit(store, (c <= n) && (o == OP_LEARN), "store", c);
      expect_bit(retrieve, (c <= n) && (o == OP_RETRIEVE), "retrieve", c);
      expect_bit(last, (c <= n) && (c % L == 0), "last", c);
      if (c <= n) begin
        checks++;
        if (step !== 3'((c - 1) % L)) begin
          failures++; $display("FAIL step at cycle %0d: %0d", c, step);
        end
      end
      expect_bit(done, c == n + 1, "done", c);
      expect_bit(load, 1'b0, "no load while busy", c);
      expect_bit(ready, c == n + 1, "ready", c);
      @(negedge clk);
      start = 1'b0;
    end
  endtask

  initial begin
    rst_n = 1'b1; start = 1'b0; op = OP_LEARN;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) begin
      run(OP_LEARN);
      run(OP_RETRIEVE);
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
