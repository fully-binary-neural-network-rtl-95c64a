// tb_computing_ns: self-checking testbench of the serial binary computing
// module (C=4 clusters of L=5 neurons, local cluster 1).
//
// For each trial the testbench draws distant neuron values (some clusters
// left with no active neuron, to exercise transparency) and a full weight
// matrix, feeds one neuron per cluster per cycle together with the weights
// the rotating slots need, and compares v_new on the last cycle with the
// unanimous-vote equation evaluated directly. Trials run back to back, and
// one trial is preceded by garbage that `clear` must discard.
module tb_computing_ns;
  localparam int unsigned C = 4, L = 5, IDX = 1;

  logic clk = 1'b0;
  logic rst_n, clear, en, last;
  logic [C-1:0] bcast;
  logic [C-1:0][L-1:0] w;
  logic [L-1:0] v_new;

  int checks = 0, failures = 0, transparent = 0;
  logic vg [C][L];
  logic wf [L][C][L];   // wf[i][g][k]: local neuron i to neuron k of cluster g

  computing_ns #(.C(C), .L(L), .IDX(IDX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic expected(int i);
    logic r = 1'b1;
    for (int g = 0; g < C; g++) begin
      logic act = 1'b0, vote = 1'b0;
      if (g == IDX) continue;
      for (int k = 0; k < L; k++) begin
        act |= vg[g][k];
        vote |= vg[g][k] & wf[i][g][k];
      end
      r &= vote | ~act;
    end
    return r;
  endfunction

  task automatic draw();
    for (int g = 0; g < C; g++) begin
      bit empty = ($urandom_range(0, 3) == 0);
      for (int k = 0; k < L; k++) vg[g][k] = empty ? 1'b0 : 1'($urandom_range(0, 2) == 0);
    end
    for (int i = 0; i < L; i++)
      for (int g = 0; g < C; g++)
        for (int k = 0; k < L; k++) wf[i][g][k] = 1'($urandom_range(0, 1));
  endtask

  task automatic iteration();
    for (int t = 0; t < L; t++) begin
      @(negedge clk);
      en = 1'b1; clear = 1'b0;
      last = (t == L - 1);
      for (int g = 0; g < C; g++) begin
        bcast[g] = (g == IDX) ? 1'($urandom) : vg[g][t];
        for (int s = 0; s < L; s++) w[g][s] = wf[(s + t) % L][g][t];
      end
      if (last) begin
        #1;
        for (int i = 0; i < L; i++) begin
          checks++;
          if (v_new[i] !== expected(i)) begin
            failures++;
            $display("FAIL neuron %0d got %b expected %b", i, v_new[i], expected(i));
          end
        end
      end
    end
    @(negedge clk);
    en = 1'b0; last = 1'b0;
  endtask

  initial begin
    rst_n = 1'b1; clear = 1'b0; en = 1'b0; last = 1'b0; bcast = '0; w = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int trial = 0; trial < 200; trial++) begin
      if (trial == 7) begin
        // Garbage accumulation, then clear.
        @(negedge clk);
        en = 1'b1; last = 1'b0; bcast = '1; w = '1;
        @(negedge clk);
        en = 1'b0; clear = 1'b1;
        @(negedge clk);
        clear = 1'b0;
      end
      draw();
      for (int g = 0; g < C; g++) begin
        logic a = 1'b0;
        for (int k = 0; k < L; k++) a |= vg[g][k];
        if (g != IDX && !a) transparent++;
      end
      iteration();
    end
    checks++;
    if (transparent == 0) begin failures++; $display("FAIL transparency never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
