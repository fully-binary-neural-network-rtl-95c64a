// tb_cluster_cs: self-checking testbench of one cluster for cluster-serial
// operation (C=4 clusters of L=3 neurons, local cluster 2).
//
// The testbench plays the other clusters on the bus. Learning: the cluster
// loads a random symbol, then during a revolution of C cycles the distant
// clusters put one-hot (or empty, erased) selections on the bus in turn and
// the cluster drives its own selection in its turn; the reference weight
// matrix is updated the same way. Retrieving: the cluster loads a symbol
// (given or erased), the distant clusters put random neuron vectors on the
// bus (some all zero, to exercise transparency), and after each iteration
// the neuron register is compared with the unanimous vote evaluated
// directly, or with the loaded neuron when the symbol is given. The bus
// output is checked on every cycle.
module tb_cluster_cs;
  import gbnn_pkg::*;
  localparam int unsigned C = 4, L = 3, IDX = 2, SW = 2;

  logic clk = 1'b0;
  logic rst_n, load, valid, store, retrieve, last, turn;
  logic [C*SW-1:0] msg;
  logic [C-1:0] known;
  logic [L-1:0] bus_in, v, bus_out;

  int checks = 0, failures = 0;
  logic wf [L][C][L];   // wf[i][g][b]: local neuron i to neuron b of cluster g
  logic [L-1:0] vg [C];

  cluster_cs #(.C(C), .L(L), .IDX(IDX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_load(int s, bit k);
    @(negedge clk);
    load = 1'b1;
    msg = '0;
    msg[IDX*SW +: SW] = SW'(s);
    known = '0;
    known[IDX] = k;
    @(negedge clk);
    load = 1'b0;
  endtask

  task automatic revolution(bit learn);
    for (int t = 0; t < C; t++) begin
      valid = 1'b1; store = learn; retrieve = !learn;
      last = (t == C - 1);
      turn = (t == IDX);
      bus_in = turn ? v : vg[t];
      #1;
      checks++;
      if (bus_out !== (turn ? v : '0)) begin failures++; $display("FAIL bus output t=%0d", t); end
      if (learn && !turn)
        for (int i = 0; i < L; i++)
          for (int b = 0; b < L; b++)
            if (v[i] && vg[t][b]) wf[i][t][b] = 1'b1;
      @(negedge clk);
    end
    valid = 1'b0; store = 1'b0; retrieve = 1'b0; last = 1'b0; turn = 1'b0;
  endtask

  function automatic logic [L-1:0] expected();
    logic [L-1:0] r;
    for (int i = 0; i < L; i++) begin
      r[i] = 1'b1;
      for (int g = 0; g < C; g++) begin
        logic vote = 1'b0;
        if (g == IDX) continue;
        for (int b = 0; b < L; b++) vote |= vg[g][b] & wf[i][g][b];
        r[i] &= vote | ~(|vg[g]);
      end
    end
    return r;
  endfunction

  initial begin
    rst_n = 1'b1; load = 1'b0; valid = 1'b0; store = 1'b0; retrieve = 1'b0;
    last = 1'b0; turn = 1'b0; msg = '0; known = '0; bus_in = '0;
    for (int i = 0; i < L; i++) for (int g = 0; g < C; g++) for (int b = 0; b < L; b++) wf[i][g][b] = 1'b0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int trial = 0; trial < 60; trial++) begin
      // Learn two messages.
      repeat (2) begin
        do_load($urandom_range(0, L - 1), 1'b1);
        for (int g = 0; g < C; g++) begin
          vg[g] = '0;
          if ($urandom_range(0, 4) != 0) vg[g][$urandom_range(0, L - 1)] = 1'b1;
        end
        revolution(1'b1);
      end
      // Retrieve, two iterations.
      begin
        bit k;
        logic [L-1:0] v_loaded;
        k = ($urandom_range(0, 3) == 0);
        do_load($urandom_range(0, L - 1), k);
        v_loaded = v;
        for (int it = 0; it < 2; it++) begin
          logic [L-1:0] e;
          for (int g = 0; g < C; g++)
            vg[g] = ($urandom_range(0, 3) == 0) ? '0 : L'($urandom);
          e = k ? v_loaded : expected();
          revolution(1'b0);
          checks++;
          if (v !== e) begin failures++; $display("FAIL iteration: got %b expected %b", v, e); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
