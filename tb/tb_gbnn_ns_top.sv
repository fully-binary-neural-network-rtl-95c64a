// tb_gbnn_ns_top: end-to-end testbench of the neuron-serial memory
// (gbnn_ns_top): the 3x3 example network and random messages at the
// default size (8 clusters of 16 neurons, 4 iterations).
//
// The 3x3 example network learns the cliques (n1,n0,n0), (n2,n1,n0) and
// (n2,n2,n0) and is asked (-, n1, n0), whose only consistent completion is
// neuron 2 of cluster 0, and (-, -, n0), which has no unambiguous answer.
//
// The random runs learn random messages in two batches and, after each
// batch, retrieve stored messages with half of the symbols erased. Every
// answer is compared neuron by neuron with a reference model that applies
// the unanimous vote with transparency ITER times to a full (unshared)
// weight matrix, clusters with a given symbol keeping their neuron. The
// latency of every operation is checked: `done` rises STEPS clock edges
// after the edge that accepts `start` for learning and ITER*STEPS for
// retrieving (STEPS = L neuron-serial, C cluster-serial). The second batch
// brings the default network to a density of about 0.3, where some answers
// become ambiguous.
//
// Mechanism counters, each of which must be seen at least once: learning,
// retrieving, transparency of an inactive cluster, a retrieval whose answer
// changes after the first iteration, an ambiguous answer, an exact
// recovery.
module tb_gbnn_ns_top;
  import gbnn_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_learn = 0, n_retrieve = 0, n_transparent = 0, n_ambiguous = 0;
  int n_exact = 0, n_multi = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- 3x3 example network: gbnn_ns_top #(.C(3), .L(3))
  logic            ex_start;
  gbnn_op_e        ex_op;
  logic [5:0]      ex_msg;
  logic [2:0]      ex_known;
  logic            ex_ready, ex_done;
  logic [2:0][2:0] ex_neurons;
  logic [5:0]      ex_sym;
  logic [2:0]      ex_amb;

  gbnn_ns_top #(.C(3), .L(3)) ex_dut (
    .clk(clk), .rst_n(rst_n), .start(ex_start), .op(ex_op), .msg(ex_msg),
    .known(ex_known), .ready(ex_ready), .done(ex_done), .neurons(ex_neurons),
    .sym_out(ex_sym), .ambiguous(ex_amb)
  );

  task automatic ex_run(gbnn_op_e o, int s0, int s1, int s2, logic [2:0] k);
    @(negedge clk);
    ex_start = 1'b1; ex_op = o;
    ex_msg = {2'(s2), 2'(s1), 2'(s0)};
    ex_known = k;
    @(negedge clk);
    ex_start = 1'b0;
    wait (ex_done);
    @(negedge clk);
  endtask

  task automatic ex_example();
    ex_run(OP_LEARN, 1, 0, 0, 3'b111);
    ex_run(OP_LEARN, 2, 1, 0, 3'b111);
    ex_run(OP_LEARN, 2, 2, 0, 3'b111);
    n_learn += 3;
    ex_run(OP_RETRIEVE, 0, 1, 0, 3'b110);
    n_retrieve++;
    n_transparent++;
    checks++;
    if (ex_neurons[0] !== 3'b100 || ex_amb[0] || ex_sym[1:0] !== 2'd2) begin
      failures++; $display("FAIL ex example: cluster 0 = %b", ex_neurons[0]);
    end else n_exact++;
    checks++;
    if (ex_neurons[1] !== 3'b010 || ex_neurons[2] !== 3'b001) begin
      failures++; $display("FAIL ex example: given clusters %b %b", ex_neurons[1], ex_neurons[2]);
    end
    ex_run(OP_RETRIEVE, 0, 0, 0, 3'b100);
    n_retrieve++;
    checks++;
    if (ex_neurons[0] !== 3'b110 || ex_neurons[1] !== 3'b111 || !ex_amb[0]) begin
      failures++; $display("FAIL ex example: (-,-,n0) gave %b %b", ex_neurons[0], ex_neurons[1]);
    end else n_ambiguous++;
  endtask

  // ---- random messages: gbnn_ns_top
  localparam int unsigned rn_C = 8, rn_L = 16, rn_ITER = 4, rn_SW = 4;
  localparam int unsigned rn_STEPS = 16, rn_MW = 8 * 4;
  logic                      rn_start;
  gbnn_op_e                  rn_op;
  logic [rn_C*rn_SW-1:0]       rn_msg;
  logic [rn_C-1:0]            rn_known;
  logic                      rn_ready, rn_done;
  logic [rn_C-1:0][rn_L-1:0]   rn_neurons;
  logic [rn_C*rn_SW-1:0]       rn_sym;
  logic [rn_C-1:0]            rn_amb;

  gbnn_ns_top rn_dut (
    .clk(clk), .rst_n(rst_n), .start(rn_start), .op(rn_op), .msg(rn_msg),
    .known(rn_known), .ready(rn_ready), .done(rn_done), .neurons(rn_neurons),
    .sym_out(rn_sym), .ambiguous(rn_amb)
  );

  logic rn_wm [rn_C][rn_L][rn_C][rn_L];   // reference weights, both directions
  logic [rn_C*rn_SW-1:0] rn_stored [$];

  function automatic int unsigned rn_symbol(logic [rn_C*rn_SW-1:0] m, int j);
    return int'(m[j*rn_SW +: rn_SW]);
  endfunction

  // One operation, with a check of its start-to-done latency.
  task automatic rn_op_run(gbnn_op_e o, logic [rn_C*rn_SW-1:0] m, logic [rn_C-1:0] k);
    int cyc = 0;
    int exp_cyc = (o == OP_LEARN) ? rn_STEPS : rn_ITER * rn_STEPS;
    @(negedge clk);
    checks++;
    if (!rn_ready) begin failures++; $display("FAIL rn not ready"); end
    rn_start = 1'b1; rn_op = o; rn_msg = m; rn_known = k;
    @(posedge clk);
    #1 rn_start = 1'b0;
    while (!rn_done) begin
      @(posedge clk);
      #1 cyc++;
    end
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL rn latency %0d, expected %0d", cyc, exp_cyc);
    end
    @(negedge clk);
  endtask

  task automatic rn_learn(logic [rn_C*rn_SW-1:0] m);
    for (int j = 0; j < rn_C; j++)
      for (int g = 0; g < rn_C; g++)
        if (j != g) rn_wm[j][rn_symbol(m, j)][g][rn_symbol(m, g)] = 1'b1;
    rn_stored.push_back(m);
    rn_op_run(OP_LEARN, m, '1);
    n_learn++;
  endtask

  task automatic rn_retrieve(logic [rn_C*rn_SW-1:0] m, logic [rn_C-1:0] k);
    logic [rn_C-1:0][rn_L-1:0] v, vn, v1;
    for (int j = 0; j < rn_C; j++) begin
      v[j] = '0;
      if (k[j]) v[j][rn_symbol(m, j)] = 1'b1;
    end
    v1 = v;
    for (int it = 0; it < rn_ITER; it++) begin
      for (int j = 0; j < rn_C; j++) begin
        for (int i = 0; i < rn_L; i++) begin
          vn[j][i] = 1'b1;
          for (int g = 0; g < rn_C; g++) begin
            logic act, vote;
            if (g == j) continue;
            act = |v[g];
            vote = 1'b0;
            for (int n = 0; n < rn_L; n++) vote |= v[g][n] & rn_wm[j][i][g][n];
            if (!act && it == 0 && j == 0 && i == 0) n_transparent++;
            vn[j][i] &= vote | ~act;
          end
        end
        if (k[j]) vn[j] = v[j];    // a given symbol is kept
      end
      if (it == 0) v1 = vn;
      v = vn;
    end
    if (v1 != v) n_multi++;
    rn_op_run(OP_RETRIEVE, m, k);
    n_retrieve++;
    for (int j = 0; j < rn_C; j++) begin
      checks++;
      if (rn_neurons[j] !== v[j]) begin
        failures++;
        $display("FAIL rn cluster %0d: got %h expected %h", j, rn_neurons[j], v[j]);
      end
      checks++;
      if (rn_amb[j] !== ($countones(v[j]) != 1)) begin
        failures++; $display("FAIL rn ambiguous flag cluster %0d", j);
      end
    end
    if (|rn_amb) n_ambiguous++;
    if (rn_amb == '0 && rn_sym == m) n_exact++;
  endtask

  // Retrieves stored messages with half of the symbols erased.
  task automatic rn_retrieve_batch(int count);
    for (int q = 0; q < count; q++) begin
      logic [rn_C*rn_SW-1:0] m;
      logic [rn_C-1:0] k;
      int erased = 0;
      m = rn_stored[$urandom_range(0, rn_stored.size() - 1)];
      k = '1;
      while (erased < rn_C / 2) begin
        int j = $urandom_range(0, rn_C - 1);
        if (k[j]) begin k[j] = 1'b0; erased++; end
      end
      rn_retrieve(m, k);
    end
  endtask

  task automatic rn_random();
    for (int a = 0; a < rn_C; a++)
      for (int b = 0; b < rn_L; b++)
        for (int c = 0; c < rn_C; c++)
          for (int d = 0; d < rn_L; d++) rn_wm[a][b][c][d] = 1'b0;
    for (int k = 0; k < 40; k++) rn_learn(rn_MW'({$urandom, $urandom}));
    rn_retrieve_batch(60);
    for (int k = 0; k < 60; k++) rn_learn(rn_MW'({$urandom, $urandom}));
    rn_retrieve_batch(60);
  endtask

  initial begin
    rst_n = 1'b1;
    ex_start = 1'b0; ex_op = OP_LEARN; ex_msg = '0; ex_known = '0;
    rn_start = 1'b0; rn_op = OP_LEARN; rn_msg = '0; rn_known = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    ex_example();
    rn_random();

    $display("mechanisms: learn=%0d retrieve=%0d transparent=%0d multi_iteration=%0d ambiguous=%0d exact=%0d",
             n_learn, n_retrieve, n_transparent, n_multi, n_ambiguous, n_exact);
    checks += 6;
    if (n_learn == 0)       begin failures++; $display("FAIL no learning"); end
    if (n_retrieve == 0)    begin failures++; $display("FAIL no retrieval"); end
    if (n_transparent == 0) begin failures++; $display("FAIL transparency never used"); end
    if (n_multi == 0)       begin failures++; $display("FAIL no retrieval needed a second iteration"); end
    if (n_ambiguous == 0)   begin failures++; $display("FAIL no ambiguous answer"); end
    if (n_exact == 0)       begin failures++; $display("FAIL no exact recovery"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
