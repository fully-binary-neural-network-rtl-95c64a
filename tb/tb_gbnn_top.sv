// tb_gbnn_top: end-to-end testbench of the top level with both
// serialization schemes: the 3x3 example network on each, random messages
// on each at 16 clusters of 16 neurons (the largest network of the
// document's FPGA comparison), and on the cluster-serial scheme at 5
// clusters of 8 neurons.
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
module tb_gbnn_top;
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

  // ---- 3x3 example network: gbnn_top #(.ARCH(ARCH_NEURON_SERIAL), .C(3), .L(3))
  logic            exn_start;
  gbnn_op_e        exn_op;
  logic [5:0]      exn_msg;
  logic [2:0]      exn_known;
  logic            exn_ready, exn_done;
  logic [2:0][2:0] exn_neurons;
  logic [5:0]      exn_sym;
  logic [2:0]      exn_amb;

  gbnn_top #(.ARCH(ARCH_NEURON_SERIAL), .C(3), .L(3)) exn_dut (
    .clk(clk), .rst_n(rst_n), .start(exn_start), .op(exn_op), .msg(exn_msg),
    .known(exn_known), .ready(exn_ready), .done(exn_done), .neurons(exn_neurons),
    .sym_out(exn_sym), .ambiguous(exn_amb)
  );

  task automatic exn_run(gbnn_op_e o, int s0, int s1, int s2, logic [2:0] k);
    @(negedge clk);
    exn_start = 1'b1; exn_op = o;
    exn_msg = {2'(s2), 2'(s1), 2'(s0)};
    exn_known = k;
    @(negedge clk);
    exn_start = 1'b0;
    wait (exn_done);
    @(negedge clk);
  endtask

  task automatic exn_example();
    exn_run(OP_LEARN, 1, 0, 0, 3'b111);
    exn_run(OP_LEARN, 2, 1, 0, 3'b111);
    exn_run(OP_LEARN, 2, 2, 0, 3'b111);
    n_learn += 3;
    exn_run(OP_RETRIEVE, 0, 1, 0, 3'b110);
    n_retrieve++;
    n_transparent++;
    checks++;
    if (exn_neurons[0] !== 3'b100 || exn_amb[0] || exn_sym[1:0] !== 2'd2) begin
      failures++; $display("FAIL exn example: cluster 0 = %b", exn_neurons[0]);
    end else n_exact++;
    checks++;
    if (exn_neurons[1] !== 3'b010 || exn_neurons[2] !== 3'b001) begin
      failures++; $display("FAIL exn example: given clusters %b %b", exn_neurons[1], exn_neurons[2]);
    end
    exn_run(OP_RETRIEVE, 0, 0, 0, 3'b100);
    n_retrieve++;
    checks++;
    if (exn_neurons[0] !== 3'b110 || exn_neurons[1] !== 3'b111 || !exn_amb[0]) begin
      failures++; $display("FAIL exn example: (-,-,n0) gave %b %b", exn_neurons[0], exn_neurons[1]);
    end else n_ambiguous++;
  endtask

  // ---- 3x3 example network: gbnn_top #(.ARCH(ARCH_CLUSTER_SERIAL), .C(3), .L(3))
  logic            exc_start;
  gbnn_op_e        exc_op;
  logic [5:0]      exc_msg;
  logic [2:0]      exc_known;
  logic            exc_ready, exc_done;
  logic [2:0][2:0] exc_neurons;
  logic [5:0]      exc_sym;
  logic [2:0]      exc_amb;

  gbnn_top #(.ARCH(ARCH_CLUSTER_SERIAL), .C(3), .L(3)) exc_dut (
    .clk(clk), .rst_n(rst_n), .start(exc_start), .op(exc_op), .msg(exc_msg),
    .known(exc_known), .ready(exc_ready), .done(exc_done), .neurons(exc_neurons),
    .sym_out(exc_sym), .ambiguous(exc_amb)
  );

  task automatic exc_run(gbnn_op_e o, int s0, int s1, int s2, logic [2:0] k);
    @(negedge clk);
    exc_start = 1'b1; exc_op = o;
    exc_msg = {2'(s2), 2'(s1), 2'(s0)};
    exc_known = k;
    @(negedge clk);
    exc_start = 1'b0;
    wait (exc_done);
    @(negedge clk);
  endtask

  task automatic exc_example();
    exc_run(OP_LEARN, 1, 0, 0, 3'b111);
    exc_run(OP_LEARN, 2, 1, 0, 3'b111);
    exc_run(OP_LEARN, 2, 2, 0, 3'b111);
    n_learn += 3;
    exc_run(OP_RETRIEVE, 0, 1, 0, 3'b110);
    n_retrieve++;
    n_transparent++;
    checks++;
    if (exc_neurons[0] !== 3'b100 || exc_amb[0] || exc_sym[1:0] !== 2'd2) begin
      failures++; $display("FAIL exc example: cluster 0 = %b", exc_neurons[0]);
    end else n_exact++;
    checks++;
    if (exc_neurons[1] !== 3'b010 || exc_neurons[2] !== 3'b001) begin
      failures++; $display("FAIL exc example: given clusters %b %b", exc_neurons[1], exc_neurons[2]);
    end
    exc_run(OP_RETRIEVE, 0, 0, 0, 3'b100);
    n_retrieve++;
    checks++;
    if (exc_neurons[0] !== 3'b110 || exc_neurons[1] !== 3'b111 || !exc_amb[0]) begin
      failures++; $display("FAIL exc example: (-,-,n0) gave %b %b", exc_neurons[0], exc_neurons[1]);
    end else n_ambiguous++;
  endtask

  // ---- random messages: gbnn_top #(.ARCH(ARCH_NEURON_SERIAL), .C(16), .L(16))
  localparam int unsigned rn_C = 16, rn_L = 16, rn_ITER = 4, rn_SW = 4;
  localparam int unsigned rn_STEPS = 16, rn_MW = 16 * 4;
  logic                      rn_start;
  gbnn_op_e                  rn_op;
  logic [rn_C*rn_SW-1:0]       rn_msg;
  logic [rn_C-1:0]            rn_known;
  logic                      rn_ready, rn_done;
  logic [rn_C-1:0][rn_L-1:0]   rn_neurons;
  logic [rn_C*rn_SW-1:0]       rn_sym;
  logic [rn_C-1:0]            rn_amb;

  gbnn_top #(.ARCH(ARCH_NEURON_SERIAL), .C(16), .L(16)) rn_dut (
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
    for (int k = 0; k < 150; k++) rn_learn(rn_MW'({$urandom, $urandom}));
    rn_retrieve_batch(60);
    for (int k = 0; k < 250; k++) rn_learn(rn_MW'({$urandom, $urandom}));
    rn_retrieve_batch(60);
  endtask

  // ---- random messages: gbnn_top #(.ARCH(ARCH_CLUSTER_SERIAL), .C(16), .L(16))
  localparam int unsigned rc_C = 16, rc_L = 16, rc_ITER = 4, rc_SW = 4;
  localparam int unsigned rc_STEPS = 16, rc_MW = 16 * 4;
  logic                      rc_start;
  gbnn_op_e                  rc_op;
  logic [rc_C*rc_SW-1:0]       rc_msg;
  logic [rc_C-1:0]            rc_known;
  logic                      rc_ready, rc_done;
  logic [rc_C-1:0][rc_L-1:0]   rc_neurons;
  logic [rc_C*rc_SW-1:0]       rc_sym;
  logic [rc_C-1:0]            rc_amb;

  gbnn_top #(.ARCH(ARCH_CLUSTER_SERIAL), .C(16), .L(16)) rc_dut (
    .clk(clk), .rst_n(rst_n), .start(rc_start), .op(rc_op), .msg(rc_msg),
    .known(rc_known), .ready(rc_ready), .done(rc_done), .neurons(rc_neurons),
    .sym_out(rc_sym), .ambiguous(rc_amb)
  );

  logic rc_wm [rc_C][rc_L][rc_C][rc_L];   // reference weights, both directions
  logic [rc_C*rc_SW-1:0] rc_stored [$];

  function automatic int unsigned rc_symbol(logic [rc_C*rc_SW-1:0] m, int j);
    return int'(m[j*rc_SW +: rc_SW]);
  endfunction

  // One operation, with a check of its start-to-done latency.
  task automatic rc_op_run(gbnn_op_e o, logic [rc_C*rc_SW-1:0] m, logic [rc_C-1:0] k);
    int cyc = 0;
    int exp_cyc = (o == OP_LEARN) ? rc_STEPS : rc_ITER * rc_STEPS;
    @(negedge clk);
    checks++;
    if (!rc_ready) begin failures++; $display("FAIL rc not ready"); end
    rc_start = 1'b1; rc_op = o; rc_msg = m; rc_known = k;
    @(posedge clk);
    #1 rc_start = 1'b0;
    while (!rc_done) begin
      @(posedge clk);
      #1 cyc++;
    end
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL rc latency %0d, expected %0d", cyc, exp_cyc);
    end
    @(negedge clk);
  endtask

  task automatic rc_learn(logic [rc_C*rc_SW-1:0] m);
    for (int j = 0; j < rc_C; j++)
      for (int g = 0; g < rc_C; g++)
        if (j != g) rc_wm[j][rc_symbol(m, j)][g][rc_symbol(m, g)] = 1'b1;
    rc_stored.push_back(m);
    rc_op_run(OP_LEARN, m, '1);
    n_learn++;
  endtask

  task automatic rc_retrieve(logic [rc_C*rc_SW-1:0] m, logic [rc_C-1:0] k);
    logic [rc_C-1:0][rc_L-1:0] v, vn, v1;
    for (int j = 0; j < rc_C; j++) begin
      v[j] = '0;
      if (k[j]) v[j][rc_symbol(m, j)] = 1'b1;
    end
    v1 = v;
    for (int it = 0; it < rc_ITER; it++) begin
      for (int j = 0; j < rc_C; j++) begin
        for (int i = 0; i < rc_L; i++) begin
          vn[j][i] = 1'b1;
          for (int g = 0; g < rc_C; g++) begin
            logic act, vote;
            if (g == j) continue;
            act = |v[g];
            vote = 1'b0;
            for (int n = 0; n < rc_L; n++) vote |= v[g][n] & rc_wm[j][i][g][n];
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
    rc_op_run(OP_RETRIEVE, m, k);
    n_retrieve++;
    for (int j = 0; j < rc_C; j++) begin
      checks++;
      if (rc_neurons[j] !== v[j]) begin
        failures++;
        $display("FAIL rc cluster %0d: got %h expected %h", j, rc_neurons[j], v[j]);
      end
      checks++;
      if (rc_amb[j] !== ($countones(v[j]) != 1)) begin
        failures++; $display("FAIL rc ambiguous flag cluster %0d", j);
      end
    end
    if (|rc_amb) n_ambiguous++;
    if (rc_amb == '0 && rc_sym == m) n_exact++;
  endtask

  // Retrieves stored messages with half of the symbols erased.
  task automatic rc_retrieve_batch(int count);
    for (int q = 0; q < count; q++) begin
      logic [rc_C*rc_SW-1:0] m;
      logic [rc_C-1:0] k;
      int erased = 0;
      m = rc_stored[$urandom_range(0, rc_stored.size() - 1)];
      k = '1;
      while (erased < rc_C / 2) begin
        int j = $urandom_range(0, rc_C - 1);
        if (k[j]) begin k[j] = 1'b0; erased++; end
      end
      rc_retrieve(m, k);
    end
  endtask

  task automatic rc_random();
    for (int a = 0; a < rc_C; a++)
      for (int b = 0; b < rc_L; b++)
        for (int c = 0; c < rc_C; c++)
          for (int d = 0; d < rc_L; d++) rc_wm[a][b][c][d] = 1'b0;
    for (int k = 0; k < 150; k++) rc_learn(rc_MW'({$urandom, $urandom}));
    rc_retrieve_batch(60);
    for (int k = 0; k < 250; k++) rc_learn(rc_MW'({$urandom, $urandom}));
    rc_retrieve_batch(60);
  endtask

  // ---- random messages: gbnn_top #(.ARCH(ARCH_CLUSTER_SERIAL), .C(5), .L(8), .ITER(3))
  localparam int unsigned sc_C = 5, sc_L = 8, sc_ITER = 3, sc_SW = 3;
  localparam int unsigned sc_STEPS = 5, sc_MW = 5 * 3;
  logic                      sc_start;
  gbnn_op_e                  sc_op;
  logic [sc_C*sc_SW-1:0]       sc_msg;
  logic [sc_C-1:0]            sc_known;
  logic                      sc_ready, sc_done;
  logic [sc_C-1:0][sc_L-1:0]   sc_neurons;
  logic [sc_C*sc_SW-1:0]       sc_sym;
  logic [sc_C-1:0]            sc_amb;

  gbnn_top #(.ARCH(ARCH_CLUSTER_SERIAL), .C(5), .L(8), .ITER(3)) sc_dut (
    .clk(clk), .rst_n(rst_n), .start(sc_start), .op(sc_op), .msg(sc_msg),
    .known(sc_known), .ready(sc_ready), .done(sc_done), .neurons(sc_neurons),
    .sym_out(sc_sym), .ambiguous(sc_amb)
  );

  logic sc_wm [sc_C][sc_L][sc_C][sc_L];   // reference weights, both directions
  logic [sc_C*sc_SW-1:0] sc_stored [$];

  function automatic int unsigned sc_symbol(logic [sc_C*sc_SW-1:0] m, int j);
    return int'(m[j*sc_SW +: sc_SW]);
  endfunction

  // One operation, with a check of its start-to-done latency.
  task automatic sc_op_run(gbnn_op_e o, logic [sc_C*sc_SW-1:0] m, logic [sc_C-1:0] k);
    int cyc = 0;
    int exp_cyc = (o == OP_LEARN) ? sc_STEPS : sc_ITER * sc_STEPS;
    @(negedge clk);
    checks++;
    if (!sc_ready) begin failures++; $display("FAIL sc not ready"); end
    sc_start = 1'b1; sc_op = o; sc_msg = m; sc_known = k;
    @(posedge clk);
    #1 sc_start = 1'b0;
    while (!sc_done) begin
      @(posedge clk);
      #1 cyc++;
    end
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL sc latency %0d, expected %0d", cyc, exp_cyc);
    end
    @(negedge clk);
  endtask

  task automatic sc_learn(logic [sc_C*sc_SW-1:0] m);
    for (int j = 0; j < sc_C; j++)
      for (int g = 0; g < sc_C; g++)
        if (j != g) sc_wm[j][sc_symbol(m, j)][g][sc_symbol(m, g)] = 1'b1;
    sc_stored.push_back(m);
    sc_op_run(OP_LEARN, m, '1);
    n_learn++;
  endtask

  task automatic sc_retrieve(logic [sc_C*sc_SW-1:0] m, logic [sc_C-1:0] k);
    logic [sc_C-1:0][sc_L-1:0] v, vn, v1;
    for (int j = 0; j < sc_C; j++) begin
      v[j] = '0;
      if (k[j]) v[j][sc_symbol(m, j)] = 1'b1;
    end
    v1 = v;
    for (int it = 0; it < sc_ITER; it++) begin
      for (int j = 0; j < sc_C; j++) begin
        for (int i = 0; i < sc_L; i++) begin
          vn[j][i] = 1'b1;
          for (int g = 0; g < sc_C; g++) begin
            logic act, vote;
            if (g == j) continue;
            act = |v[g];
            vote = 1'b0;
            for (int n = 0; n < sc_L; n++) vote |= v[g][n] & sc_wm[j][i][g][n];
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
    sc_op_run(OP_RETRIEVE, m, k);
    n_retrieve++;
    for (int j = 0; j < sc_C; j++) begin
      checks++;
      if (sc_neurons[j] !== v[j]) begin
        failures++;
        $display("FAIL sc cluster %0d: got %h expected %h", j, sc_neurons[j], v[j]);
      end
      checks++;
      if (sc_amb[j] !== ($countones(v[j]) != 1)) begin
        failures++; $display("FAIL sc ambiguous flag cluster %0d", j);
      end
    end
    if (|sc_amb) n_ambiguous++;
    if (sc_amb == '0 && sc_sym == m) n_exact++;
  endtask

  // Retrieves stored messages with half of the symbols erased.
  task automatic sc_retrieve_batch(int count);
    for (int q = 0; q < count; q++) begin
      logic [sc_C*sc_SW-1:0] m;
      logic [sc_C-1:0] k;
      int erased = 0;
      m = sc_stored[$urandom_range(0, sc_stored.size() - 1)];
      k = '1;
      while (erased < sc_C / 2) begin
        int j = $urandom_range(0, sc_C - 1);
        if (k[j]) begin k[j] = 1'b0; erased++; end
      end
      sc_retrieve(m, k);
    end
  endtask

  task automatic sc_random();
    for (int a = 0; a < sc_C; a++)
      for (int b = 0; b < sc_L; b++)
        for (int c = 0; c < sc_C; c++)
          for (int d = 0; d < sc_L; d++) sc_wm[a][b][c][d] = 1'b0;
    for (int k = 0; k < 10; k++) sc_learn(sc_MW'({$urandom, $urandom}));
    sc_retrieve_batch(60);
    for (int k = 0; k < 15; k++) sc_learn(sc_MW'({$urandom, $urandom}));
    sc_retrieve_batch(60);
  endtask

  initial begin
    rst_n = 1'b1;
    exn_start = 1'b0; exn_op = OP_LEARN; exn_msg = '0; exn_known = '0;
    exc_start = 1'b0; exc_op = OP_LEARN; exc_msg = '0; exc_known = '0;
    rn_start = 1'b0; rn_op = OP_LEARN; rn_msg = '0; rn_known = '0;
    rc_start = 1'b0; rc_op = OP_LEARN; rc_msg = '0; rc_known = '0;
    sc_start = 1'b0; sc_op = OP_LEARN; sc_msg = '0; sc_known = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    exn_example();
    exc_example();
    rn_random();
    rc_random();
    sc_random();

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
