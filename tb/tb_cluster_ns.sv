// tb_cluster_ns: self-checking testbench of one cluster (C=3 clusters of
// L=4 neurons, local cluster 1).
//
// Checks: the one-hot load of the cluster's symbol (and an empty load for an
// erased symbol); the broadcast order over a revolution (neuron t at cycle
// t) and the return of the rotating register to neuron order; and two
// retrieving iterations in which the distant clusters' broadcasts and the
// slot weights are driven by the testbench, the new neuron values being
// compared with the unanimous-vote equation evaluated directly (for an
// erased symbol) or with the loaded neuron (for a given symbol, which the
// cluster must hold).
module tb_cluster_ns;
  localparam int unsigned C = 3, L = 4, IDX = 1, SW = 2;

  logic clk = 1'b0;
  logic rst_n, load, shift, retrieve, last;
  logic [C*SW-1:0] msg;
  logic [C-1:0] known, bcast_in;
  logic [C-1:0][L-1:0] w;
  logic [L-1:0] v_slots;
  logic bcast;

  int checks = 0, failures = 0;
  logic vg [C][L];
  logic wf [L][C][L];

  cluster_ns #(.C(C), .L(L), .IDX(IDX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [L-1:0] got, logic [L-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  task automatic do_load(logic [C*SW-1:0] m, logic [C-1:0] k);
    @(negedge clk);
    load = 1'b1; msg = m; known = k;
    @(negedge clk);
    load = 1'b0;
  endtask

  task automatic revolution(bit retr);
    logic [L-1:0] home;
    home = v_slots;
    for (int t = 0; t < L; t++) begin
      shift = 1'b1; retrieve = retr; last = (t == L - 1);
      for (int g = 0; g < C; g++) begin
        bcast_in[g] = (g == IDX) ? bcast : vg[g][t];
        for (int s = 0; s < L; s++) w[g][s] = wf[(s + t) % L][g][t];
      end
      #1;
      checks++;
      if (bcast !== home[t]) begin failures++; $display("FAIL broadcast order t=%0d", t); end
      @(negedge clk);
    end
    shift = 1'b0; retrieve = 1'b0; last = 1'b0;
    if (!retr) check(v_slots, home, "register back in order");
  endtask

  function automatic logic [L-1:0] expected();
    logic [L-1:0] r;
    for (int i = 0; i < L; i++) begin
      r[i] = 1'b1;
      for (int g = 0; g < C; g++) begin
        logic act = 1'b0, vote = 1'b0;
        if (g == IDX) continue;
        for (int k = 0; k < L; k++) begin
          act |= vg[g][k];
          vote |= vg[g][k] & wf[i][g][k];
        end
        r[i] &= vote | ~act;
      end
    end
    return r;
  endfunction

  initial begin
    rst_n = 1'b1; load = 1'b0; shift = 1'b0; retrieve = 1'b0; last = 1'b0;
    msg = '0; known = '0; bcast_in = '0; w = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int trial = 0; trial < 100; trial++) begin
      logic [C*SW-1:0] m;
      logic [C-1:0] k;
      m = ($urandom);
      k = ($urandom);
      k[IDX] = (trial % 5 != 0);
      do_load(m, k);
      check(v_slots, k[IDX] ? (L'(1) << m[IDX*SW +: SW]) : '0, "load");
      for (int g = 0; g < C; g++)
        for (int n = 0; n < L; n++) vg[g][n] = 1'($urandom_range(0, 1));
      revolution(1'b0);
      for (int it = 0; it < 2; it++) begin
        for (int g = 0; g < C; g++) begin
          bit empty;
          empty = ($urandom_range(0, 3) == 0);
          for (int n = 0; n < L; n++) vg[g][n] = empty ? 1'b0 : 1'($urandom_range(0, 2) == 0);
        end
        for (int i = 0; i < L; i++)
          for (int g = 0; g < C; g++)
            for (int n = 0; n < L; n++) wf[i][g][n] = 1'($urandom_range(0, 1));
        begin
          logic [L-1:0] v_before;
          v_before = v_slots;
          revolution(1'b1);
          check(v_slots, k[IDX] ? v_before : expected(), "iteration result");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
