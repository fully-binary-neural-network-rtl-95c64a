// pair_mem_ns_chk: stimulus and checks for one pair_mem_ns instance of size
// L, used by tb_pair_mem_ns.
//
// A reference L x L weight matrix is built in the testbench from random
// connections (or, with FIG7 set, from all connections of a random 3x3
// matrix). Each connection (a,b) is learnt in one revolution: the row
// cluster's rotating selection holds a one-hot a, the column broadcast is
// high at cycle b. Then the checker verifies
//   * every ring cell against RING(M,N) = WEIGHT((M+N) mod L, N), and, with
//     FIG7, against the cell table printed for the 3x3 example;
//   * during a read revolution, row_w[s] = WEIGHT((s+t) mod L, t) and
//     col_w[s] = WEIGHT(t, (s+t) mod L) at every cycle t;
//   * that the rings are back in their initial state after the revolution.
module pair_mem_ns_chk #(
  parameter int unsigned L     = 16,
  parameter int unsigned NCONN = 40,
  parameter bit          FIG7  = 1'b0
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);
  logic rst_n, valid, store;
  logic [L-1:0] row_v, row_w, col_w;
  logic col_b;
  logic wref [L][L];

  pair_mem_ns #(.L(L)) dut (.*);

  // Cell table of the 3x3 example: ring M, cell N holds weight x_k with
  // k = row*3 + column.
  int unsigned fig7 [3][3] = '{'{0, 4, 8}, '{3, 7, 2}, '{6, 1, 5}};

  task automatic learn(int unsigned a, int unsigned b);
    logic [L-1:0] sel;
    sel = '0;
    sel[a] = 1'b1;
    for (int unsigned t = 0; t < L; t++) begin
      @(negedge clk);
      valid = 1'b1; store = 1'b1;
      row_v = sel;
      col_b = (t == b);
      @(posedge clk);
      sel = {sel[0], sel[L-1:1]};   // rotate towards slot 0
    end
    @(negedge clk);
    valid = 1'b0; store = 1'b0; row_v = '0; col_b = 1'b0;
    wref[a][b] = 1'b1;
  endtask

  initial begin
    checks = 0; failures = 0; finished = 1'b0;
    rst_n = 1'b1; valid = 1'b0; store = 1'b0; row_v = '0; col_b = 1'b0;
    #1 rst_n = 1'b0;
    for (int a = 0; a < L; a++) for (int b = 0; b < L; b++) wref[a][b] = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    if (FIG7) begin
      for (int a = 0; a < L; a++)
        for (int b = 0; b < L; b++)
          if ($urandom_range(0, 1) == 1) learn(a, b);
    end else begin
      for (int k = 0; k < NCONN; k++) learn($urandom_range(0, L-1), $urandom_range(0, L-1));
      learn(0, L-1);
      learn(L-1, 0);
    end
    // Mapping of the rings.
    for (int m = 0; m < L; m++) begin
      for (int n = 0; n < L; n++) begin
        checks++;
        if (dut.cells[m][n] !== wref[(m+n)%L][n]) begin
          failures++;
          $display("FAIL L=%0d ring %0d cell %0d", L, m, n);
        end
        if (FIG7) begin
          checks++;
          if (dut.cells[m][n] !== wref[fig7[m][n]/3][fig7[m][n]%3]) begin
            failures++;
            $display("FAIL example table ring %0d cell %0d", m, n);
          end
        end
      end
    end
    // One read revolution.
    for (int t = 0; t < L; t++) begin
      @(negedge clk);
      for (int s = 0; s < L; s++) begin
        checks += 2;
        if (row_w[s] !== wref[(s+t)%L][t]) begin
          failures++; $display("FAIL L=%0d row tap t=%0d s=%0d", L, t, s);
        end
        if (col_w[s] !== wref[t][(s+t)%L]) begin
          failures++; $display("FAIL L=%0d col tap t=%0d s=%0d", L, t, s);
        end
      end
      valid = 1'b1;
    end
    @(negedge clk);
    valid = 1'b0;
    for (int m = 0; m < L; m++)
      for (int n = 0; n < L; n++) begin
        checks++;
        if (dut.cells[m][n] !== wref[(m+n)%L][n]) begin
          failures++; $display("FAIL L=%0d after revolution ring %0d cell %0d", L, m, n);
        end
      end
    finished = 1'b1;
  end
endmodule
