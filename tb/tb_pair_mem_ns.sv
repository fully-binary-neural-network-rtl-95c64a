// tb_pair_mem_ns: self-checking testbench of the shared pair memory for
// neuron-serial access. Runs the 3x3 example size (with the printed cell
// table) and the default size L=16 with random connections.
module tb_pair_mem_ns;
  logic clk = 1'b0;
  int c3, f3, c16, f16;
  logic d3, d16;

  always #5 clk = ~clk;

  pair_mem_ns_chk #(.L(3), .FIG7(1'b1)) u_l3 (.clk(clk), .checks(c3), .failures(f3), .finished(d3));
  pair_mem_ns_chk #(.L(16), .NCONN(40)) u_l16 (.clk(clk), .checks(c16), .failures(f16), .finished(d16));

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c3 + c16, f3 + f16 + 1);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    wait (d3 && d16);
    $display("TB_RESULT checks=%0d failures=%0d", c3 + c16, f3 + f16);
    $finish;
  end
endmodule
