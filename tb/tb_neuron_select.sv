// tb_neuron_select: self-checking testbench of the neuron selection.
//
// Two instances: the default 8x16 network (cluster 5) and the 3x3 example
// network (cluster 2, where symbol 3 is out of range). Random messages and
// known flags; the expected one-hot vector is computed from the symbol.
module tb_neuron_select;
  logic [31:0] msg_a;
  logic        known_a;
  logic [15:0] sel_a;
  logic [5:0]  msg_b;
  logic        known_b;
  logic [2:0]  sel_b;
  int checks = 0, failures = 0;

  neuron_select #(.C(8), .L(16), .IDX(5)) dut_a (.msg(msg_a), .known(known_a), .sel(sel_a));
  neuron_select #(.C(3), .L(3),  .IDX(2)) dut_b (.msg(msg_b), .known(known_b), .sel(sel_b));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      logic [15:0] exp_a;
      logic [2:0]  exp_b;
      int unsigned sa, sb;
      msg_a = $urandom; known_a = 1'($urandom_range(0, 3) != 0);
      msg_b = 6'($urandom); known_b = 1'($urandom_range(0, 3) != 0);
      #1;
      sa = (msg_a >> 20) & 15;
      sb = (msg_b >> 4) & 3;
      exp_a = known_a ? (16'd1 << sa) : 16'd0;
      exp_b = (known_b && sb < 3) ? (3'd1 << sb) : 3'd0;
      checks += 2;
      if (sel_a !== exp_a) begin failures++; $display("FAIL a msg=%h got %h exp %h", msg_a, sel_a, exp_a); end
      if (sel_b !== exp_b) begin failures++; $display("FAIL b msg=%h got %h exp %h", msg_b, sel_b, exp_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
