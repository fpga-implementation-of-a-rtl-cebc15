// tb_slice: one slice driven as the array would drive it: potential loaded
// through the chain, a propagation word with its own spiking bit clear
// (nothing added), then a word with the left neighbour's spiking bit (weight
// added), then the threshold check, and finally a time-evolution step.
module tb_slice;
  import hsnn_pkg::*;
  localparam int unsigned P = 16, W = 11;
  logic clk = 0, rst = 1;
  slice_ctrl_t ctrl = '0;
  logic [P-1:0] threshold, pot_in = '0, pot_out;
  logic weight_bit = 0, sb_left = 0, sb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  slice #(.P(P)) dut (.clk, .rst, .ctrl, .threshold, .weight_bit, .sb_left, .sb,
                      .pot_in, .pot_out);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic word(input logic [W-1:0] w);
    for (int b = 0; b < P; b++) begin
      ctrl = '0; ctrl.step = 1; ctrl.first = (b == 0); ctrl.last = (b == P - 1);
      ctrl.wvalid = (b < W); weight_bit = (b < W) ? w[b] : 1'b1;
      @(negedge clk);
    end
    ctrl = '0;
  endtask

  initial begin
    logic [P-1:0] v;
    logic [W-1:0] w;
    int unsigned e;
    threshold = P'(default_threshold(P));
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int t = 0; t < 40; t++) begin
      v = P'($urandom_range(threshold - 1)); w = W'($urandom());
      if (t % 5 == 0) v = threshold - P'($urandom_range(1000));
      ctrl.pot_shift = 1; pot_in = v; @(negedge clk); ctrl = '0;
      chk(pot_out == v, "load");
      ctrl.check = 1; @(negedge clk); ctrl = '0;       // below threshold: SB cleared
      chk(sb == 0, "no spike");
      sb_left = 1;
      word(w);                                           // own SB clear: no add
      chk(pot_out == v && sb == 1, "word without spike");
      sb_left = 0;
      word(w);                                           // left neighbour's spike: add
      e = int'(v) + int'(w);
      chk(pot_out == P'(e) && sb == 0, $sformatf("word with spike %0d+%0d got %0d", v, w, pot_out));
      ctrl.check = 1; #1; @(negedge clk); ctrl = '0;
      chk(sb == (e >= threshold), "spike after propagation");
      chk(pot_out == ((e >= threshold) ? 0 : P'(e)), "reset after spike");
      ctrl.evolve = 1; @(negedge clk); ctrl = '0;
      chk(sb == 0, "evolve step clears SB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
