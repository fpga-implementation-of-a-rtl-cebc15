// tb_smu: checks the synapse model unit's serial addition of an 11-bit
// weight to a 16-bit potential, least significant bit first, with the
// spiking bit and the refractory flag gating the weight, the carry out of
// the last bit flagged as overflow, and the spiking bit taken from the left
// neighbour at the end of each word.
module tb_smu;
  import hsnn_pkg::*;
  localparam int unsigned P = 16, W = 11;
  logic clk = 0, rst = 1;
  slice_ctrl_t ctrl = '0;
  logic sb_load = 0, fire = 0, sb_left = 0, sb, weight_bit = 0, refractory = 0;
  logic pot_bit = 0, sum_bit, ovf;
  int checks = 0, failures = 0, n_ovf = 0, n_gated = 0;

  always #5 clk = ~clk;
  smu dut (.clk, .rst, .ctrl, .sb_load, .fire, .sb_left, .sb, .weight_bit, .refractory,
           .pot_bit, .sum_bit, .ovf);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [P-1:0] v, res;
    logic [W-1:0] w;
    logic s, r, left, got_ovf;
    int unsigned expv;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int t = 0; t < 300; t++) begin
      v = P'($urandom()); w = W'($urandom());
      s = ($urandom_range(3) != 0); r = ($urandom_range(4) == 0); left = 1'($urandom());
      if (t % 7 == 0) v = '1 - P'($urandom_range(100));
      // load the spiking bit
      sb_load = 1; fire = s;
      @(negedge clk);
      sb_load = 0; fire = 0;
      checks++; if (sb !== s) begin failures++; $display("FAIL: SB load"); end
      got_ovf = 0;
      refractory = r; sb_left = left;
      for (int b = 0; b < P; b++) begin
        ctrl = '0;
        ctrl.step = 1; ctrl.first = (b == 0); ctrl.last = (b == P - 1); ctrl.wvalid = (b < W);
        weight_bit = (b < W) ? w[b] : 1'($urandom());   // ignored past W
        pot_bit = v[b];
        #1;
        res[b] = sum_bit;
        if (ovf) got_ovf = 1;
        @(negedge clk);
      end
      ctrl = '0;
      expv = int'(v) + ((s && !r) ? int'(w) : 0);
      if (s && r) n_gated++;
      if (expv > (1 << P) - 1) n_ovf++;
      checks++;
      if (res !== P'(expv) || got_ovf !== (expv > (1 << P) - 1)) begin
        failures++; $display("FAIL: %0d + %0d (sb %b refr %b) gave %0d ovf %b", v, w, s, r, res, got_ovf);
      end
      checks++; if (sb !== left) begin failures++; $display("FAIL: SB ring shift"); end
    end
    checks++; if (n_ovf == 0 || n_gated == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
