// tb_hsnn: checks the slice array (N = 5) with this testbench acting as the
// controller and the weight memory. Each trial loads random potentials
// through the chain, takes one time-evolution step that makes some neurons
// fire, checks the spike detection OR and the spike count, then runs a full
// spike propagation step (the spiking bits travel once round the ring while
// the matching weight bits are presented in ring order) and a threshold
// check, and compares every potential and spiking bit with a reference
// model. Potentials are read at the end of a trial by rotating the chain
// once (a chain shift clears the refractory flags, so not in between).
module tb_hsnn;
  import hsnn_pkg::*;
  localparam int unsigned N = 5, P = 16, W = 11;
  logic clk = 0, rst = 1;
  slice_ctrl_t ctrl = '0;
  logic [P-1:0] threshold, pot_in = '0, pot_out;
  logic [N-1:0] weight_bits = '0;
  logic spike_detect;
  logic [$clog2(N+1)-1:0] n_spiking;
  int checks = 0, failures = 0, n_casc = 0;

  int unsigned wgt [N][N];
  int unsigned mv [N];
  bit mrefr [N], msb [N];

  always #5 clk = ~clk;
  hsnn #(.N(N), .P(P)) dut (.clk, .rst, .ctrl, .threshold, .weight_bits, .pot_in, .pot_out,
                            .spike_detect, .n_spiking);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // rotate the chain once: reads every potential and puts it back
  task automatic check_potentials();
    logic [P-1:0] got [N];
    for (int c = N - 1; c >= 0; c--) begin
      got[c] = pot_out;
      ctrl = '0; ctrl.pot_shift = 1; pot_in = pot_out;
      @(negedge clk);
    end
    ctrl = '0;
    for (int c = 0; c < N; c++)
      chk(got[c] == P'(mv[c]), $sformatf("neuron %0d potential %0d expected %0d", c, got[c], mv[c]));
  endtask

  function automatic int unsigned pwl_inc(int unsigned v);
    return 1 << (9 - (v >> 14));
  endfunction

  initial begin
    int unsigned cnt, vn;
    bit any;
    threshold = P'(default_threshold(P));
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int t = 0; t < 30; t++) begin
      for (int j = 0; j < N; j++) for (int c = 0; c < N; c++) wgt[j][c] = $urandom_range(2047);
      for (int c = 0; c < N; c++) begin
        mv[c] = (($urandom_range(1) != 0) ? threshold - 30 : $urandom_range(threshold - 2100));
        if (t % 3 == 0 && c > 0) mv[c] = threshold - 2047 * 2 + $urandom_range(2000);
      end
      for (int c = N - 1; c >= 0; c--) begin
        ctrl = '0; ctrl.pot_shift = 1; pot_in = P'(mv[c]); @(negedge clk);
      end
      ctrl = '0;
      // time step
      cnt = 0;
      for (int c = 0; c < N; c++) begin
        vn = mv[c] + pwl_inc(mv[c]);
        msb[c] = (vn >= threshold); mrefr[c] = msb[c]; mv[c] = msb[c] ? 0 : vn; cnt += msb[c];
      end
      ctrl.evolve = 1; @(negedge clk); ctrl = '0;
      chk(spike_detect == (cnt != 0) && n_spiking == cnt, "spike detection after time step");
      // propagation rounds while neurons keep firing
      while (cnt != 0) begin
        for (int c = 0; c < N; c++) if (!mrefr[c])
          for (int j = 0; j < N; j++) if (msb[j]) mv[c] = (mv[c] + wgt[j][c] > 65535) ? 65535 : mv[c] + wgt[j][c];
        for (int k = 0; k < N; k++)
          for (int b = 0; b < P; b++) begin
            ctrl = '0; ctrl.step = 1; ctrl.first = (b == 0); ctrl.last = (b == P - 1); ctrl.wvalid = (b < W);
            for (int c = 0; c < N; c++)
              weight_bits[c] = (b < W) ? 1'((wgt[(c + N - k) % N][c] >> b) & 1) : 1'b1;
            @(negedge clk);
          end
        ctrl = '0;
        for (int c = 0; c < N; c++) chk(dut.sb[c] == msb[c], "spiking bits back in place");
        cnt = 0;
        for (int c = 0; c < N; c++) begin
          msb[c] = !mrefr[c] && mv[c] >= threshold;
          if (msb[c]) begin mv[c] = 0; mrefr[c] = 1; cnt++; end
        end
        ctrl.check = 1; @(negedge clk); ctrl = '0;
        chk(spike_detect == (cnt != 0) && n_spiking == cnt, "spike detection after check");
        if (cnt != 0) n_casc++;
      end
      check_potentials();
    end
    chk(n_casc > 0, "cascade happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
