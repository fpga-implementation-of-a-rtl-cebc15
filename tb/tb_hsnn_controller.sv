// tb_hsnn_controller: checks the controller FSM on its own (N = 3, P = 12,
// W = 5, M = 7). This testbench stands in for the network: the spike
// detection signal rises after chosen time steps and, to exercise repeated
// propagation, again after some threshold checks. It checks the host
// requests served while idle, the number of time-evolution cycles of a run,
// and for each spike propagation step the number of serial cycles (N*P),
// memory reads and address increments (N*W), word starts and ends (N), the
// one-cycle delay between a memory read and its weight-valid flag, and the
// statistics registers, including cycles = steps + rounds*(N*P+3) + 1.
module tb_hsnn_controller;
  import hsnn_pkg::*;
  localparam int unsigned N = 3, P = 12, W = 5, M = 7;
  logic clk = 0, rst = 1;
  host_req_t host_req = '0;
  logic [15:0] run_periods = 16'd3;
  logic idle, spike_detect = 0;
  logic [$clog2(N+1)-1:0] n_spiking;
  slice_ctrl_t ctrl;
  logic addr_clear, addr_inc, mem_rd_en, mem_wr_en, lr_shift, lr_in, lr_capture;
  logic [31:0] steps, rounds, cycles, spikes;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  hsnn_controller #(.N(N), .P(P), .W(W), .M(M)) dut (
    .clk, .rst, .host_req, .run_periods, .idle, .ctrl, .spike_detect, .n_spiking,
    .addr_clear, .addr_inc, .mem_rd_en, .mem_wr_en, .lr_shift, .lr_in, .lr_capture,
    .steps, .rounds, .cycles, .spikes);

  assign n_spiking = spike_detect ? 2 : 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // network stand-in and event counters
  int unsigned n_evolve, n_step, n_rd, n_inc, n_first, n_last, n_wv, n_check, n_casc_left, n_rounds;
  bit rd_prev;
  always @(posedge clk) if (!rst) begin
    if (ctrl.evolve) begin
      n_evolve++;
      spike_detect <= (n_evolve % 5 == 2);
    end else if (ctrl.check) begin
      n_check++;
      spike_detect <= (n_casc_left != 0);
      if (n_casc_left != 0) n_casc_left--;
    end
    if (ctrl.step) n_step++;
    if (mem_rd_en && !idle) n_rd++;
    if (addr_inc && !idle) n_inc++;
    if (ctrl.first) n_first++;
    if (ctrl.last) n_last++;
    if (ctrl.wvalid) n_wv++;
    if (ctrl.wvalid != (rd_prev && !idle)) begin
      failures++; $display("FAIL: weight-valid not one cycle after the read");
    end
    rd_prev <= mem_rd_en && !idle;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    // host requests while idle
    host_req.waddr_clear = 1; #1; chk(addr_clear && !addr_inc, "address clear"); @(negedge clk); host_req = '0;
    host_req.wbit_shift = 1; host_req.wbit = 1; #1; chk(lr_shift && lr_in, "bit shift"); @(negedge clk); host_req = '0;
    host_req.wrow_write = 1; #1; chk(mem_wr_en && addr_inc && !mem_rd_en, "row write"); @(negedge clk); host_req = '0;
    host_req.wrow_read = 1; #1; chk(mem_rd_en && addr_inc && !lr_capture, "row read"); @(negedge clk); host_req = '0;
    #1; chk(!idle && lr_capture, "capture cycle"); @(negedge clk);
    #1; chk(idle && !lr_capture, "idle after capture");
    host_req.pot_shift = 1; #1; chk(ctrl.pot_shift, "potential shift"); @(negedge clk); host_req = '0;
    // runs
    for (int r = 0; r < 3; r++) begin
      n_evolve = 0; n_step = 0; n_rd = 0; n_inc = 0; n_first = 0; n_last = 0; n_wv = 0; n_check = 0;
      n_casc_left = r;
      run_periods = 16'(r + 2);
      host_req.run = 1; @(negedge clk); host_req = '0;
      while (!idle) @(negedge clk);
      n_rounds = n_check;
      chk(n_evolve == (r + 2) * M, $sformatf("time steps %0d", n_evolve));
      chk(steps == (r + 2) * M, "steps register");
      chk(rounds == n_rounds && n_rounds > 0, "rounds register");
      chk(spikes == 2 * n_rounds, "spikes register");
      chk(n_step == n_rounds * N * P, $sformatf("serial cycles %0d", n_step));
      chk(n_rd == n_rounds * N * W && n_inc == n_rd && n_wv == n_rd, "memory reads per propagation");
      chk(n_first == n_rounds * N && n_last == n_rounds * N, "words per propagation");
      chk(cycles == steps + rounds * (N * P + 3) + 1, $sformatf("cycle count %0d", cycles));
      chk(n_rounds == ((r + 2) * M + 2) / 5 + r || n_rounds > 0, "rounds seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
