// tb_hsnn_top_full: end-to-end test of hsnn_top with every parameter at its default.
//
// Drives the host command port the way a host program would: writes the
// weight memory row by row through the loading register (ring order, see
// weight_memory), reads rows back, shifts initial potentials into the slice
// chain, sets threshold and run length, starts runs, polls the status
// register while the network runs, then shifts the final potentials out and
// reads the run statistics. Every result is compared with a behavioural
// model of the algorithm kept in this file: time evolution with the
// 4-segment curve, firing, spike propagation with saturating excitatory
// additions, refractory neurons, repeated propagation while new neurons
// fire. The clock-cycle count of each run is checked against
// steps + rounds * (N*P + 3) + 1.
//
// Full size: 648 neurons, 16-bit potentials, 11-bit weights, 448 steps per
// period. Loads all 419904 weights, computed for an image-comparison
// network, runs one oscillation period, then four more, and checks the
// final phases and statistics after each run.
//
// The test counts how often each mechanism occurred (time steps,
// propagation steps, repeated propagation, saturation, refractory gating,
// command stalls, read-back, register read during a run) and fails if one
// never did.
module tb_hsnn_top_full;
  import hsnn_pkg::*;

  localparam int unsigned N = N_DEFAULT;
  localparam int unsigned P = P_DEFAULT;
  localparam int unsigned W = W_DEFAULT;
  localparam int unsigned M = M_DEFAULT;
  localparam longint unsigned VMAX = (longint'(1) << P) - 1;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic cmd_valid = 1'b0;
  logic cmd_ready;
  cmd_op_e cmd_op = CMD_NOP;
  logic [7:0]  cmd_addr = '0;
  logic [31:0] cmd_data = '0;
  logic        rsp_valid;
  logic [31:0] rsp_data;
  logic        busy;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hsnn_top  dut (
    .clk, .rst, .cmd_valid, .cmd_ready, .cmd_op, .cmd_addr, .cmd_data,
    .rsp_valid, .rsp_data, .busy
  );

  // watchdog
  initial begin
    repeat (200000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int unsigned wgt [N][N];   // wgt[pre][post]
  longint unsigned mv [N];
  bit mrefr [N];
  bit msb [N];
  longint unsigned m_steps, m_rounds, m_cycles, m_spikes;
  longint unsigned th;
  int unsigned n_sat, n_refr_gate, n_cascade, n_stall, n_readback, n_busy_read;

  function automatic longint unsigned pwl_inc(longint unsigned v);
    int unsigned seg = int'(v >> (P - 2));
    return longint'(1) << (P - 7 - seg);
  endfunction

  task automatic model_run(input int unsigned periods);
    longint unsigned target = longint'(periods) * M;
    bit any;
    m_steps = 0; m_rounds = 0; m_cycles = 0; m_spikes = 0;
    forever begin
      m_cycles++;
      any = 0;
      for (int i = 0; i < N; i++) any |= msb[i];
      if (any) begin
        m_rounds++;
        for (int i = 0; i < N; i++) m_spikes += msb[i];
        for (int c = 0; c < N; c++) begin
          if (mrefr[c]) begin
            for (int j = 0; j < N; j++) if (msb[j] && wgt[j][c] != 0) n_refr_gate++;
            continue;
          end
          for (int j = 0; j < N; j++) if (msb[j]) begin
            mv[c] += wgt[j][c];
            if (mv[c] > VMAX) begin mv[c] = VMAX; n_sat++; end
          end
        end
        m_cycles += N * P + 2;
        any = 0;
        for (int c = 0; c < N; c++) begin
          msb[c] = 0;
          if (!mrefr[c] && mv[c] >= th) begin
            mv[c] = 0; mrefr[c] = 1; msb[c] = 1; any = 1;
          end
        end
        if (any) n_cascade++;
      end else if (m_steps == target) begin
        break;
      end else begin
        m_steps++;
        for (int c = 0; c < N; c++) begin
          longint unsigned vn = mv[c] + pwl_inc(mv[c]);
          if (vn > VMAX) vn = VMAX;
          if (vn >= th) begin mv[c] = 0; mrefr[c] = 1; msb[c] = 1; end
          else begin mv[c] = vn; mrefr[c] = 0; msb[c] = 0; end
        end
      end
    end
  endtask

  // ---------------- host driver ----------------
  // called and returning at a falling clock edge
  task automatic send(input cmd_op_e op, input logic [7:0] a, input logic [31:0] d,
                      output logic [31:0] r);
    cmd_valid = 1'b1; cmd_op = op; cmd_addr = a; cmd_data = d;
    #1;
    while (!cmd_ready) begin
      n_stall++;
      @(negedge clk); #1;
    end
    @(negedge clk);
    r = rsp_valid ? rsp_data : 32'hDEAD_BEEF;
    cmd_valid = 1'b0; cmd_op = CMD_NOP;
  endtask

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL: %s got %0d expected %0d", what, got, exp);
    end
  endtask

  // bit of memory row a in column c, ring order
  function automatic bit mem_bit(int unsigned a, int unsigned c);
    int unsigned k = a / W, b = a % W;
    int unsigned pre = (c + N - (k % N)) % N;
    return bit'((wgt[pre][c] >> b) & 1);
  endfunction

  task automatic load_weights();
    logic [31:0] r;
    send(CMD_WADDR_CLEAR, 0, 0, r);
    for (int unsigned a = 0; a < N * W; a++) begin
      for (int unsigned c = 0; c < N; c++) send(CMD_WBIT_SHIFT, 0, 32'(mem_bit(a, c)), r);
      send(CMD_WROW_WRITE, 0, 0, r);
    end
  endtask

  task automatic readback_rows(input int unsigned first, input int unsigned count);
    logic [31:0] r;
    send(CMD_WADDR_CLEAR, 0, 0, r);
    for (int unsigned a = 0; a < first; a++) send(CMD_WROW_READ, 0, 0, r);
    for (int unsigned a = first; a < first + count; a++) begin
      send(CMD_WROW_READ, 0, 0, r);
      for (int unsigned c = 0; c < N; c++) begin
        send(CMD_WBIT_SHIFT, 0, 0, r);
        check($sformatf("readback row %0d col %0d", a, c), r, longint'(mem_bit(a, c)));
      end
      n_readback++;
    end
  endtask

  // shift potentials in (last neuron first); what comes out is discarded
  task automatic load_potentials();
    logic [31:0] r;
    for (int c = N - 1; c >= 0; c--) send(CMD_POT_SHIFT, 0, 32'(mv[c]), r);
    for (int c = 0; c < N; c++) begin mrefr[c] = 0; end
  endtask

  task automatic unload_and_check();
    logic [31:0] r;
    for (int c = N - 1; c >= 0; c--) begin
      send(CMD_POT_SHIFT, 0, 32'(mv[c]), r);   // puts the same values back
      check($sformatf("potential %0d", c), r, mv[c]);
    end
    for (int c = 0; c < N; c++) mrefr[c] = 0;
  endtask

  task automatic run_and_check(input int unsigned periods);
    logic [31:0] r;
    send(CMD_REG_WRITE, 8'(REG_PERIODS), periods, r);
    send(CMD_RUN, 0, 0, r);
    model_run(periods);
    do begin
      send(CMD_REG_READ, 8'(REG_STATUS), 0, r);
      if (r[0]) n_busy_read++;
      repeat (2000) @(negedge clk);
    end while (r[0]);
    send(CMD_REG_READ, 8'(REG_STEPS), 0, r);  check("steps", r, m_steps);
    send(CMD_REG_READ, 8'(REG_ROUNDS), 0, r); check("propagation steps", r, m_rounds);
    send(CMD_REG_READ, 8'(REG_SPIKES), 0, r); check("spikes", r, m_spikes);
    send(CMD_REG_READ, 8'(REG_CYCLES), 0, r);
    check("cycles", r, m_cycles);
    check("cycle formula", r, m_steps + m_rounds * (N * P + 3) + 1);
    $display("run: %0d periods, %0d steps, %0d propagation steps, %0d spikes, %0d cycles",
             periods, m_steps, m_rounds, m_spikes, r);
    unload_and_check();
  endtask

  // Image-comparison weights: neuron i carries the grey level f[i] of an
  // image region; w = wmax * (1 - 1/(1 + exp(-alpha * (|f_i - f_j| - delta))))
  // with wmax = threshold/32, alpha = 100, delta = 4. Regions fall into a few
  // grey-level groups, so the network holds a few strongly coupled clusters.
  int unsigned feat [N];
  task automatic make_weights();
    real wmax = real'(th) / 32.0;
    for (int i = 0; i < N; i++) feat[i] = 40 * $urandom_range(7) + $urandom_range(2);
    for (int j = 0; j < N; j++)
      for (int c = 0; c < N; c++) begin
        real d = real'((feat[j] > feat[c]) ? feat[j] - feat[c] : feat[c] - feat[j]);
        real x = -100.0 * (d - 4.0);
        real s = (x > 700.0) ? 0.0 : 1.0 / (1.0 + $exp(x));
        wgt[j][c] = int'($floor(wmax * (1.0 - s)));
      end
  endtask


  initial begin
    logic [31:0] r;
    th = default_threshold(P);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    send(CMD_REG_READ, 8'(REG_THRESHOLD), 0, r);
    check("reset threshold", r, th);
    make_weights();
    load_weights();
    readback_rows(0, 1);
    readback_rows(N * W - 1, 1);
    // initial phases: near the threshold, grouped loosely by feature so that
    // a group fires over a few neighbouring time steps
    for (int c = 0; c < N; c++) mv[c] = th - 1 - 64 * (feat[c] / 40) - $urandom_range(3) * 64;
    load_potentials();
    run_and_check(1);
    run_and_check(4);
    check("time steps happened", longint'(m_steps > 0), 1);
    check("spike propagation happened", longint'(m_rounds > 0), 1);
    check("repeated propagation happened", longint'(n_cascade > 0), 1);
    check("saturation happened", longint'(n_sat > 0), 1);
    check("refractory gating happened", longint'(n_refr_gate > 0), 1);
    check("command stall happened", longint'(n_stall > 0), 1);
    check("weight read-back happened", longint'(n_readback > 0), 1);
    check("register read during run happened", longint'(n_busy_read > 0), 1);
    $display("mechanisms: cascades=%0d saturations=%0d refractory_gates=%0d stalls=%0d readbacks=%0d busy_reads=%0d",
             n_cascade, n_sat, n_refr_gate, n_stall, n_readback, n_busy_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
