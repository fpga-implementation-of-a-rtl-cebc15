// hsnn_controller: the finite state machine that runs the network.
//
// Running alternates two phases. In time evolution (S_EVOLVE) every
// membrane model unit advances one time step per clock cycle. When the
// spike detection signal (OR of all spiking bits) shows that some neuron
// fired, the controller spends one cycle clearing the weight memory
// address counter and starts a spike propagation step (S_PROP): N*P clock
// cycles in which the spiking bits travel once round the ring, one position
// per P-bit word, while the memory delivers the matching weight bits (W of
// every P cycles; the other P-W cycles only ripple the carry). The memory's
// read latency is one cycle, so the serial control fields are delayed by one
// register to line up with the data, and one drain cycle (S_DRAIN) ends the
// word. S_CHECK then lets neurons pushed over the threshold fire; if any
// did, the next S_EVOLVE cycle sees the spike detection signal and another
// propagation step follows, otherwise time evolution resumes.
//
// A run lasts REG_PERIODS * M time steps; the run ends at the first
// evolution cycle after that many steps in which no neuron is firing. The
// cycle cost is therefore one cycle per time step, N*P + 3 cycles per
// propagation step and one final cycle.
//
// While idle, the controller carries out the host's one-cycle requests
// (weight loading and read-back, potential load/unload shifts, run). Read-
// back takes two cycles (S_ROWCAP waits for the memory). idle tells the
// communication controller it may issue a request.
//
// Following the document: alternation of the two phases, pause of the
// membrane units during propagation, repeated propagation while new spikes
// appear, address counter driven from here, 448 steps per period. This
// design's choices: the state encoding, the drain and check cycles, the
// run-length rule and the statistics counters.
module hsnn_controller #(
  parameter int unsigned N = hsnn_pkg::N_DEFAULT,
  parameter int unsigned P = hsnn_pkg::P_DEFAULT,
  parameter int unsigned W = hsnn_pkg::W_DEFAULT,
  parameter int unsigned M = hsnn_pkg::M_DEFAULT
) (
  input  logic                   clk,
  input  logic                   rst,
  input  hsnn_pkg::host_req_t    host_req,
  input  logic [15:0]            run_periods,
  output logic                   idle,
  // network
  output hsnn_pkg::slice_ctrl_t  ctrl,
  input  logic                   spike_detect,
  input  logic [$clog2(N+1)-1:0] n_spiking,
  // weight memory
  output logic                   addr_clear,
  output logic                   addr_inc,
  output logic                   mem_rd_en,
  output logic                   mem_wr_en,
  output logic                   lr_shift,
  output logic                   lr_in,
  output logic                   lr_capture,
  // statistics of the current / last run
  output logic [31:0]            steps,
  output logic [31:0]            rounds,
  output logic [31:0]            cycles,
  output logic [31:0]            spikes
);

  typedef enum logic [2:0] {
    S_IDLE, S_ROWCAP, S_EVOLVE, S_PROP, S_DRAIN, S_CHECK
  } state_e;

  localparam int unsigned BW = (P > 1) ? $clog2(P) : 1;
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1;

  state_e         state;
  logic [BW-1:0]  bit_q;
  logic [KW-1:0]  pos_q;
  logic [31:0]    target;
  logic           step_d, first_d, last_d, wvalid_d;
  logic           prop_wbit;

  assign idle      = (state == S_IDLE);
  assign prop_wbit = (state == S_PROP) && (32'(bit_q) < W);

  always_comb begin
    ctrl            = '0;
    ctrl.evolve     = (state == S_EVOLVE) && !spike_detect && (steps != target);
    ctrl.check      = (state == S_CHECK);
    ctrl.step       = step_d;
    ctrl.first      = first_d;
    ctrl.last       = last_d;
    ctrl.wvalid     = wvalid_d;
    ctrl.pot_shift  = idle && host_req.pot_shift;

    addr_clear = (idle && host_req.waddr_clear) ||
                 ((state == S_EVOLVE) && spike_detect);
    addr_inc   = (idle && (host_req.wrow_write || host_req.wrow_read)) || prop_wbit;
    mem_rd_en  = (idle && host_req.wrow_read) || prop_wbit;
    mem_wr_en  = idle && host_req.wrow_write;
    lr_shift   = idle && host_req.wbit_shift;
    lr_in      = host_req.wbit;
    lr_capture = (state == S_ROWCAP);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      bit_q    <= '0;
      pos_q    <= '0;
      target   <= '0;
      steps    <= '0;
      rounds   <= '0;
      cycles   <= '0;
      spikes   <= '0;
      step_d   <= 1'b0;
      first_d  <= 1'b0;
      last_d   <= 1'b0;
      wvalid_d <= 1'b0;
    end else begin
      // serial control, one cycle behind the memory address
      step_d   <= (state == S_PROP);
      first_d  <= (state == S_PROP) && (bit_q == '0);
      last_d   <= (state == S_PROP) && (32'(bit_q) == P - 1);
      wvalid_d <= prop_wbit;

      if (state != S_IDLE && state != S_ROWCAP) cycles <= cycles + 1;

      unique case (state)
        S_IDLE: begin
          if (host_req.wrow_read) state <= S_ROWCAP;
          else if (host_req.run) begin
            state  <= S_EVOLVE;
            target <= 32'(run_periods) * M;
            steps  <= '0;
            rounds <= '0;
            cycles <= '0;
            spikes <= '0;
          end
        end
        S_ROWCAP: state <= S_IDLE;
        S_EVOLVE: begin
          if (spike_detect) begin
            state  <= S_PROP;
            bit_q  <= '0;
            pos_q  <= '0;
            rounds <= rounds + 1;
            spikes <= spikes + 32'(n_spiking);
          end else if (steps == target) begin
            state <= S_IDLE;
          end else begin
            steps <= steps + 1;
          end
        end
        S_PROP: begin
          if (32'(bit_q) == P - 1) begin
            bit_q <= '0;
            if (32'(pos_q) == N - 1) begin
              pos_q <= '0;
              state <= S_DRAIN;
            end else begin
              pos_q <= pos_q + 1'b1;
            end
          end else begin
            bit_q <= bit_q + 1'b1;
          end
        end
        S_DRAIN: state <= S_CHECK;
        S_CHECK: state <= S_EVOLVE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The membrane units never evolve while a serial addition is under way,
  // and host requests only arrive while idle.
  a_no_evolve_in_prop: assert property (@(posedge clk) disable iff (rst)
    !(ctrl.evolve && ctrl.step));
  a_host_only_idle: assert property (@(posedge clk) disable iff (rst)
    (host_req != '0) |-> idle);

endmodule
