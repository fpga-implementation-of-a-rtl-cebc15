// hsnn_top: a fully connected network of oscillatory leaky
// integrate-and-fire neurons in a bit-slice architecture, with its host
// interface.
//
// The host loads the synaptic weights into the weight memory row by row
// (through the serial-to-parallel loading register), shifts initial membrane
// potentials into the slices through the potential chain, sets the
// threshold and run length, starts a run and, when it ends, shifts the
// potentials (the neurons' phases) back out and reads the run statistics.
//
// Blocks: com_controller (host commands), config_regs, hsnn_controller
// (FSM), addr_counter and weight_memory (weights, N*W rows of N bits), hsnn
// (N slices, each a synapse model unit and a membrane model unit, joined in
// a spiking-bit ring). Host link: cmd_valid/cmd_ready with cmd_op, cmd_addr
// and cmd_data; rsp_valid/rsp_data the cycle after a command that answers.
// busy is high while a run is in progress. Synchronous active-high reset.
//
// Following the document: the block structure and connections (host link,
// communication controller, configuration registers, controller, slice
// array with shared weight memory) and the sizes 648 / 16 / 11 / 448. This
// design's own: the host command set and the reset style.
module hsnn_top #(
  parameter int unsigned N = hsnn_pkg::N_DEFAULT,
  parameter int unsigned P = hsnn_pkg::P_DEFAULT,
  parameter int unsigned W = hsnn_pkg::W_DEFAULT,
  parameter int unsigned M = hsnn_pkg::M_DEFAULT
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          cmd_valid,
  output logic                          cmd_ready,
  input  hsnn_pkg::cmd_op_e             cmd_op,
  input  logic [7:0]                    cmd_addr,
  input  logic [hsnn_pkg::HOST_DW-1:0]  cmd_data,
  output logic                          rsp_valid,
  output logic [hsnn_pkg::HOST_DW-1:0]  rsp_data,
  output logic                          busy
);
  import hsnn_pkg::*;

  localparam int unsigned DEPTH = N * W;
  localparam int unsigned A     = $clog2(DEPTH);

  logic                   reg_we;
  logic [7:0]             reg_addr;
  logic [HOST_DW-1:0]     reg_wdata, reg_rdata;
  logic [P-1:0]           threshold;
  logic [15:0]            run_periods;
  logic                   idle;
  host_req_t              host_req;
  slice_ctrl_t            ctrl;
  logic                   spike_detect;
  logic [$clog2(N+1)-1:0] n_spiking;
  logic                   addr_clear, addr_inc, mem_rd_en, mem_wr_en;
  logic                   lr_shift, lr_in, lr_out, lr_capture;
  logic [A-1:0]           addr;
  logic [N-1:0]           weight_bits;
  logic [P-1:0]           pot_in, pot_out;
  logic [31:0]            steps, rounds, cycles, spikes;

  assign busy = !idle;

  com_controller #(.P(P)) u_com (
    .clk, .rst,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_addr, .cmd_data, .rsp_valid, .rsp_data,
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .ctrl_idle (idle), .host_req,
    .lr_out, .pot_in, .pot_out
  );

  config_regs #(.P(P)) u_regs (
    .clk, .rst,
    .we (reg_we), .waddr (reg_addr), .wdata (reg_wdata),
    .raddr (reg_addr), .rdata (reg_rdata),
    .threshold, .run_periods,
    .busy, .steps, .rounds, .cycles, .spikes
  );

  hsnn_controller #(.N(N), .P(P), .W(W), .M(M)) u_ctrl (
    .clk, .rst, .host_req, .run_periods, .idle,
    .ctrl, .spike_detect, .n_spiking,
    .addr_clear, .addr_inc, .mem_rd_en, .mem_wr_en, .lr_shift, .lr_in, .lr_capture,
    .steps, .rounds, .cycles, .spikes
  );

  addr_counter #(.DEPTH(DEPTH)) u_addr (
    .clk, .rst, .clear (addr_clear), .inc (addr_inc), .addr
  );

  weight_memory #(.N(N), .W(W)) u_wmem (
    .clk, .rst, .addr, .rd_en (mem_rd_en), .wr_en (mem_wr_en),
    .rd_row (weight_bits),
    .lr_shift, .lr_in, .lr_out, .lr_capture
  );

  hsnn #(.N(N), .P(P)) u_hsnn (
    .clk, .rst, .ctrl, .threshold,
    .weight_bits, .pot_in, .pot_out, .spike_detect, .n_spiking
  );

endmodule
