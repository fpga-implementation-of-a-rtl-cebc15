// com_controller: decodes the host's commands and moves their data.
//
// The host side is a valid/ready command port (operation, register address,
// 32-bit data) and a response port that pulses rsp_valid for one cycle, the
// cycle after a command that returns data (register read, weight bit shift,
// potential shift). A command is taken on a cycle with cmd_valid and
// cmd_ready both high. Register reads are taken at any time; every other
// command waits (cmd_ready low) while the network runs or a memory
// read-back is in progress.
//
// Register writes and reads go straight to the configuration registers.
// Weight-memory and potential-chain commands and the run command become
// one-cycle requests to the HSNN controller; the weight bit and the
// potential word pass through this block to the loading register and to
// slice 0, and the bit or word shifted out comes back as the response.
// Command encodings are listed in hsnn_pkg.
//
// The document says only that this block, with the host link, takes care
// of communication with the host; the command set and handshake are this
// design's own.
module com_controller #(
  parameter int unsigned P = hsnn_pkg::P_DEFAULT
) (
  input  logic                          clk,
  input  logic                          rst,
  // host command / response
  input  logic                          cmd_valid,
  output logic                          cmd_ready,
  input  hsnn_pkg::cmd_op_e             cmd_op,
  input  logic [7:0]                    cmd_addr,
  input  logic [hsnn_pkg::HOST_DW-1:0]  cmd_data,
  output logic                          rsp_valid,
  output logic [hsnn_pkg::HOST_DW-1:0]  rsp_data,
  // configuration registers
  output logic                          reg_we,
  output logic [7:0]                    reg_addr,
  output logic [hsnn_pkg::HOST_DW-1:0]  reg_wdata,
  input  logic [hsnn_pkg::HOST_DW-1:0]  reg_rdata,
  // HSNN controller
  input  logic                          ctrl_idle,
  output hsnn_pkg::host_req_t           host_req,
  // data paths
  input  logic                          lr_out,
  output logic [P-1:0]                  pot_in,
  input  logic [P-1:0]                  pot_out
);
  import hsnn_pkg::*;

  logic take;

  assign cmd_ready = ctrl_idle || cmd_op == CMD_REG_READ || cmd_op == CMD_NOP;
  assign take      = cmd_valid && cmd_ready;

  assign reg_we    = take && cmd_op == CMD_REG_WRITE;
  assign reg_addr  = cmd_addr;
  assign reg_wdata = cmd_data;
  assign pot_in    = cmd_data[P-1:0];

  always_comb begin
    host_req             = '0;
    host_req.waddr_clear = take && cmd_op == CMD_WADDR_CLEAR;
    host_req.wbit_shift  = take && cmd_op == CMD_WBIT_SHIFT;
    host_req.wbit        = cmd_data[0];
    host_req.wrow_write  = take && cmd_op == CMD_WROW_WRITE;
    host_req.wrow_read   = take && cmd_op == CMD_WROW_READ;
    host_req.pot_shift   = take && cmd_op == CMD_POT_SHIFT;
    host_req.run         = take && cmd_op == CMD_RUN;
    if (!host_req.wbit_shift) host_req.wbit = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (take) begin
        unique case (cmd_op)
          CMD_REG_READ:   begin rsp_valid <= 1'b1; rsp_data <= reg_rdata; end
          CMD_WBIT_SHIFT: begin rsp_valid <= 1'b1; rsp_data <= HOST_DW'(lr_out); end
          CMD_POT_SHIFT:  begin rsp_valid <= 1'b1; rsp_data <= HOST_DW'(pot_out); end
          default: ;
        endcase
      end
    end
  end

  // the configuration register read port follows the command address
  a_req_onehot: assert property (@(posedge clk) disable iff (rst)
    $onehot0({host_req.waddr_clear, host_req.wbit_shift, host_req.wrow_write,
              host_req.wrow_read, host_req.pot_shift, host_req.run}));

endmodule
