// config_regs: settings written by the host and the network state it reads.
//
// Two read/write settings: the firing threshold (P bits, reset to the
// threshold of the default membrane curve, reached from 0 in 448 steps) and
// the number of oscillation periods a run lasts (16 bits, reset to 1).
// Read-only registers report whether a run is in progress and the time
// steps, spike propagation steps, clock cycles and spikes of the current or
// last run. Writes take effect on the next clock edge; reads are
// combinational (rdata follows raddr). Unknown addresses read as 0.
//
// The document names the block and says it holds network state and host
// settings; the register map is this design's own.
module config_regs #(
  parameter int unsigned P = hsnn_pkg::P_DEFAULT
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          we,
  input  logic [7:0]                    waddr,
  input  logic [hsnn_pkg::HOST_DW-1:0]  wdata,
  input  logic [7:0]                    raddr,
  output logic [hsnn_pkg::HOST_DW-1:0]  rdata,
  output logic [P-1:0]                  threshold,
  output logic [15:0]                   run_periods,
  input  logic                          busy,
  input  logic [31:0]                   steps,
  input  logic [31:0]                   rounds,
  input  logic [31:0]                   cycles,
  input  logic [31:0]                   spikes
);
  import hsnn_pkg::*;

  always_ff @(posedge clk) begin
    if (rst) begin
      threshold   <= P'(default_threshold(P));
      run_periods <= 16'd1;
    end else if (we) begin
      case (waddr)
        8'(REG_THRESHOLD): threshold   <= wdata[P-1:0];
        8'(REG_PERIODS):   run_periods <= wdata[15:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    case (raddr)
      8'(REG_THRESHOLD): rdata = HOST_DW'(threshold);
      8'(REG_PERIODS):   rdata = HOST_DW'(run_periods);
      8'(REG_STATUS):    rdata = HOST_DW'(busy);
      8'(REG_STEPS):     rdata = steps;
      8'(REG_ROUNDS):    rdata = rounds;
      8'(REG_CYCLES):    rdata = cycles;
      8'(REG_SPIKES):    rdata = spikes;
      default:           rdata = '0;
    endcase
  end

endmodule
