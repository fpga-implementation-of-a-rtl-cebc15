// hsnn_pkg: sizes, types and constants shared by the spiking neural network
// (HSNN) modules.
//
// The default network is the main configuration: 648 fully connected
// neurons, 16-bit membrane potentials, 11-bit synaptic weights and an
// oscillation period of 448 time steps. The membrane model uses a 4-segment
// piecewise-linear rising curve; the segment slopes, the threshold and the
// host command encoding are this design's own choices (see mmu.sv and
// com_controller.sv).
package hsnn_pkg;

  localparam int unsigned N_DEFAULT = 648;  // neurons = slices = columns
  localparam int unsigned P_DEFAULT = 16;   // membrane potential width
  localparam int unsigned W_DEFAULT = 11;   // synaptic weight width
  localparam int unsigned M_DEFAULT = 448;  // time steps per oscillation period

  localparam int unsigned HOST_DW = 32;     // host command / response data width

  // Piecewise-linear membrane curve. The potential range is split into four
  // equal segments by its two top bits; in segment s the potential grows by
  // 2**(P-7-s) per time step, so the slope halves from one segment to the
  // next (a 1 - exp(-t) shape). From 0, segments 0..2 take 32, 64 and 128
  // steps and 224 steps of segment 3 reach the threshold: 448 steps in all.
  function automatic int unsigned pwl_shift(input int unsigned p, input int unsigned seg);
    return p - 7 - seg;
  endfunction

  function automatic longint unsigned default_threshold(input int unsigned p);
    return (longint'(3) << (p - 2)) + (longint'(224) << (p - 10));
  endfunction

  // Host commands, decoded by com_controller.
  typedef enum logic [3:0] {
    CMD_NOP         = 4'd0,
    CMD_REG_WRITE   = 4'd1,  // config register [addr] <= data
    CMD_REG_READ    = 4'd2,  // respond with config register [addr]
    CMD_WADDR_CLEAR = 4'd3,  // weight memory address counter <= 0
    CMD_WBIT_SHIFT  = 4'd4,  // shift data[0] into the loading register, respond with the bit shifted out
    CMD_WROW_WRITE  = 4'd5,  // write the loading register to memory, address + 1
    CMD_WROW_READ   = 4'd6,  // read memory into the loading register, address + 1
    CMD_POT_SHIFT   = 4'd7,  // shift data[P-1:0] into slice 0 of the potential chain, respond with slice N-1's potential
    CMD_RUN         = 4'd8   // run the network for REG_PERIODS oscillation periods
  } cmd_op_e;

  // Configuration / status register map.
  typedef enum logic [7:0] {
    REG_THRESHOLD = 8'd0,  // RW firing threshold
    REG_PERIODS   = 8'd1,  // RW oscillation periods per run
    REG_STATUS    = 8'd2,  // RO bit 0: run in progress
    REG_STEPS     = 8'd3,  // RO time steps executed by the last run
    REG_ROUNDS    = 8'd4,  // RO spike propagation steps of the last run
    REG_CYCLES    = 8'd5,  // RO clock cycles taken by the last run
    REG_SPIKES    = 8'd6   // RO spikes processed by the last run
  } reg_addr_e;

  // One-cycle requests from the communication controller to the HSNN
  // controller; acted on only while the network is idle.
  typedef struct packed {
    logic waddr_clear;
    logic wbit_shift;
    logic wbit;
    logic wrow_write;
    logic wrow_read;
    logic pot_shift;
    logic run;
  } host_req_t;

  // Control from the HSNN controller to every slice. The serial fields are
  // aligned with the weight bits coming out of the memory.
  typedef struct packed {
    logic evolve;  // time-evolution step for every membrane model unit
    logic check;   // threshold check after a spike propagation step
    logic step;    // one serial-add cycle of spike propagation
    logic first;   // bit 0 of a potential word (clear the carry)
    logic last;    // bit P-1 of a potential word (pass the spiking bit on)
    logic wvalid;  // the memory bit is a weight bit (bit index < W)
    logic pot_shift;  // shift the potential load/unload chain
  } slice_ctrl_t;

endpackage
