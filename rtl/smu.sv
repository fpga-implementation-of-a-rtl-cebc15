// smu: synapse model unit of one slice.
//
// A bit-serial adder that adds an unsigned W-bit synaptic weight to the
// P-bit membrane potential of its neuron during a spike propagation step,
// least significant bit first, one bit per clock. The weight is the shorter
// operand: for bit positions W..P-1 the controller flags the weight bit as
// invalid and zero is added, so only the carry ripples on.
//
// The unit also holds the neuron's spiking bit (SB). At the start of a
// propagation step the SB is loaded with the neuron's own firing decision;
// after each full P-bit word the SB is passed to the right-hand neighbour and
// the SB of the left-hand neighbour is taken in, so the SBs of all slices
// circulate as a ring. The weight is added only while the SB held here is
// set and the neuron is not refractory (it has not fired yet in the current
// time step).
//
// Timing: ctrl.step marks a serial cycle; ctrl.first clears the carry,
// ctrl.last shifts the SB ring at the end of the word. ovf pulses in the
// last cycle of a word when the addition carries out of bit P-1; the
// membrane model unit then saturates the potential.
//
// Following the document: serial adder with inputs of two widths, SB shift
// register forming a ring, SB enabling the adder. This design's choices:
// the refractory gate and saturation on overflow.
module smu (
  input  logic                  clk,
  input  logic                  rst,
  input  hsnn_pkg::slice_ctrl_t ctrl,
  input  logic                  sb_load,   // load the SB with fire
  input  logic                  fire,      // this neuron fires now
  input  logic                  sb_left,   // SB of the left-hand neighbour
  output logic                  sb,        // SB held by this slice
  input  logic                  weight_bit,// bit from the weight memory column
  input  logic                  refractory,
  input  logic                  pot_bit,   // potential bit from the MMU (LSB first)
  output logic                  sum_bit,   // result bit back to the MMU
  output logic                  ovf        // carry out of the word's last bit
);

  logic carry_q;
  logic a, c_in, c_out;

  always_comb begin
    a       = ctrl.wvalid & weight_bit & sb & ~refractory;
    c_in    = ctrl.first ? 1'b0 : carry_q;
    sum_bit = a ^ pot_bit ^ c_in;
    c_out   = (a & pot_bit) | (a & c_in) | (pot_bit & c_in);
    ovf     = ctrl.step & ctrl.last & c_out;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      carry_q <= 1'b0;
      sb      <= 1'b0;
    end else begin
      if (ctrl.step) carry_q <= c_out;
      if (sb_load)                     sb <= fire;
      else if (ctrl.step && ctrl.last) sb <= sb_left;
    end
  end

endmodule
