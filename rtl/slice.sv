// slice: one column of the bit-slice network, instantiating one neuron.
//
// Pairs a synapse model unit (serial adder and spiking bit) with a membrane
// model unit (potential register and time evolution). The slice's column of
// the weight memory lives in the shared memory array (weight_memory), which
// delivers one weight bit per clock on weight_bit. Neighbouring slices are
// joined by the spiking-bit ring (sb_left / sb) and the P-bit potential
// load/unload chain (pot_in / pot_out); the spiking bit also feeds the
// network-wide spike detection OR.
//
// Timing is set entirely by the shared control word (see hsnn_pkg).
module slice #(
  parameter int unsigned P = hsnn_pkg::P_DEFAULT
) (
  input  logic                  clk,
  input  logic                  rst,
  input  hsnn_pkg::slice_ctrl_t ctrl,
  input  logic [P-1:0]          threshold,
  input  logic                  weight_bit,
  input  logic                  sb_left,
  output logic                  sb,
  input  logic [P-1:0]          pot_in,
  output logic [P-1:0]          pot_out
);

  logic fire, refractory, pot_bit, sum_bit, ovf;

  smu u_smu (
    .clk, .rst, .ctrl,
    .sb_load   (ctrl.evolve | ctrl.check),
    .fire, .sb_left, .sb, .weight_bit, .refractory,
    .pot_bit, .sum_bit, .ovf
  );

  mmu #(.P(P)) u_mmu (
    .clk, .rst, .ctrl, .threshold, .pot_in, .pot_out,
    .pot_bit, .sum_bit, .ovf, .fire, .refractory
  );

endmodule
