// mmu: membrane model unit of one slice.
//
// Holds the neuron's P-bit membrane potential and computes its time
// evolution. In a time-evolution cycle (ctrl.evolve) the potential grows by
// a piecewise-linear approximation of 1 - exp(-t) with four segments,
// selected by the potential's two top bits; the increment of segment s is
// 2**(P-7-s), so each segment's slope is half the previous one and no
// multiplier is needed. From 0 the potential reaches the default threshold
// in exactly 448 steps (see hsnn_pkg). When the new potential reaches the
// threshold the neuron fires: the potential is reset to 0 and the neuron
// becomes refractory until the next time-evolution cycle.
//
// During spike propagation (ctrl.step) the potential register is a shift
// register: bit 0 goes to the synapse model unit, its sum bit comes back
// into bit P-1, so after P cycles the whole word has passed through the
// serial adder once. A carry out of the last bit saturates the potential.
// After a propagation step (ctrl.check) a neuron that is not refractory and
// whose potential has reached the threshold fires.
//
// ctrl.pot_shift moves a P-bit word in from the left-hand slice (or from the
// host for slice 0) and clears the refractory flag; the potential is always
// visible on pot_out for the right-hand slice (or the host): this is the
// loading / unloading chain.
//
// Following the document: 4-segment PWL curve, reset at threshold, potential
// exchanged bit-serially with the SMU, P-bit load/unload buses. This
// design's choices: segment slopes and breakpoints, reset value 0,
// saturation, refractory flag.
module mmu #(
  parameter int unsigned P = hsnn_pkg::P_DEFAULT
) (
  input  logic                  clk,
  input  logic                  rst,
  input  hsnn_pkg::slice_ctrl_t ctrl,
  input  logic [P-1:0]          threshold,
  input  logic [P-1:0]          pot_in,
  output logic [P-1:0]          pot_out,
  output logic                  pot_bit,
  input  logic                  sum_bit,
  input  logic                  ovf,
  output logic                  fire,
  output logic                  refractory
);

  logic [P-1:0] v_q, v_next, inc;
  logic [P:0]   v_sum;
  logic [1:0]   seg;

  always_comb begin
    seg    = v_q[P-1 -: 2];
    inc    = '0;
    inc[hsnn_pkg::pwl_shift(P, 0) - 32'(seg)] = 1'b1;
    v_sum  = {1'b0, v_q} + {1'b0, inc};
    v_next = v_sum[P] ? '1 : v_sum[P-1:0];
    fire   = (ctrl.evolve && v_next >= threshold) ||
             (ctrl.check && !refractory && v_q >= threshold);
  end

  assign pot_out = v_q;
  assign pot_bit = v_q[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q        <= '0;
      refractory <= 1'b0;
    end else if (ctrl.pot_shift) begin
      v_q        <= pot_in;
      refractory <= 1'b0;
    end else if (ctrl.evolve) begin
      v_q        <= fire ? '0 : v_next;
      refractory <= fire;
    end else if (ctrl.check) begin
      if (fire) begin
        v_q        <= '0;
        refractory <= 1'b1;
      end
    end else if (ctrl.step) begin
      v_q <= ovf ? '1 : {sum_bit, v_q[P-1:1]};
    end
  end

endmodule
