// hsnn: the array of N identical slices.
//
// Slice c receives bit c of the weight memory's output row, takes its
// spiking bit (SB) from slice c-1 and passes its own to slice c+1; slice N-1
// feeds slice 0, closing the SB ring. The P-bit potential load/unload chain
// runs the same way but is open: pot_in enters slice 0 and pot_out leaves
// slice N-1. The only global signals are the control word, the threshold
// and the spike detection signal, the OR of every slice's SB, which tells
// the controller that at least one neuron is firing. n_spiking counts the
// set SBs so the controller can report how many spikes were processed.
//
// Following the document: ring of SBs, left/right neighbour links, OR over
// all SBs as spike detection. The spike count output is this design's own.
module hsnn #(
  parameter int unsigned N = hsnn_pkg::N_DEFAULT,
  parameter int unsigned P = hsnn_pkg::P_DEFAULT
) (
  input  logic                  clk,
  input  logic                  rst,
  input  hsnn_pkg::slice_ctrl_t ctrl,
  input  logic [P-1:0]          threshold,
  input  logic [N-1:0]          weight_bits,
  input  logic [P-1:0]          pot_in,
  output logic [P-1:0]          pot_out,
  output logic                  spike_detect,
  output logic [$clog2(N+1)-1:0] n_spiking
);

  logic [N-1:0]        sb;
  logic [P-1:0]        pot [N+1];

  assign pot[0] = pot_in;

  for (genvar c = 0; c < N; c++) begin : g_col
    slice #(.P(P)) u_slice (
      .clk, .rst, .ctrl, .threshold,
      .weight_bit (weight_bits[c]),
      .sb_left    (sb[(c + N - 1) % N]),
      .sb         (sb[c]),
      .pot_in     (pot[c]),
      .pot_out    (pot[c+1])
    );
  end

  assign pot_out      = pot[N];
  assign spike_detect = |sb;

  always_comb begin
    n_spiking = '0;
    for (int c = 0; c < N; c++) n_spiking += $bits(n_spiking)'(sb[c]);
  end

endmodule
