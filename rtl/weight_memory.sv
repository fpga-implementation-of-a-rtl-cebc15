// weight_memory: the synaptic weights of all slices, one memory array with
// one bit column per slice, as block RAM.
//
// Column c holds every weight onto neuron c, bit-serially: the address
// selects one bit of one weight in every column at once, so a read returns
// an N-bit row that gives each slice the bit its synapse model unit adds in
// that cycle. Weights are stored in ring order: the W bits of the weight
// read while the spiking bit of neuron (c - k) mod N sits in column c lie at
// addresses k*W .. k*W+W-1, least significant bit first. Depth is N*W rows.
//
// Reads and writes are synchronous (one port, read-first): rd_en latches
// row [addr] into rd_row on the next edge; wr_en stores the loading
// register into row [addr]. The loading/unloading register (a
// serial-to-parallel shift register) sits in front of the array: the host
// fills it one bit at a time before a write, and it captures rd_row on
// capture for read-back.
//
// Following the document: BRAM array with a column per slice, one bit per
// column per address, ring-ordered weights, serial-to-parallel
// loading/unloading register. The read latency of one cycle is this
// design's own (block RAM behaviour).
module weight_memory #(
  parameter int unsigned N     = hsnn_pkg::N_DEFAULT,
  parameter int unsigned W     = hsnn_pkg::W_DEFAULT,
  parameter int unsigned DEPTH = N * W,
  parameter int unsigned A     = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [A-1:0] addr,
  input  logic         rd_en,
  input  logic         wr_en,
  output logic [N-1:0] rd_row,
  // loading / unloading
  input  logic         lr_shift,
  input  logic         lr_in,
  output logic         lr_out,
  input  logic         lr_capture
);

  logic [N-1:0] mem [DEPTH];
  logic [N-1:0] lr_row;

  load_unload_reg #(.N(N)) u_lr (
    .clk, .rst,
    .shift      (lr_shift),
    .serial_in  (lr_in),
    .serial_out (lr_out),
    .capture    (lr_capture),
    .row_in     (rd_row),
    .row_out    (lr_row)
  );

  always_ff @(posedge clk) begin
    if (wr_en) mem[addr] <= lr_row;
    if (rd_en) rd_row <= mem[addr];
  end

endmodule
