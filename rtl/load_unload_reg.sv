// load_unload_reg: the serial-to-parallel register on top of the weight
// memory, used to initialise the weights and to read them back.
//
// An N-bit shift register, one bit per memory column. Each shift moves the
// bits one column down: serial_in enters at column N-1 and column 0's bit
// leaves on serial_out, so after N shifts the first bit sent sits in column
// 0 and the previous contents have all come out, column 0 first. capture
// loads the register in parallel from a memory row (for read-back); the
// register contents are what a memory write stores. capture has priority
// over shift.
//
// Following the document: an N-bit serial-to-parallel register between the
// host and the memory array. This design's own: the shift direction and the
// capture-over-shift priority.
module load_unload_reg #(
  parameter int unsigned N = hsnn_pkg::N_DEFAULT
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         shift,
  input  logic         serial_in,
  output logic         serial_out,
  input  logic         capture,
  input  logic [N-1:0] row_in,
  output logic [N-1:0] row_out
);

  always_ff @(posedge clk) begin
    if (rst)          row_out <= '0;
    else if (capture) row_out <= row_in;
    else if (shift)   row_out <= N'({serial_in, row_out} >> 1);
  end

  assign serial_out = row_out[0];

endmodule
