// addr_counter: the "+1" address counter of the weight memory.
//
// Produces the memory address. During a spike propagation step it advances
// by one for each weight bit read, so it walks from bit 0 of the first
// weight of every column to the most significant bit of the last weight;
// after address DEPTH-1 it wraps to 0. The same counter steps through the
// rows while the host loads or reads back the memory. clear has priority
// over inc; both act on the next clock edge.
//
// Following the document: a +1 counter, reset after the last weight bit.
// This design's own: the clear input and the synchronous reset.
module addr_counter #(
  parameter int unsigned DEPTH = hsnn_pkg::N_DEFAULT * hsnn_pkg::W_DEFAULT,
  parameter int unsigned A     = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         inc,
  output logic [A-1:0] addr
);

  always_ff @(posedge clk) begin
    if (rst || clear)                     addr <= '0;
    else if (inc && addr == A'(DEPTH - 1)) addr <= '0;
    else if (inc)                          addr <= addr + 1'b1;
  end

endmodule
