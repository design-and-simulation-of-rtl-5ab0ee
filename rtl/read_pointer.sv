// read_pointer: read-side enable and read pointer of the FIFO buffer.
//
// A read request rd is accepted only while the FIFO is not empty:
// fifo_rd = rd & ~fifo_empty. Each accepted read advances rptr by one on the
// rising clock edge, wrapping modulo 2**PTR_WIDTH; the top bit records the
// wrap-around. rst_n clears the pointer asynchronously.
//
// Interface: clk, rst_n (active low, asynchronous), rd, fifo_empty in;
// fifo_rd (combinational) and rptr (registered) out.
// Timing: the word at rptr is on the memory's output during the cycle the read
// is accepted; rptr moves to the next word at that cycle's rising edge.
//
// Follows the published design: an enable gate ahead of a counter with
// asynchronous clear and clock enable, reset to zero. The gate itself is this
// design's reading of "no read while empty".
module read_pointer #(
  parameter int unsigned PTR_WIDTH = fifo_pkg::PTR_WIDTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rd,
  input  logic                 fifo_empty,
  output logic                 fifo_rd,
  output logic [PTR_WIDTH-1:0] rptr
);

  assign fifo_rd = rd & ~fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       rptr <= '0;
    else if (fifo_rd) rptr <= rptr + 1'b1;
  end

endmodule
