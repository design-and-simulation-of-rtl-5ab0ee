// write_pointer: write-side enable and write pointer of the FIFO buffer.
//
// A write request wr is accepted only while the FIFO is not full:
// fifo_we = wr & ~fifo_full. Each accepted write advances wptr by one on the
// rising clock edge; the pointer wraps modulo 2**PTR_WIDTH, so its low bits
// address the memory and its top bit records the wrap-around. rst_n clears the
// pointer asynchronously.
//
// Interface: clk, rst_n (active low, asynchronous), wr, fifo_full in;
// fifo_we (combinational, same cycle) and wptr (registered) out.
// Timing: fifo_we follows wr and fifo_full within the cycle; wptr changes one
// clock edge after an accepted write.
//
// Follows the published design: an enable gate ahead of a counter with
// asynchronous clear and clock enable, reset to zero. The exact gate is this
// design's reading of "write only when not full".
module write_pointer #(
  parameter int unsigned PTR_WIDTH = fifo_pkg::PTR_WIDTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr,
  input  logic                 fifo_full,
  output logic                 fifo_we,
  output logic [PTR_WIDTH-1:0] wptr
);

  assign fifo_we = wr & ~fifo_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       wptr <= '0;
    else if (fifo_we) wptr <= wptr + 1'b1;
  end

endmodule
