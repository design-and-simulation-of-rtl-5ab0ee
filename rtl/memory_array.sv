// memory_array: DEPTH x DATA_WIDTH storage of the FIFO buffer (16 x 8).
//
// On a rising clock edge with fifo_we high, data_in is stored at the location
// addressed by the low ADDR_WIDTH bits of wptr. The read port is
// asynchronous: data_out always shows the word addressed by the low bits of
// rptr, so the oldest word is visible at the output before it is read
// (first-word fall-through). The top pointer bits are the wrap bits and do not
// take part in addressing.
//
// Interface: clk, fifo_we, wptr, rptr, data_in in; data_out out.
// Timing: a write takes effect at the clock edge; data_out follows rptr and
// the memory contents combinationally.
//
// The 16 x 8 size and the port list are the published design's. The
// asynchronous read port is this design's choice: the memory has no read
// enable, only the read pointer. The storage is not reset.
module memory_array #(
  parameter int unsigned DATA_WIDTH = fifo_pkg::DATA_WIDTH,
  parameter int unsigned DEPTH      = fifo_pkg::DEPTH,
  parameter int unsigned PTR_WIDTH  = fifo_pkg::PTR_WIDTH
) (
  input  logic                  clk,
  input  logic                  fifo_we,
  input  logic [PTR_WIDTH-1:0]  wptr,
  input  logic [PTR_WIDTH-1:0]  rptr,
  input  logic [DATA_WIDTH-1:0] data_in,
  output logic [DATA_WIDTH-1:0] data_out
);

  localparam int unsigned ADDR_WIDTH = $clog2(DEPTH);

  logic [DATA_WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (fifo_we) mem[wptr[ADDR_WIDTH-1:0]] <= data_in;
  end

  assign data_out = mem[rptr[ADDR_WIDTH-1:0]];

  initial begin
    assert (PTR_WIDTH == ADDR_WIDTH + 1)
      else $error("memory_array: PTR_WIDTH must be one more than the address width");
    assert (DEPTH == (1 << ADDR_WIDTH))
      else $error("memory_array: DEPTH must be a power of two");
  end

endmodule
