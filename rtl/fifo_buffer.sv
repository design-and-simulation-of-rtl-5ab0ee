// fifo_buffer: 16 x 8 first-in first-out buffer with status flags.
//
// Two pointers into a dual-ported memory replace any shifting of data: the
// write pointer marks where the next word goes, the read pointer where the
// oldest word sits. Both are one bit wider than the memory address so that
// full (writer one lap ahead) and empty (pointers identical) can be told apart.
// Blocks: write_pointer (accepts wr when not full, advances wptr),
// read_pointer (accepts rd when not empty, advances rptr), memory_array
// (16 x 8, written at wptr, read at rptr with no delay), status_signal
// (full, empty, half-full threshold, sticky overflow and underflow) and
// fifo_counter (words held, 0..16).
//
// Interface: one clock clk, asynchronous active-low reset rst_n; wr/data_in
// write a word, rd removes the head word shown on data_out.
// Timing: a word written at a clock edge is on data_out (if the FIFO was
// empty) and counted from that edge on; a read takes the word shown on
// data_out in that cycle and the next word appears after the edge. One write
// and one read can complete every cycle; refused requests are flagged one
// cycle later on fifo_overflow / fifo_underflow.
//
// The block structure, port names and 16 x 8 size follow the published
// design; the choices noted in each block's header are this design's own.
module fifo_buffer #(
  parameter int unsigned DATA_WIDTH = fifo_pkg::DATA_WIDTH,
  parameter int unsigned DEPTH      = fifo_pkg::DEPTH,
  localparam int unsigned PTR_WIDTH = $clog2(DEPTH) + 1,
  localparam int unsigned CNT_WIDTH = $clog2(DEPTH + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr,
  input  logic                  rd,
  input  logic [DATA_WIDTH-1:0] data_in,
  output logic [DATA_WIDTH-1:0] data_out,
  output logic                  fifo_full,
  output logic                  fifo_empty,
  output logic                  fifo_threshold,
  output logic                  fifo_overflow,
  output logic                  fifo_underflow,
  output logic [CNT_WIDTH-1:0]  fifo_counter
);

  logic                 fifo_we, fifo_rd;
  logic [PTR_WIDTH-1:0] wptr, rptr;

  write_pointer #(.PTR_WIDTH(PTR_WIDTH)) u_write_pointer (
    .clk, .rst_n, .wr, .fifo_full, .fifo_we, .wptr
  );

  read_pointer #(.PTR_WIDTH(PTR_WIDTH)) u_read_pointer (
    .clk, .rst_n, .rd, .fifo_empty, .fifo_rd, .rptr
  );

  memory_array #(.DATA_WIDTH(DATA_WIDTH), .DEPTH(DEPTH), .PTR_WIDTH(PTR_WIDTH)) u_memory_array (
    .clk, .fifo_we, .wptr, .rptr, .data_in, .data_out
  );

  status_signal #(.PTR_WIDTH(PTR_WIDTH)) u_status_signal (
    .clk, .rst_n, .wr, .rd, .fifo_we, .fifo_rd, .wptr, .rptr,
    .fifo_full, .fifo_empty, .fifo_threshold, .fifo_overflow, .fifo_underflow
  );

  fifo_counter #(.DEPTH(DEPTH), .CNT_WIDTH(CNT_WIDTH)) u_fifo_counter (
    .clk, .rst_n, .fifo_we, .fifo_rd, .count(fifo_counter)
  );

  // The counter and the pointer difference describe the same occupancy.
  a_count_matches_pointers: assert property (@(posedge clk) disable iff (!rst_n)
    fifo_counter == CNT_WIDTH'(PTR_WIDTH'(wptr - rptr)));

endmodule
