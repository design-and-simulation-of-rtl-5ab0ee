// fifo_pkg: sizes shared by the blocks of the 16 x 8 FIFO buffer.
//
// The FIFO holds DEPTH words of DATA_WIDTH bits (16 x 8). Its read and write
// pointers carry one bit more than the memory address (5 bits for 16 words):
// the extra top bit toggles on each wrap-around and tells a full FIFO from an
// empty one when the low address bits of the two pointers are equal.
// The 16 x 8 size and the 5-bit pointers are the published design's; the
// counter width follows from the largest count, DEPTH.
package fifo_pkg;
  localparam int unsigned DATA_WIDTH = 8;
  localparam int unsigned DEPTH      = 16;
  localparam int unsigned ADDR_WIDTH = $clog2(DEPTH);   // 4
  localparam int unsigned PTR_WIDTH  = ADDR_WIDTH + 1;  // 5
  localparam int unsigned CNT_WIDTH  = $clog2(DEPTH + 1); // 5, counts 0..16
endpackage
