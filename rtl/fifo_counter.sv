// fifo_counter: occupancy counter of the FIFO buffer.
//
// Counts the words held: +1 for each accepted write (fifo_we), -1 for each
// accepted read (fifo_rd), unchanged when both happen in the same cycle.
// Because only accepted operations are counted it stays within 0..DEPTH
// (0..16 for the 16 x 8 buffer). rst_n clears it asynchronously.
//
// Interface: clk, rst_n (active low, asynchronous), fifo_we, fifo_rd in;
// count (registered) out.
// Timing: the count changes at the rising edge that completes the operation.
//
// The counting rules are the published design's; its width and reset value
// are this design's choices.
module fifo_counter #(
  parameter int unsigned DEPTH     = fifo_pkg::DEPTH,
  parameter int unsigned CNT_WIDTH = $clog2(DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 fifo_we,
  input  logic                 fifo_rd,
  output logic [CNT_WIDTH-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else begin
      unique case ({fifo_we, fifo_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  a_no_overcount: assert property (@(posedge clk) disable iff (!rst_n)
    !(fifo_we && !fifo_rd && count == CNT_WIDTH'(DEPTH)));
  a_no_undercount: assert property (@(posedge clk) disable iff (!rst_n)
    !(fifo_rd && !fifo_we && count == '0));

endmodule
