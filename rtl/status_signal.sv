// status_signal: status flag generator of the FIFO buffer.
//
// Full and empty come from the two pointers alone. pointer_equal is true when
// their address bits match; fbit_comp is the XOR of their wrap bits. With the
// address bits equal, differing wrap bits mean the writer is a whole lap
// ahead (full), equal wrap bits mean the reader has caught up (empty).
// fifo_threshold is the OR of the two top bits of wptr - rptr, i.e. the FIFO
// holds at least half its depth (8 of 16 words).
// fifo_overflow and fifo_underflow are sticky registered flags.
// overflow_set = wr & fifo_full (a write refused) sets fifo_overflow; the next
// accepted read clears it. underflow_set = rd & fifo_empty (a read refused)
// sets fifo_underflow; the next accepted write clears it. rst_n clears both.
//
// Interface: clk, rst_n (active low, asynchronous), wr, rd, fifo_we, fifo_rd,
// wptr, rptr in; fifo_full, fifo_empty, fifo_threshold (combinational) and
// fifo_overflow, fifo_underflow (registered) out.
// Timing: full, empty and threshold follow the pointers in the same cycle;
// overflow and underflow rise one clock edge after the refused request.
//
// The structure (pointer comparison, a pointer subtractor feeding an OR for
// the threshold, two clock-enabled flip-flops with clear for overflow and
// underflow) follows the published design. The threshold level and the set
// and clear rules of the two sticky flags are this design's choices.
module status_signal #(
  parameter int unsigned PTR_WIDTH = fifo_pkg::PTR_WIDTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr,
  input  logic                 rd,
  input  logic                 fifo_we,
  input  logic                 fifo_rd,
  input  logic [PTR_WIDTH-1:0] wptr,
  input  logic [PTR_WIDTH-1:0] rptr,
  output logic                 fifo_full,
  output logic                 fifo_empty,
  output logic                 fifo_threshold,
  output logic                 fifo_overflow,
  output logic                 fifo_underflow
);

  localparam int unsigned ADDR_WIDTH = PTR_WIDTH - 1;

  logic                 fbit_comp;
  logic                 pointer_equal;
  logic [PTR_WIDTH-1:0] pointer_result;
  logic                 overflow_set;
  logic                 underflow_set;

  always_comb begin
    fbit_comp      = wptr[PTR_WIDTH-1] ^ rptr[PTR_WIDTH-1];
    pointer_equal  = (wptr[ADDR_WIDTH-1:0] == rptr[ADDR_WIDTH-1:0]);
    pointer_result = wptr - rptr;
    fifo_full      = fbit_comp & pointer_equal;
    fifo_empty     = ~fbit_comp & pointer_equal;
    fifo_threshold = pointer_result[PTR_WIDTH-1] | pointer_result[PTR_WIDTH-2];
    overflow_set   = wr & fifo_full;
    underflow_set  = rd & fifo_empty;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            fifo_overflow <= 1'b0;
    else if (overflow_set) fifo_overflow <= 1'b1;
    else if (fifo_rd)      fifo_overflow <= 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             fifo_underflow <= 1'b0;
    else if (underflow_set) fifo_underflow <= 1'b1;
    else if (fifo_we)       fifo_underflow <= 1'b0;
  end

  // A FIFO is never full and empty at once.
  a_not_full_and_empty: assert property (@(posedge clk) disable iff (!rst_n)
    !(fifo_full && fifo_empty));

endmodule
