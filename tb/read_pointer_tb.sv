// read_pointer_tb: self-checking test of read_pointer.
//
// Drives random rd and fifo_empty on the falling clock edge, and compares
// fifo_rd (before the rising edge) and rptr (after it) with a reference
// pointer kept in the testbench. Also checks the asynchronous reset, the
// wrap from 31 back to 0, and that an empty FIFO blocks the pointer.
module read_pointer_tb;
  localparam int unsigned PW = 5;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          rd = 1'b0, fifo_empty = 1'b0;
  logic          fifo_rd;
  logic [PW-1:0] rptr;
  logic [PW-1:0] ref_ptr;
  int checks = 0, failures = 0, wraps = 0;

  read_pointer #(.PTR_WIDTH(PW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: rptr=%0d ref=%0d fifo_rd=%0b", what, $time, rptr, ref_ptr, fifo_rd);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_ptr = '0;
    repeat (2) @(negedge clk);
    check(rptr == 0, "pointer in reset");
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      rd        = ($urandom_range(0, 3) != 0);
      fifo_empty = (i % 50 > 40);
      #1;
      check(fifo_rd == (rd && !fifo_empty), "fifo_rd gate");
      @(posedge clk);
      if (rd && !fifo_empty) begin
        if (ref_ptr == '1) wraps++;
        ref_ptr = ref_ptr + 1'b1;
      end
      #1;
      check(rptr == ref_ptr, "pointer value");
    end
    check(wraps > 0, "pointer wrapped at least once");
    // asynchronous reset away from a clock edge
    @(negedge clk);
    #2 rst_n = 1'b0;
    #1 check(rptr == 0, "asynchronous clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
