// write_pointer_tb: self-checking test of write_pointer.
//
// Drives random wr and fifo_full on the falling clock edge, and compares
// fifo_we (before the rising edge) and wptr (after it) with a reference
// pointer kept in the testbench. Also checks the asynchronous reset, the
// wrap from 31 back to 0, and that a full FIFO blocks the pointer.
module write_pointer_tb;
  localparam int unsigned PW = 5;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          wr = 1'b0, fifo_full = 1'b0;
  logic          fifo_we;
  logic [PW-1:0] wptr;
  logic [PW-1:0] ref_ptr;
  int checks = 0, failures = 0, wraps = 0;

  write_pointer #(.PTR_WIDTH(PW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: wptr=%0d ref=%0d fifo_we=%0b", what, $time, wptr, ref_ptr, fifo_we);
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
    check(wptr == 0, "pointer in reset");
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      wr        = ($urandom_range(0, 3) != 0);
      fifo_full = (i % 50 > 40);
      #1;
      check(fifo_we == (wr && !fifo_full), "fifo_we gate");
      @(posedge clk);
      if (wr && !fifo_full) begin
        if (ref_ptr == '1) wraps++;
        ref_ptr = ref_ptr + 1'b1;
      end
      #1;
      check(wptr == ref_ptr, "pointer value");
    end
    check(wraps > 0, "pointer wrapped at least once");
    // asynchronous reset away from a clock edge
    @(negedge clk);
    #2 rst_n = 1'b0;
    #1 check(wptr == 0, "asynchronous clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
