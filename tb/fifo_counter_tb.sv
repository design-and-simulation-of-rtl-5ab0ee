// fifo_counter_tb: self-checking test of the occupancy counter.
//
// Drives accepted writes and reads as a 16-deep FIFO would (no write at 16,
// no read at 0), including simultaneous ones, and compares the count with a
// reference after every clock edge. Checks that the counter reaches 16,
// returns to 0, and does not move when a write and a read coincide.
module fifo_counter_tb;
  localparam int unsigned D = 16, CW = 5;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          fifo_we = 1'b0, fifo_rd = 1'b0;
  logic [CW-1:0] count;
  int unsigned   ref_cnt;
  int checks = 0, failures = 0, n_top = 0, n_zero = 0, n_both = 0;

  fifo_counter #(.DEPTH(D), .CNT_WIDTH(CW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: count=%0d expected=%0d", what, $time, count, ref_cnt);
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
    ref_cnt = 0;
    repeat (2) @(negedge clk);
    check(count == 0, "zero in reset");
    rst_n = 1'b1;
    // 16 writes, one per cycle, then 16 reads
    for (int n = 0; n < 2 * D; n++) begin
      @(negedge clk);
      fifo_we = (n < D);
      fifo_rd = (n >= D);
      @(posedge clk);
      ref_cnt = (n < D) ? ref_cnt + 1 : ref_cnt - 1;
      #1 check(count == CW'(ref_cnt), "fill and drain");
      if (n == D - 1) check(count == CW'(D), "count 16 after 16 writes");
    end
    // random traffic
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      // phases of 100 cycles lean towards writing, then towards reading
      fifo_we = ($urandom_range(0, 3) < ((n / 100) % 2 == 0 ? 3 : 1)) && ref_cnt < D;
      fifo_rd = ($urandom_range(0, 3) < ((n / 100) % 2 == 0 ? 1 : 3)) && ref_cnt > 0;
      if (fifo_we && fifo_rd) n_both++;
      @(posedge clk);
      if (fifo_we && !fifo_rd) ref_cnt++;
      if (fifo_rd && !fifo_we) ref_cnt--;
      if (ref_cnt == D) n_top++;
      if (ref_cnt == 0) n_zero++;
      #1 check(count == CW'(ref_cnt), "random traffic");
    end
    check(n_both > 0 && n_top > 0 && n_zero > 0, "cases exercised");
    $display("both=%0d at16=%0d at0=%0d", n_both, n_top, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
