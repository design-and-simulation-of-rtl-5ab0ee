// status_signal_tb: self-checking test of the status flag generator.
//
// Drives pointer pairs whose difference covers every occupancy 0..16 at
// every rotation, with random rd/wr requests, and compares fifo_full,
// fifo_empty and fifo_threshold with values computed from the occupancy.
// fifo_we and fifo_rd are driven as a FIFO would drive them (requests gated
// by full and empty), and the sticky overflow and underflow flags are checked
// against a reference model of their set and clear rules.
module status_signal_tb;
  localparam int unsigned PW = 5, D = 16;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          wr = 1'b0, rd = 1'b0, fifo_we, fifo_rd;
  logic [PW-1:0] wptr = '0, rptr = '0;
  logic          fifo_full, fifo_empty, fifo_threshold, fifo_overflow, fifo_underflow;
  logic          ref_ovf, ref_unf;
  int unsigned   occ;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_ovf = 0, n_unf = 0;

  status_signal #(.PTR_WIDTH(PW)) dut (.*);

  assign fifo_we = wr & ~(occ == D);
  assign fifo_rd = rd & ~(occ == 0);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: wptr=%0d rptr=%0d full=%0b empty=%0b thr=%0b ovf=%0b unf=%0b",
               what, $time, wptr, rptr, fifo_full, fifo_empty, fifo_threshold,
               fifo_overflow, fifo_underflow);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_ovf = 1'b0;
    ref_unf = 1'b0;
    occ     = 0;
    repeat (2) @(negedge clk);
    check(!fifo_overflow && !fifo_underflow, "flags in reset");
    rst_n = 1'b1;
    for (int n = 0; n < 1200; n++) begin
      @(negedge clk);
      occ  = (n < 17 * 32) ? (n % 17) : $urandom_range(0, D);
      rptr = (n < 17 * 32) ? PW'(n / 17) : PW'($urandom);
      wptr = rptr + PW'(occ);
      wr   = $urandom_range(0, 2) == 0;
      rd   = $urandom_range(0, 2) == 0;
      #1;
      check(fifo_full == (occ == D), "full");
      check(fifo_empty == (occ == 0), "empty");
      check(fifo_threshold == (occ >= D / 2), "threshold");
      if (occ == D) n_full++;
      if (occ == 0) n_empty++;
      @(posedge clk);
      if (wr && occ == D) ref_ovf = 1'b1;
      else if (fifo_rd)   ref_ovf = 1'b0;
      if (rd && occ == 0) ref_unf = 1'b1;
      else if (fifo_we)   ref_unf = 1'b0;
      if (ref_ovf) n_ovf++;
      if (ref_unf) n_unf++;
      #1;
      check(fifo_overflow == ref_ovf, "overflow");
      check(fifo_underflow == ref_unf, "underflow");
    end
    check(n_full > 0 && n_empty > 0 && n_ovf > 0 && n_unf > 0, "all flags exercised");
    $display("full=%0d empty=%0d overflow=%0d underflow=%0d", n_full, n_empty, n_ovf, n_unf);
    // asynchronous clear of the sticky flags
    @(negedge clk);
    occ = D; wptr = rptr + PW'(D); wr = 1'b1; rd = 1'b0;
    @(posedge clk); #1;
    check(fifo_overflow, "overflow set before reset");
    #2 rst_n = 1'b0;
    #1 check(!fifo_overflow && !fifo_underflow, "asynchronous clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
