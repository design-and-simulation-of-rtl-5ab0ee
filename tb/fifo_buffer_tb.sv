// fifo_buffer_tb: end-to-end test of the 16 x 8 FIFO buffer at its default size.
//
// Phase 1 repeats the classic fill-and-drain run: after reset the FIFO is
// empty; 16 words are written on 16 consecutive clocks (inputs change on the
// falling edge), the counter climbs 1..16 and full rises exactly after the
// 16th write. A further write is refused and raises overflow. Then 16 reads on
// consecutive clocks return the words in order while the counter falls to 0
// and empty rises after the 16th read; a further read raises underflow.
// Phase 2 runs random traffic, with simultaneous reads and writes, against a
// queue model, checking data_out, all flags and the counter every cycle.
// Every mechanism (full, empty, threshold, overflow, underflow, refused
// write, refused read, simultaneous read and write, pointer wrap) is counted
// and must occur at least once.
module fifo_buffer_tb;
  localparam int unsigned DW = 8, D = 16;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          wr = 1'b0, rd = 1'b0;
  logic [DW-1:0] data_in = '0;
  logic [DW-1:0] data_out;
  logic          fifo_full, fifo_empty, fifo_threshold, fifo_overflow, fifo_underflow;
  logic [4:0]    fifo_counter;

  logic [DW-1:0] model[$];
  logic          ref_ovf, ref_unf;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_thr = 0, n_ovf = 0, n_unf = 0;
  int n_wr_refused = 0, n_rd_refused = 0, n_both = 0, n_writes = 0, n_reads = 0;
  int cycles_to_full, cycles_to_empty;

  // first words of the fill: the byte values of the classic simulation trace
  localparam logic [DW-1:0] FILL [14] = '{8'd136, 8'd137, 8'd200, 8'd139, 8'd217, 8'd201,
                                          8'd169, 8'd249, 8'd143, 8'd191, 8'd187, 8'd253,
                                          8'd207, 8'd190};

  fifo_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: cnt=%0d model=%0d out=%0d full=%0b empty=%0b thr=%0b ovf=%0b unf=%0b",
               what, $time, fifo_counter, model.size(), data_out, fifo_full, fifo_empty,
               fifo_threshold, fifo_overflow, fifo_underflow);
    end
  endtask

  // compare every output with the queue model (call between edges)
  task automatic check_state(input string what);
    check(fifo_counter == 5'(model.size()), {what, ": counter"});
    check(fifo_full == (model.size() == D), {what, ": full"});
    check(fifo_empty == (model.size() == 0), {what, ": empty"});
    check(fifo_threshold == (model.size() >= D / 2), {what, ": threshold"});
    check(fifo_overflow == ref_ovf, {what, ": overflow"});
    check(fifo_underflow == ref_unf, {what, ": underflow"});
    if (model.size() > 0) check(data_out == model[0], {what, ": head word"});
    if (fifo_full) n_full++;
    if (fifo_empty) n_empty++;
    if (fifo_threshold) n_thr++;
    if (fifo_overflow) n_ovf++;
    if (fifo_underflow) n_unf++;
  endtask

  // one clock with the given requests; updates the model at the rising edge
  task automatic cycle(input logic w, input logic r, input logic [DW-1:0] d);
    logic do_w, do_r;
    @(negedge clk);
    wr = w; rd = r; data_in = d;
    do_w = w && model.size() < D;
    do_r = r && model.size() > 0;
    if (w && !do_w) n_wr_refused++;
    if (r && !do_r) n_rd_refused++;
    if (do_w && do_r) n_both++;
    #1 if (do_r) check(data_out == model[0], "word taken by the read");
    @(posedge clk);
    if (w && !do_w)  ref_ovf = 1'b1;
    else if (do_r)   ref_ovf = 1'b0;
    if (r && !do_r)  ref_unf = 1'b1;
    else if (do_w)   ref_unf = 1'b0;
    if (do_r) begin void'(model.pop_front()); n_reads++; end
    if (do_w) begin model.push_back(d); n_writes++; end
    #1 check_state("cycle");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_ovf = 1'b0;
    ref_unf = 1'b0;
    repeat (2) @(negedge clk);
    check_state("reset");
    check(fifo_empty && fifo_counter == 0, "empty after reset");
    rst_n = 1'b1;

    // Phase 1: fill with 16 writes on consecutive clocks
    cycles_to_full = 0;
    for (int i = 0; i < D; i++) begin
      cycle(1'b1, 1'b0, (i < 14) ? FILL[i] : DW'($urandom));
      cycles_to_full++;
      check(fifo_counter == 5'(i + 1), "counter climbs by one per write");
      check(fifo_full == (i == D - 1), "full only after the 16th write");
    end
    check(cycles_to_full == D, "16 writes take 16 clocks");
    cycle(1'b1, 1'b0, 8'hA5);               // refused: FIFO full
    check(fifo_overflow, "overflow after write while full");
    check(fifo_counter == 5'(D), "refused write does not count");
    // drain with 16 reads on consecutive clocks
    cycles_to_empty = 0;
    for (int i = 0; i < D; i++) begin
      if (i < 14) check(data_out == FILL[i], "words leave in write order");
      cycle(1'b0, 1'b1, '0);
      cycles_to_empty++;
      check(fifo_counter == 5'(D - 1 - i), "counter falls by one per read");
      check(fifo_empty == (i == D - 1), "empty only after the 16th read");
    end
    check(cycles_to_empty == D, "16 reads take 16 clocks");
    check(!fifo_overflow, "overflow cleared by a read");
    cycle(1'b0, 1'b1, '0);                   // refused: FIFO empty
    check(fifo_underflow, "underflow after read while empty");
    cycle(1'b1, 1'b0, 8'h3C);
    check(!fifo_underflow, "underflow cleared by a write");

    // Phase 2: random traffic with phases that lean to writing or reading
    for (int n = 0; n < 3000; n++) begin
      int lean;
      lean = (n / 150) % 3;   // 0: mostly writes, 1: mostly reads, 2: balanced
      cycle($urandom_range(0, 3) < (lean == 0 ? 3 : lean == 1 ? 1 : 2),
            $urandom_range(0, 3) < (lean == 0 ? 1 : lean == 1 ? 3 : 2),
            DW'($urandom));
    end
    // a simultaneous read and write leaves the counter unchanged
    while (model.size() == 0 || model.size() == D) cycle(1'b1, 1'b0, DW'($urandom));
    begin
      int cnt_before;
      cnt_before = int'(fifo_counter);
      cycle(1'b1, 1'b1, 8'h5A);
      check(int'(fifo_counter) == cnt_before, "simultaneous read and write keep the count");
    end

    $display("writes=%0d reads=%0d full=%0d empty=%0d threshold=%0d overflow=%0d underflow=%0d",
             n_writes, n_reads, n_full, n_empty, n_thr, n_ovf, n_unf);
    $display("refused_writes=%0d refused_reads=%0d simultaneous=%0d pointer_laps=%0d",
             n_wr_refused, n_rd_refused, n_both, n_writes / 32);
    check(n_full > 0, "full happened");
    check(n_empty > 0, "empty happened");
    check(n_thr > 0, "threshold happened");
    check(n_ovf > 0, "overflow happened");
    check(n_unf > 0, "underflow happened");
    check(n_wr_refused > 0, "refused write happened");
    check(n_rd_refused > 0, "refused read happened");
    check(n_both > 0, "simultaneous read and write happened");
    check(n_writes >= 32, "write pointer wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
