// memory_array_tb: self-checking test of memory_array (16 x 8).
//
// Fills every location, then mixes random writes (with and without fifo_we)
// and random read addresses, comparing data_out with a reference array kept
// in the testbench. Checks that the read port is combinational, that the
// pointers' wrap bit does not change the address, and that a write with
// fifo_we low leaves the memory unchanged.
module memory_array_tb;
  localparam int unsigned DW = 8, D = 16, PW = 5;

  logic          clk = 1'b0;
  logic          fifo_we = 1'b0;
  logic [PW-1:0] wptr = '0, rptr = '0;
  logic [DW-1:0] data_in = '0;
  logic [DW-1:0] data_out;
  logic [DW-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  memory_array #(.DATA_WIDTH(DW), .DEPTH(D), .PTR_WIDTH(PW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: rptr=%0d data_out=%0d expected=%0d", what, $time,
               rptr, data_out, ref_mem[rptr[3:0]]);
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
    // fill all 16 words
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      fifo_we = 1'b1;
      wptr    = PW'(i);
      data_in = DW'($urandom);
      ref_mem[i] = data_in;
    end
    @(negedge clk);
    fifo_we = 1'b0;
    // read every location, with both values of the wrap bit
    for (int i = 0; i < 2 * D; i++) begin
      rptr = PW'(i);
      #1 check(data_out == ref_mem[i % D], "read after fill");
    end
    // random traffic
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      fifo_we = $urandom_range(0, 1) == 1;
      wptr    = PW'($urandom);
      data_in = DW'($urandom);
      rptr    = PW'($urandom);
      #1 check(data_out == ref_mem[rptr[3:0]], "read before edge");
      @(posedge clk);
      if (fifo_we) ref_mem[wptr[3:0]] = data_in;
      #1 check(data_out == ref_mem[rptr[3:0]], "read after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
