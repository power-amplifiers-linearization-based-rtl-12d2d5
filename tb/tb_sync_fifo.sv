// tb_sync_fifo: self-checking test of sync_fifo, the buffer that pairs
// feedback with sent samples in the predistorter.
//
// Random pushes and pops every cycle against a queue kept here: the
// show-ahead output must equal the queue's head, full and empty must match
// its size, pushes when full and pops when empty must be ignored, and clear
// must empty the buffer. Both full and empty are required to have occurred.
module tb_sync_fifo;

  localparam int unsigned AW = 3;
  localparam int unsigned W  = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         clear, push, pop, full, empty;
  logic [W-1:0] din, dout;

  sync_fifo #(.AW(AW), .W(W)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_clear = 0;
  logic [W-1:0] q[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b0; push = 1'b0; pop = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == 2**AW), "full flag");
      if (q.size() > 0) check(dout == q[0], "head word");
      if (full) n_full++;
      if (empty) n_empty++;
      // bias toward filling in the first half of each 400-cycle stretch
      push  = $urandom_range(0, 99) < (((n / 400) % 2 == 0) ? 70 : 30);
      pop   = $urandom_range(0, 99) < (((n / 400) % 2 == 0) ? 30 : 70);
      clear = $urandom_range(0, 499) == 0;
      din   = W'($urandom);
      @(posedge clk);
      if (clear) begin
        q.delete();
        n_clear++;
      end else begin
        // both decisions use the state before the edge
        automatic bit was_full  = (q.size() == 2**AW);
        automatic bit was_empty = (q.size() == 0);
        if (pop && !was_empty) void'(q.pop_front());
        if (push && !was_full) q.push_back(din);
      end
    end
    check(n_full > 0 && n_empty > 0, $sformatf("full seen %0d, empty seen %0d", n_full, n_empty));
    $display("full %0d, empty %0d, clear %0d cycles", n_full, n_empty, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
