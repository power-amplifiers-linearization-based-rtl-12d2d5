// tb_cgmp_predistorter: end-to-end test of the adaptive predistorter.
//
// The predistorter (default parameters) drives a behavioural compressive
// amplifier (pa_model) whose output returns as feedback. A block of 1024
// random complex samples, amplitude up to 0.5 of full scale, is sent once
// with adaptation off and then five more times with adaptation on, the
// five adaptation passes the predistorter is meant to converge in. Checked:
//  - the table is initialised to unity gain: in_ready stays low for 256
//    cycles and the first pass leaves every sample unchanged (z == x);
//  - x -> z latency is 4 cycles and a feedback sample reaches the table
//    write 11 cycles after it is taken;
//  - the amplifier's error |y - x|^2 falls by more than 20 dB after five
//    passes, and every pass improves on the unlinearised error;
//  - updates are written, and updates for near-zero samples are skipped;
//  - with the feedback cut, samples beyond the 16-entry pairing FIFO are
//    flagged, turning adaptation off flushes the FIFO, and feedback with no
//    sample waiting is flagged.
// Each of these mechanisms is counted, and one that never happened is a
// failure.
module tb_cgmp_predistorter;
  import cgmp_pkg::*;

  localparam int unsigned N      = 1024;
  localparam int unsigned PASSES = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    in_valid, in_ready, out_valid;
  sample_t x, z, y, pa_y;
  logic    adapt_en, fb_valid, pa_v, fb_connect, inj_fb;
  logic    upd_pulse, skip_pulse, fb_orphan, fifo_full;

  cgmp_predistorter dut (.*);

  pa_model #(.BETA(0.5), .ALPHA(0.5), .DELAY(6)) u_pa (
    .clk, .rst_n, .in_valid (out_valid), .z, .out_valid (pa_v), .y (pa_y));

  assign fb_valid = (pa_v && fb_connect) || inj_fb;
  assign y        = pa_y;

  int checks = 0, failures = 0;

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

  // ---------------------------------------------------------------- monitors
  int      cycle = 0;
  int      n_init = 0, n_out = 0, n_upd = 0, n_skip = 0, n_full = 0, n_orphan = 0;
  int      first_in = -1, first_out = -1, first_fb = -1, first_upd = -1;
  bit      check_exact = 1'b0;
  sample_t q_x[$], q_pa[$];
  real     err_sum = 0.0, err_max = 0.0;
  int      err_n = 0;

  always @(posedge clk) begin
    #1;
    cycle++;
    if (out_valid) begin
      sample_t xs;
      n_out++;
      if (first_out < 0) first_out = cycle;
      xs = q_x.pop_front();
      if (check_exact) check(z == xs, $sformatf("unity pass: z %0d,%0d x %0d,%0d", z.re, z.im, xs.re, xs.im));
      q_pa.push_back(xs);
    end
    if (pa_v) begin
      sample_t xs;
      real dr, di, e;
      xs = q_pa.pop_front();
      dr = real'(pa_y.re - xs.re) / 32768.0;
      di = real'(pa_y.im - xs.im) / 32768.0;
      e  = dr * dr + di * di;
      err_sum += e;
      if (e > err_max) err_max = e;
      err_n++;
    end
    if (fb_valid && adapt_en && first_fb < 0) first_fb = cycle;
    if ((upd_pulse || skip_pulse) && first_upd < 0) first_upd = cycle;
    if (upd_pulse)  n_upd++;
    if (skip_pulse) n_skip++;
    if (fifo_full)  n_full++;
    if (fb_orphan)  n_orphan++;
  end

  // cycles spent initialising, sampled mid-cycle
  always @(negedge clk) if (rst_n && !in_ready) n_init++;

  // ---------------------------------------------------------------- stimulus
  sample_t blk [N];

  task automatic make_block();
    real a, ph;
    for (int n = 0; n < N; n++) begin
      a  = 0.5 * real'($urandom_range(0, 65535)) / 65535.0;
      ph = 6.283185307179586 * real'($urandom_range(0, 65535)) / 65536.0;
      blk[n].re = 16'($rtoi($floor(a * $cos(ph) * 32768.0 + 0.5)));
      blk[n].im = 16'($rtoi($floor(a * $sin(ph) * 32768.0 + 0.5)));
    end
  endtask

  task automatic send_block(input int count);
    for (int n = 0; n < count; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      x = blk[n];
      if (first_in < 0) first_in = cycle;
      q_x.push_back(blk[n]);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (40) @(posedge clk);   // drain forward path, amplifier and updates
  endtask

  real mse [PASSES+1];

  initial begin
    in_valid = 1'b0; x = '0; adapt_en = 1'b0; fb_connect = 1'b1; inj_fb = 1'b0;
    make_block();
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (in_ready);
    @(posedge clk); #2;
    check(n_init == 256, $sformatf("initialisation took %0d cycles", n_init));

    // pass 0: adaptation off, table at unity
    check_exact = 1'b1;
    err_sum = 0.0; err_n = 0;
    send_block(N);
    check_exact = 1'b0;
    check(err_n == N, $sformatf("amplifier outputs %0d", err_n));
    mse[0] = err_sum / real'(N);
    check(first_out - first_in == 4, $sformatf("x->z latency %0d", first_out - first_in));
    check(n_upd == 0 && n_skip == 0, "no adaptation while disabled");

    // passes 1..5: adaptation on
    @(negedge clk);
    adapt_en = 1'b1;
    for (int p = 1; p <= PASSES; p++) begin
      err_sum = 0.0; err_n = 0; err_max = 0.0;
      send_block(N);
      mse[p] = err_sum / real'(N);
      $display("pass %0d: mean |y-x|^2 = %e (%0.1f dB vs. no predistortion), worst %e",
               p, mse[p], 10.0 * $log10(mse[p] / mse[0]), err_max);
      check(mse[p] < mse[0], $sformatf("pass %0d improves on no predistortion", p));
    end
    $display("pass 0: mean |y-x|^2 = %e", mse[0]);
    check(mse[PASSES] < mse[0] / 100.0, "better than 20 dB error reduction after five passes");
    check(mse[PASSES] <= mse[1], "error after the last pass not above the first");
    check(first_upd - first_fb == 11, $sformatf("feedback to table write %0d cycles", first_upd - first_fb));
    check(n_upd + n_skip == PASSES * N, $sformatf("one update or skip per feedback sample (%0d)", n_upd + n_skip));

    // feedback cut: the pairing FIFO fills up
    @(negedge clk);
    fb_connect = 1'b0;
    send_block(40);
    check(n_full == 40 - 16, $sformatf("FIFO-full flags %0d", n_full));
    // adaptation off flushes the FIFO; stray feedback is then an orphan
    @(negedge clk);
    adapt_en = 1'b0;
    @(negedge clk);
    adapt_en = 1'b1;
    repeat (3) begin
      @(negedge clk);
      inj_fb = 1'b1;
    end
    @(negedge clk);
    inj_fb = 1'b0;
    repeat (20) @(posedge clk);
    check(n_orphan == 3, $sformatf("orphan feedback flags %0d", n_orphan));

    $display("mechanisms: init=%0d predistorted=%0d updates=%0d skipped=%0d fifo_full=%0d orphan=%0d",
             n_init, n_out, n_upd, n_skip, n_full, n_orphan);
    check(n_init > 0, "initialisation happened");
    check(n_out > 0,  "predistortion happened");
    check(n_upd > 0,  "table updates happened");
    check(n_skip > 0, "skipped updates happened");
    check(n_full > 0, "FIFO-full happened");
    check(n_orphan > 0, "orphan feedback happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
