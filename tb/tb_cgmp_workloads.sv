// tb_cgmp_workloads: spectral regrowth test of the predistorter on
// band-limited multi-carrier signals.
//
// Three periodic 1024-sample test signals are built from random QPSK
// symbols placed on DFT bins, so the spectrum of one block is exact:
//   1. a wide single band, OFDM-like (bins -96..96 but 0), high peak-to-average;
//   2. two carriers, each 41 bins wide, centred at bins -128 and +128;
//   3. a narrow single carrier (bins -12..12).
// Each is scaled to a peak of 0.55 of full scale and fed, from a freshly
// reset predistorter, through the behavioural amplifier once without and
// five times with adaptation. The adjacent-channel leakage ratio is the
// power in a band of the same width beside the signal over the in-band
// power, from a DFT of the amplifier output. The test requires that five
// adaptation passes lower it by at least 20 dB for every signal, and prints
// the values.
module tb_cgmp_workloads;
  import cgmp_pkg::*;

  localparam int N      = 1024;
  localparam int PASSES = 5;
  localparam real TWO_PI = 6.283185307179586;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    in_valid, in_ready, out_valid, adapt_en, fb_valid, pa_v;
  sample_t x, z, y;
  logic    upd_pulse, skip_pulse, fb_orphan, fifo_full;

  cgmp_predistorter dut (.*);
  pa_model #(.BETA(0.5), .ALPHA(0.5), .DELAY(6)) u_pa (
    .clk, .rst_n, .in_valid (out_valid), .z, .out_valid (pa_v), .y);
  assign fb_valid = pa_v;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real     cos_t [N], sin_t [N];
  sample_t blk [N];
  real     yr [N], yi [N];
  int      n_y;

  // capture amplifier output of the current pass, in order
  always @(posedge clk) begin
    #1;
    if (pa_v && n_y < N) begin
      yr[n_y] = real'(y.re);
      yi[n_y] = real'(y.im);
      n_y++;
    end
  end

  // bins lo..hi inclusive (negative bins wrap), optionally skipping bin 0
  task automatic make_signal(input int lo, input int hi, input int lo2, input int hi2);
    real xr [N], xi [N];
    real pk, a, sc;
    int  k, idx;
    for (int n = 0; n < N; n++) begin xr[n] = 0.0; xi[n] = 0.0; end
    for (int b = -N / 2; b < N / 2; b++) begin
      if (b == 0) continue;
      if (!((b >= lo && b <= hi) || (b >= lo2 && b <= hi2))) continue;
      k = (b + N) % N;
      begin
        real sr, si;
        sr = ($urandom_range(0, 1) == 1) ? 1.0 : -1.0;
        si = ($urandom_range(0, 1) == 1) ? 1.0 : -1.0;
        for (int n = 0; n < N; n++) begin
          idx = (k * n) % N;
          xr[n] += sr * cos_t[idx] - si * sin_t[idx];
          xi[n] += sr * sin_t[idx] + si * cos_t[idx];
        end
      end
    end
    pk = 0.0;
    for (int n = 0; n < N; n++) begin
      a = $sqrt(xr[n] * xr[n] + xi[n] * xi[n]);
      if (a > pk) pk = a;
    end
    sc = 0.55 * 32768.0 / pk;
    for (int n = 0; n < N; n++) begin
      blk[n].re = 16'($rtoi($floor(xr[n] * sc + 0.5)));
      blk[n].im = 16'($rtoi($floor(xi[n] * sc + 0.5)));
    end
  endtask

  function automatic real bin_power(input int b);
    real sr, si;
    int  k, idx;
    k  = (b + N) % N;
    sr = 0.0; si = 0.0;
    for (int n = 0; n < N; n++) begin
      idx = (k * n) % N;
      sr += yr[n] * cos_t[idx] + yi[n] * sin_t[idx];
      si += yi[n] * cos_t[idx] - yr[n] * sin_t[idx];
    end
    return sr * sr + si * si;
  endfunction

  function automatic real band_power(input int lo, input int hi);
    real p;
    p = 0.0;
    for (int b = lo; b <= hi; b++) if (b != 0) p += bin_power(b);
    return p;
  endfunction

  task automatic send_pass();
    n_y = 0;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      x = blk[n];
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (40) @(posedge clk);
    check(n_y == N, "amplifier output captured");
  endtask

  // in-band lo..hi (+ lo2..hi2), adjacent band adj_lo..adj_hi
  task automatic run_signal(input string name, input int lo, input int hi, input int lo2, input int hi2,
                            input int adj_lo, input int adj_hi);
    real aclr0, aclr5, pin;
    make_signal(lo, hi, lo2, hi2);
    @(negedge clk);
    rst_n = 1'b0;
    adapt_en = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    wait (in_ready);
    send_pass();
    pin   = band_power(lo, hi) + band_power(lo2, hi2);
    aclr0 = 10.0 * $log10(band_power(adj_lo, adj_hi) / pin);
    @(negedge clk);
    adapt_en = 1'b1;
    for (int p = 1; p <= PASSES; p++) send_pass();
    pin   = band_power(lo, hi) + band_power(lo2, hi2);
    aclr5 = 10.0 * $log10(band_power(adj_lo, adj_hi) / pin);
    $display("%s: adjacent-channel leakage %0.1f dB without, %0.1f dB after %0d passes (%0.1f dB better)",
             name, aclr0, aclr5, PASSES, aclr0 - aclr5);
    check(aclr0 - aclr5 >= 20.0, {name, ": leakage lowered by at least 20 dB"});
  endtask

  initial begin
    in_valid = 1'b0; x = '0; adapt_en = 1'b0;
    for (int n = 0; n < N; n++) begin
      cos_t[n] = $cos(TWO_PI * real'(n) / real'(N));
      sin_t[n] = $sin(TWO_PI * real'(n) / real'(N));
    end
    repeat (3) @(posedge clk);
    run_signal("wide single band",  -96, 96, 1, 0, 97, 289);
    run_signal("two carriers",      -148, -108, 108, 148, 149, 189);
    run_signal("narrow carrier",    -12, 12, 1, 0, 13, 37);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
