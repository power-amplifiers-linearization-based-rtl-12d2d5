// tb_complex_divider: self-checking test of complex_divider.
//
// Streams 4096 random divisions back to back, one per cycle, with the
// dividend scaled by a random power of two so that both in-range and
// clipped quotients occur, plus zero and full-scale divisors. Every result
// is compared with a / b computed in floating point (within 1 LSB of Q2.14,
// or clipped with sat set), the sideband tag confirms order, and the first
// result must appear LATENCY = 10 cycles after its operands.
module tb_complex_divider;

  localparam int unsigned N     = 4096;
  localparam int unsigned LAT   = 10;
  localparam int unsigned OUT_F = 14;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               in_valid, out_valid, sat, dz;
  logic signed [15:0] a_re, a_im, b_re, b_im, q_re, q_im;
  logic [12:0]        in_tag, out_tag;

  complex_divider #(.IN_W(16), .OUT_W(16), .OUT_F(OUT_F), .RW(20), .NR_ITERS(5), .TAG_W(13))
    dut (.*);

  int checks = 0, failures = 0;
  int n_sat = 0, n_dz = 0, n_ok = 0;
  real max_err = 0.0;

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

  logic signed [15:0] ha_re [N], ha_im [N], hb_re [N], hb_im [N];
  int cycle = 0, first_in = 0, outs = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    in_valid = 1'b0; a_re = '0; a_im = '0; b_re = '0; b_im = '0; in_tag = '0;
    for (int n = 0; n < N; n++) begin
      ha_re[n] = $signed(16'($urandom)) >>> $urandom_range(0, 6);
      ha_im[n] = $signed(16'($urandom)) >>> $urandom_range(0, 6);
      hb_re[n] = $signed(16'($urandom)) >>> $urandom_range(0, 3);
      hb_im[n] = $signed(16'($urandom)) >>> $urandom_range(0, 3);
    end
    hb_re[3] = 0;       hb_im[3] = 0;
    hb_re[4] = -32768;  hb_im[4] = -32768;
    ha_re[5] = 1;       ha_im[5] = 0;      hb_re[5] = 0; hb_im[5] = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      a_re = ha_re[n]; a_im = ha_im[n]; b_re = hb_re[n]; b_im = hb_im[n];
      in_tag = 13'(n);
      if (n == 0) first_in = cycle;
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

  function automatic void expect_q(input real v, output int q, output bit s);
    s = 1'b0;
    if (v > 32767.5)       begin q = 32767;  s = 1'b1; end
    else if (v < -32768.5) begin q = -32768; s = 1'b1; end
    else                   q = int'($floor(v + 0.5));
  endfunction

  function automatic bit near_lim(input real v);
    real m;
    m = (v < 0.0) ? -v : v;
    return (m > 32765.5) && (m < 32769.5);
  endfunction

  real ar, ai, br, bi, den, vr, vi, e;
  int  er, ei, k;
  bit  sr, si;
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      k = int'(out_tag);
      if (outs == 0) check(cycle - first_in == LAT, $sformatf("latency %0d", cycle - first_in));
      check(k == outs, "results in order, one per cycle");
      ar = real'(ha_re[k]); ai = real'(ha_im[k]); br = real'(hb_re[k]); bi = real'(hb_im[k]);
      den = br * br + bi * bi;
      if (den == 0.0) begin
        n_dz++;
        check(dz && q_re == 0 && q_im == 0 && !sat, "divide by zero");
      end else begin
        vr = (ar * br + ai * bi) / den * real'(1 << OUT_F);
        vi = (ai * br - ar * bi) / den * real'(1 << OUT_F);
        expect_q(vr, er, sr);
        expect_q(vi, ei, si);
        check(!dz, "no dz");
        check(sat == (sr || si) || near_lim(vr) || near_lim(vi), $sformatf("sat %0d for %f %f", sat, vr, vi));
        if (sr || si) n_sat++;
        if (!sr && !si) begin
          n_ok++;
          check(int'(q_re) - er <= 1 && er - int'(q_re) <= 1, $sformatf("re %0d exp %f", q_re, vr));
          check(int'(q_im) - ei <= 1 && ei - int'(q_im) <= 1, $sformatf("im %0d exp %f", q_im, vi));
          e = (real'(q_re) - vr) * (real'(q_re) - vr) + (real'(q_im) - vi) * (real'(q_im) - vi);
          if (e > max_err) max_err = e;
        end else begin
          if (sr) check(q_re == 16'(er), "re clipped");
          if (si) check(q_im == 16'(ei), "im clipped");
        end
      end
      outs++;
      if (outs == N) begin
        $display("in range %0d, clipped %0d, divide by zero %0d, worst squared error %f LSB^2",
                 n_ok, n_sat, n_dz, max_err);
        check(n_ok > N / 4 && n_sat > 0 && n_dz > 0, "all result kinds seen");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

endmodule
