// tb_div_postscaler: self-checking test of div_postscaler.
//
// For random numerators and divisors the test normalises the divisor and
// forms its reciprocal itself (exact integer division), feeds the
// postscaler, and compares the result two cycles later with num/den
// computed in floating point: within 1 LSB when in range, clipped with
// sat set when out of range, and zero with dz set for a zero divisor.
module tb_div_postscaler;

  localparam int unsigned NUM_W = 33;
  localparam int unsigned RW    = 20;
  localparam int unsigned OUT_W = 16;
  localparam int unsigned OUT_F = 14;
  localparam int unsigned N     = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    in_valid, out_valid, zero, sat, dz;
  logic signed [NUM_W-1:0] num_re, num_im;
  logic [RW+1:0]           r;
  logic [4:0]              lead;
  logic [3:0]              in_tag, out_tag;
  logic signed [OUT_W-1:0] q_re, q_im;

  div_postscaler #(.NUM_W(NUM_W), .RW(RW), .LEAD_W(5), .OUT_W(OUT_W), .OUT_F(OUT_F), .TAG_W(4))
    dut (.*);

  int checks = 0, failures = 0, n_sat = 0;

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

  function automatic void exp_q(input real v, output longint q, output bit s);
    real lim_hi, lim_lo;
    lim_hi = real'((longint'(1) << (OUT_W - 1)) - 1);
    lim_lo = -real'(longint'(1) << (OUT_W - 1));
    s = 1'b0;
    if (v > lim_hi + 0.5)      begin q = longint'(lim_hi); s = 1'b1; end
    else if (v < lim_lo - 0.5) begin q = longint'(lim_lo); s = 1'b1; end
    else                       q = longint'($floor(v + 0.5));
  endfunction

  function automatic bit near_lim(input real v);
    real m;
    m = (v < 0.0) ? -v : v;
    return (m > 32765.5) && (m < 32769.5);
  endfunction

  longint      den, dnorm, er, ei;
  int          ld;
  real         vr, vi;
  bit          sr, si;
  initial begin
    in_valid = 1'b0; num_re = '0; num_im = '0; r = '0; lead = '0; zero = 1'b0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      den = longint'($urandom) >> $urandom_range(0, 31);
      if (n == 5) den = 0;
      num_re = NUM_W'($signed($urandom)) >>> $urandom_range(0, 31);
      num_im = NUM_W'($signed($urandom)) >>> $urandom_range(0, 31);
      zero   = (den == 0);
      ld     = 0;
      for (int i = 0; i < 32; i++) if (den[i]) ld = i;
      dnorm  = (den << (31 - ld)) >> (32 - RW);         // top RW bits, in [0.5,1)
      r      = (RW+2)'(zero ? 0 : ((longint'(1) << (2 * RW)) / dnorm));
      lead   = 5'(ld);
      in_tag = 4'(n);
      in_valid = 1'b1;
      @(posedge clk);
      @(negedge clk);
      in_valid = 1'b0;
      @(posedge clk); #1;
      check(out_valid && out_tag == 4'(n), "valid and tag after two cycles");
      if (zero) begin
        check(dz && q_re == 0 && q_im == 0, "zero divisor");
      end else begin
        vr = real'(num_re) / real'(den) * real'(1 << OUT_F);
        vi = real'(num_im) / real'(den) * real'(1 << OUT_F);
        exp_q(vr, er, sr);
        exp_q(vi, ei, si);
        check(!dz, "no dz");
        if (sr || si) n_sat++;
        // the reciprocal is exact only to a unit in its last place, so a
        // quotient within 2 LSB of the limit may go either way
        check(sat == (sr || si) || near_lim(vr) || near_lim(vi),
              $sformatf("sat flag %0d for %f %f", sat, vr, vi));
        check(sr ? q_re == 16'(er) : (longint'(q_re) - er <= 1 && er - longint'(q_re) <= 1),
              $sformatf("re %0d exp %f", q_re, vr));
        check(si ? q_im == 16'(ei) : (longint'(q_im) - ei <= 1 && ei - longint'(q_im) <= 1),
              $sformatf("im %0d exp %f", q_im, vi));
      end
    end
    check(n_sat > 10 && n_sat < N - 10, $sformatf("mix of clipped and in-range results (%0d clipped)", n_sat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
