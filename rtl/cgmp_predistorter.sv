// cgmp_predistorter: adaptive complex-gain digital predistorter.
//
// Each baseband sample x is multiplied by a complex gain G taken from a
// lookup table addressed by the sample's power |x|^2, so the table holds
// the inverse of the amplifier's AM-AM and AM-PM curves:
//     z = x * G[idx(|x|^2)]
// z drives the amplifier. Its output, brought back to baseband and divided
// by the wanted linear gain, returns as y, one feedback sample per sent
// sample and in the same order. The table entry that served the sample is
// then corrected by the complex ratio of wanted to obtained output,
// computed by the Newton-Raphson complex divider:
//     G' = G + mu * (G * x / y - G),   mu = 2^-MU_SHIFT
// When y equals x the ratio is one and G stays where it is. The default
// step mu = 1 replaces the entry by G * x / y outright, which settles a
// noiseless loop within two passes over the signal; a larger MU_SHIFT
// averages over noisy feedback at the cost of slower convergence.
//
// The structure (gain lookup, complex gain multiplier, complex divider in
// the adaptation path, iterative refinement of the gains) follows the
// complex-gain predistorter this design implements. The memory-effect
// compensation branches of the full method are not part of this module.
// Its own choices: power addressing of a 2^LUT_AW-entry table, the
// step size, a FIFO that pairs feedback with sent samples so that any
// loop delay up to 2^FB_AW samples is absorbed, updates skipped for
// near-zero inputs (index below MIN_IDX) or a divider result that was
// clipped or divided by zero, and a start-up pass that writes unity gain
// into every entry.
//
// Interface: samples are cgmp_pkg::sample_t (Q1.15), gains Q2.14.
//  - After reset the table is initialised for 2^LUT_AW cycles; in_ready
//    is low meanwhile and in_valid is ignored.
//  - x -> z latency is PD_LAT = 4 cycles, one sample per cycle.
//  - With adapt_en high every sent sample waits in the FIFO for its
//    feedback; fb_valid/y must then follow in order. With adapt_en low
//    fb_valid is ignored and the FIFO is flushed.
//  - upd_pulse or skip_pulse is raised NR_ITERS + 6 cycles after the cycle
//    that presents the feedback sample (divider, gain product); the new
//    gain is written at the end of that cycle. upd_pulse marks a write,
//    skip_pulse an update rejected for the reasons above; fb_orphan marks
//    feedback that had no sample waiting and fifo_full a sent sample that
//    found the FIFO full and will not be used for adaptation. A full FIFO
//    means the loop delay exceeds 2^FB_AW samples; later feedback is then
//    paired with the wrong samples until adapt_en is dropped (which
//    flushes the FIFO), so the controller should do that and FB_AW be
//    raised.
module cgmp_predistorter
  import cgmp_pkg::*;
#(
  parameter int unsigned LUT_AW   = 8,
  parameter int unsigned MU_SHIFT = 0,
  parameter int unsigned FB_AW    = 4,
  parameter int unsigned MIN_IDX  = 1,
  parameter int unsigned RW       = 20,
  parameter int unsigned NR_ITERS = 5
) (
  input  logic    clk,
  input  logic    rst_n,
  // forward path
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t x,
  output logic    out_valid,
  output sample_t z,
  // feedback path
  input  logic    adapt_en,
  input  logic    fb_valid,
  input  sample_t y,
  // status
  output logic    upd_pulse,
  output logic    skip_pulse,
  output logic    fb_orphan,
  output logic    fifo_full
);

  localparam int unsigned DEPTH  = 2 ** LUT_AW;
  localparam int unsigned CTX_W  = $bits(sample_t) + LUT_AW + $bits(gain_t);
  localparam int unsigned P_W    = SMP_W + GAIN_W + 1;

  typedef struct packed {
    sample_t             x;
    logic [LUT_AW-1:0]   idx;
    gain_t               g;
  } ctx_t;

  // ---------------------------------------------------------------- init
  logic              init_busy;
  logic [LUT_AW-1:0] init_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_addr <= '0;
    end else if (init_busy) begin
      init_addr <= init_addr + 1'b1;
      if (init_addr == LUT_AW'(DEPTH - 1)) init_busy <= 1'b0;
    end
  end

  assign in_ready = !init_busy;

  // ------------------------------------------------------ forward path
  // stage 1: power of the sample -> table address
  logic              v1;
  sample_t           x1;
  logic [LUT_AW-1:0] idx1;
  logic signed [31:0] xx_re, xx_im;
  logic [31:0]       pwr;
  logic [LUT_AW-1:0] idx_c;

  // |x|^2 is Q2.30; powers of one or more use the last entry
  always_comb begin
    xx_re = x.re * x.re;
    xx_im = x.im * x.im;
    pwr   = $unsigned(xx_re) + $unsigned(xx_im);
    idx_c = (pwr[31:30] != 2'b00) ? '1 : LUT_AW'(pwr >> (30 - LUT_AW));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1   <= 1'b0;
      x1   <= '0;
      idx1 <= '0;
    end else begin
      v1   <= in_valid && in_ready;
      x1   <= x;
      idx1 <= idx_c;
    end
  end

  // stage 2: table read
  logic              v2;
  sample_t           x2;
  logic [LUT_AW-1:0] idx2;
  gain_t             g2;
  logic              lut_we;
  logic [LUT_AW-1:0] lut_waddr;
  gain_t             lut_wdata;

  gain_lut #(.AW(LUT_AW), .W($bits(gain_t))) u_lut (
    .clk,
    .raddr (idx1),
    .rdata (g2),
    .we    (lut_we),
    .waddr (lut_waddr),
    .wdata (lut_wdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2   <= 1'b0;
      x2   <= '0;
      idx2 <= '0;
    end else begin
      v2   <= v1;
      x2   <= x1;
      idx2 <= idx1;
    end
  end

  // stage 3: complex gain multiplier
  logic                  v3;
  logic signed [P_W-1:0] p3_re, p3_im;
  sample_t               x3;
  logic [LUT_AW-1:0]     idx3;
  gain_t                 g3;

  complex_mult #(.A_W(SMP_W), .B_W(GAIN_W), .CONJ_B(1'b0)) u_pd_mult (
    .clk, .rst_n,
    .in_valid  (v2),
    .a_re      (x2.re),
    .a_im      (x2.im),
    .b_re      (g2.re),
    .b_im      (g2.im),
    .out_valid (v3),
    .p_re      (p3_re),
    .p_im      (p3_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x3   <= '0;
      idx3 <= '0;
      g3   <= '0;
    end else begin
      x3   <= x2;
      idx3 <= idx2;
      g3   <= g2;
    end
  end

  // round a product with GAIN_F extra fraction bits back to 16 bits
  function automatic logic signed [15:0] round_sat(input logic signed [P_W-1:0] p);
    logic signed [P_W-1:0] s;
    s = (p + (P_W'(1) <<< (GAIN_F - 1))) >>> GAIN_F;
    if (s > P_W'(32767))       return 16'sh7fff;
    else if (s < -P_W'(32768)) return 16'sh8000;
    else                       return s[15:0];
  endfunction

  // stage 4: output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      z         <= '0;
    end else begin
      out_valid <= v3;
      z.re      <= round_sat(p3_re);
      z.im      <= round_sat(p3_im);
    end
  end

  // ----------------------------------------------- feedback pairing FIFO
  ctx_t ctx_in, ctx_out;
  logic fifo_empty, fifo_is_full, fifo_pop;

  assign ctx_in   = '{x: x3, idx: idx3, g: g3};
  assign fifo_pop = adapt_en && fb_valid && !fifo_empty;

  sync_fifo #(.AW(FB_AW), .W(CTX_W)) u_fifo (
    .clk, .rst_n,
    .clear (!adapt_en),
    .push  (adapt_en && v3),
    .din   (ctx_in),
    .pop   (fifo_pop),
    .dout  (ctx_out),
    .full  (fifo_is_full),
    .empty (fifo_empty)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fb_orphan <= 1'b0;
      fifo_full <= 1'b0;
    end else begin
      fb_orphan <= adapt_en && fb_valid && fifo_empty;
      fifo_full <= adapt_en && v3 && fifo_is_full;
    end
  end

  // ------------------------------------------------- adaptation path
  // ratio x / y, with the table context riding along as the tag
  localparam int unsigned TAG_W = LUT_AW + $bits(gain_t) + 1;

  logic                      dv;
  logic signed [GAIN_W-1:0]  r_re, r_im;
  logic                      r_sat, r_dz;
  logic [TAG_W-1:0]          dtag;
  logic                      small_in;

  assign small_in = (ctx_out.idx < LUT_AW'(MIN_IDX));

  complex_divider #(
    .IN_W(SMP_W), .OUT_W(GAIN_W), .OUT_F(GAIN_F), .RW(RW), .NR_ITERS(NR_ITERS), .TAG_W(TAG_W)
  ) u_div (
    .clk, .rst_n,
    .in_valid  (fifo_pop),
    .a_re      (ctx_out.x.re),
    .a_im      (ctx_out.x.im),
    .b_re      (y.re),
    .b_im      (y.im),
    .in_tag    ({ctx_out.idx, ctx_out.g, small_in}),
    .out_valid (dv),
    .q_re      (r_re),
    .q_im      (r_im),
    .sat       (r_sat),
    .dz        (r_dz),
    .out_tag   (dtag)
  );

  // target gain t = G * x / y
  logic                  tv;
  logic signed [P_W-1:0] t_re, t_im;
  logic [LUT_AW-1:0]     t_idx;
  gain_t                 t_g;
  logic                  t_skip;
  gain_t                 d_g;

  assign d_g = dtag[1 +: $bits(gain_t)];

  complex_mult #(.A_W(GAIN_W), .B_W(GAIN_W), .CONJ_B(1'b0)) u_upd_mult (
    .clk, .rst_n,
    .in_valid  (dv),
    .a_re      (d_g.re),
    .a_im      (d_g.im),
    .b_re      (r_re),
    .b_im      (r_im),
    .out_valid (tv),
    .p_re      (t_re),
    .p_im      (t_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_idx  <= '0;
      t_g    <= '0;
      t_skip <= 1'b0;
    end else begin
      t_idx  <= dtag[TAG_W-1 -: LUT_AW];
      t_g    <= d_g;
      t_skip <= dtag[0] || r_sat || r_dz;
    end
  end

  // step toward the target: G' = G + (t - G) / 2^MU_SHIFT, saturated
  function automatic logic signed [GAIN_W-1:0] step(input logic signed [GAIN_W-1:0] g,
                                                    input logic signed [15:0] t);
    logic signed [GAIN_W+1:0] diff, nxt;
    diff = (GAIN_W+2)'(t) - (GAIN_W+2)'(g);
    nxt  = (GAIN_W+2)'(g) + (diff >>> MU_SHIFT);
    if (nxt > (GAIN_W+2)'(32767))       return 16'sh7fff;
    else if (nxt < -(GAIN_W+2)'(32768)) return 16'sh8000;
    else                                return nxt[GAIN_W-1:0];
  endfunction

  gain_t g_new;
  assign g_new = '{re: step(t_g.re, round_sat(t_re)), im: step(t_g.im, round_sat(t_im))};

  // table write: initialisation first, then updates
  always_comb begin
    if (init_busy) begin
      lut_we    = 1'b1;
      lut_waddr = init_addr;
      lut_wdata = GAIN_ONE;
    end else begin
      lut_we    = tv && !t_skip && adapt_en;
      lut_waddr = t_idx;
      lut_wdata = g_new;
    end
  end

  assign upd_pulse  = lut_we && !init_busy;
  assign skip_pulse = tv && t_skip && adapt_en && !init_busy;

endmodule
