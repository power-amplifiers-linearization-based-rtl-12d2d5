// div_postscaler: last stage of the complex divider, q = num * r * 2^-s.
//
// num is the complex numerator a*conj(b) and r the Newton-Raphson
// reciprocal (unsigned Q2.RW) of the normalised divisor d. With the divisor
// den = d * 2^(lead+1) and num, den sharing one binary point, the quotient
// in OUT_F fraction bits is
//     q = (num * r) >> (RW + 1 + lead - OUT_F)
// rounded to nearest (half up) and saturated to OUT_W bits. sat flags a
// clipped quotient; a zero divisor gives q = 0 with dz set. The
// multiply-then-shift form of the postscaling and the rounding and
// saturation rules are this design's choice.
//
// Timing: two register stages (products, then shift/round/saturate),
// latency 2, one quotient per cycle. TAG_W sideband travels alongside.
module div_postscaler #(
  parameter int unsigned NUM_W  = 33,
  parameter int unsigned RW     = 20,
  parameter int unsigned LEAD_W = 5,
  parameter int unsigned OUT_W  = 16,
  parameter int unsigned OUT_F  = 14,
  parameter int unsigned TAG_W  = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [NUM_W-1:0]  num_re,
  input  logic signed [NUM_W-1:0]  num_im,
  input  logic [RW+1:0]            r,
  input  logic [LEAD_W-1:0]        lead,
  input  logic                     zero,
  input  logic [TAG_W-1:0]         in_tag,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  q_re,
  output logic signed [OUT_W-1:0]  q_im,
  output logic                     sat,
  output logic                     dz,
  output logic [TAG_W-1:0]         out_tag
);

  localparam int unsigned PW   = NUM_W + RW + 3;      // signed product width
  localparam int unsigned BASE = RW + 1 - OUT_F;      // shift for lead == 0
  localparam logic signed [PW-1:0] QMAX = PW'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [PW-1:0] QMIN = -PW'(64'sd1 <<< (OUT_W - 1));

  // stage 1: products
  logic signed [PW-1:0] m_re, m_im;
  logic [LEAD_W-1:0]    lead1;
  logic                 zero1, v1;
  logic [TAG_W-1:0]     tag1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_re <= '0; m_im <= '0; lead1 <= '0; zero1 <= 1'b0; v1 <= 1'b0; tag1 <= '0;
    end else begin
      m_re  <= PW'(num_re) * $signed({1'b0, r});
      m_im  <= PW'(num_im) * $signed({1'b0, r});
      lead1 <= lead;
      zero1 <= zero;
      v1    <= in_valid;
      tag1  <= in_tag;
    end
  end

  // stage 2: shift, round, saturate
  function automatic logic signed [PW-1:0] scale(input logic signed [PW-1:0] m,
                                                 input int unsigned sh);
    logic signed [PW-1:0] half;
    half = (sh == 0) ? '0 : (PW'(1) <<< (sh - 1));
    return (m + half) >>> sh;
  endfunction

  logic signed [PW-1:0] s_re, s_im;
  logic                 ov_re, ov_im;
  always_comb begin
    s_re  = scale(m_re, BASE + 32'(lead1));
    s_im  = scale(m_im, BASE + 32'(lead1));
    ov_re = (s_re > QMAX) || (s_re < QMIN);
    ov_im = (s_im > QMAX) || (s_im < QMIN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_re <= '0; q_im <= '0; sat <= 1'b0; dz <= 1'b0; out_valid <= 1'b0; out_tag <= '0;
    end else begin
      out_valid <= v1;
      out_tag   <= tag1;
      dz        <= zero1;
      if (zero1) begin
        q_re <= '0;
        q_im <= '0;
        sat  <= 1'b0;
      end else begin
        q_re <= (s_re > QMAX) ? OUT_W'(QMAX) : (s_re < QMIN) ? OUT_W'(QMIN) : OUT_W'(s_re);
        q_im <= (s_im > QMAX) ? OUT_W'(QMAX) : (s_im < QMIN) ? OUT_W'(QMIN) : OUT_W'(s_im);
        sat  <= ov_re || ov_im;
      end
    end
  end

  initial begin
    assert (RW + 1 >= OUT_F) else $error("div_postscaler: OUT_F must not exceed RW+1");
  end

endmodule
