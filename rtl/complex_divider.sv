// complex_divider: pipelined fixed-point complex divider, q = a / b.
//
// The predistorter needs the ratio of two complex samples, which FPGA
// fabric has no primitive for. The division is rewritten as
//     a / b = a * conj(b) / |b|^2
// so only one real reciprocal is needed. |b|^2 is prescaled into [0.5, 1)
// (divisor_scaler), inverted by five Newton-Raphson iterations
// (nr_reciprocal), and the product a*conj(b) * (1/|b|^2) is postscaled back
// (div_postscaler). This prescale / Newton-Raphson / postscale structure
// and the five iterations follow the divider this design is built from;
// word widths, the start value, rounding and saturation are its own.
//
// a and b are signed IN_W-bit pairs sharing any one binary point; q has
// OUT_F fraction bits in OUT_W bits (default Q2.14, range +/-2). A result
// outside that range is clipped and flagged by sat; b == 0 gives q = 0 and
// dz. A TAG_W sideband word travels with each division.
//
// Timing: fully pipelined, one division accepted per cycle, result after
// LATENCY = NR_ITERS + 5 cycles (1 for a*conj(b) and |b|^2, 1 prescale,
// NR_ITERS+1 reciprocal, 2 postscale).
module complex_divider #(
  parameter int unsigned IN_W     = 16,
  parameter int unsigned OUT_W    = 16,
  parameter int unsigned OUT_F    = 14,
  parameter int unsigned RW       = 20,
  parameter int unsigned NR_ITERS = 5,
  parameter int unsigned TAG_W    = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   a_re,
  input  logic signed [IN_W-1:0]   a_im,
  input  logic signed [IN_W-1:0]   b_re,
  input  logic signed [IN_W-1:0]   b_im,
  input  logic [TAG_W-1:0]         in_tag,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  q_re,
  output logic signed [OUT_W-1:0]  q_im,
  output logic                     sat,
  output logic                     dz,
  output logic [TAG_W-1:0]         out_tag
);

  localparam int unsigned NUM_W   = 2 * IN_W + 1;
  localparam int unsigned DEN_W   = 2 * IN_W;
  localparam int unsigned LEAD_W  = $clog2(DEN_W);
  // sideband carried through the reciprocal: numerator, lead, zero, tag
  localparam int unsigned NT_W    = 2 * NUM_W + LEAD_W + 1 + TAG_W;

  // stage 1: numerator a*conj(b) and divisor |b|^2
  logic                    v1;
  logic signed [NUM_W-1:0] num1_re, num1_im;
  logic [DEN_W-1:0]        den1;
  logic [TAG_W-1:0]        tag1;
  logic signed [DEN_W-1:0] bb_re, bb_im;

  complex_mult #(.A_W(IN_W), .B_W(IN_W), .CONJ_B(1'b1)) u_num (
    .clk, .rst_n, .in_valid,
    .a_re, .a_im, .b_re, .b_im,
    .out_valid (v1),
    .p_re      (num1_re),
    .p_im      (num1_im)
  );

  assign bb_re = b_re * b_re;
  assign bb_im = b_im * b_im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      den1 <= '0;
      tag1 <= '0;
    end else begin
      den1 <= $unsigned(bb_re) + $unsigned(bb_im);
      tag1 <= in_tag;
    end
  end

  // stage 2: divisor prescaling
  logic                    v2;
  logic [RW-1:0]           d2;
  logic [LEAD_W-1:0]       lead2;
  logic                    zero2;
  logic [2*NUM_W+TAG_W-1:0] side2;

  divisor_scaler #(.DEN_W(DEN_W), .RW(RW), .TAG_W(2 * NUM_W + TAG_W)) u_scale (
    .clk, .rst_n,
    .in_valid  (v1),
    .den       (den1),
    .in_tag    ({num1_re, num1_im, tag1}),
    .out_valid (v2),
    .d         (d2),
    .lead      (lead2),
    .zero      (zero2),
    .out_tag   (side2)
  );

  // stages 3 .. NR_ITERS+3: Newton-Raphson reciprocal
  logic                    v3;
  logic [RW+1:0]           r3;
  logic [NT_W-1:0]         side3;
  logic signed [NUM_W-1:0] num3_re, num3_im;
  logic [LEAD_W-1:0]       lead3;
  logic                    zero3;
  logic [TAG_W-1:0]        tag3;

  nr_reciprocal #(.RW(RW), .NR_ITERS(NR_ITERS), .TAG_W(NT_W)) u_nr (
    .clk, .rst_n,
    .in_valid  (v2),
    .d         (d2),
    .in_tag    ({side2[2*NUM_W+TAG_W-1 -: 2*NUM_W], lead2, zero2, side2[TAG_W-1:0]}),
    .out_valid (v3),
    .r         (r3),
    .out_tag   (side3)
  );

  assign {num3_re, num3_im, lead3, zero3, tag3} = side3;

  // last two stages: postscaling
  div_postscaler #(
    .NUM_W(NUM_W), .RW(RW), .LEAD_W(LEAD_W), .OUT_W(OUT_W), .OUT_F(OUT_F), .TAG_W(TAG_W)
  ) u_post (
    .clk, .rst_n,
    .in_valid  (v3),
    .num_re    (num3_re),
    .num_im    (num3_im),
    .r         (r3),
    .lead      (lead3),
    .zero      (zero3),
    .in_tag    (tag3),
    .out_valid,
    .q_re, .q_im, .sat, .dz, .out_tag
  );

endmodule
