// nr_reciprocal: pipelined Newton-Raphson reciprocal of a normalised divisor.
//
// d is an unsigned fraction in [0.5, 1) with RW fraction bits (its top bit
// set by the divisor scaler). The reciprocal is refined by
//     x(k+1) = x(k) * (2 - d * x(k))
// which doubles the number of correct bits per step. The start value is
// the linear approximation x(0) = 48/17 - 32/17 * d, whose relative error is
// at most 1/17 over [0.5, 1). The Newton-Raphson recurrence and the count of
// five iterations follow the complex divider this block belongs to; the
// linear start value and the RW-bit fixed-point word are this design's
// choice. r is unsigned Q2.RW (RW+2 bits), close to 1/d in (1, 2]; each
// product is truncated, so r is at most a few units in the last place
// below 1/d.
//
// Timing: fully unrolled, one register per step. Latency NR_ITERS+1 cycles
// (start value, then one per iteration), one divisor per cycle. A TAG_W
// sideband word travels alongside unchanged.
module nr_reciprocal #(
  parameter int unsigned RW       = 20,
  parameter int unsigned NR_ITERS = 5,
  parameter int unsigned TAG_W    = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [RW-1:0]     d,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output logic [RW+1:0]     r,
  output logic [TAG_W-1:0]  out_tag
);

  localparam int unsigned XW = RW + 2;
  // 48/17 and 32/17 in Q2.RW
  localparam logic [XW-1:0] C48 = XW'((64'd48 << RW) / 64'd17);
  localparam logic [XW-1:0] C32 = XW'((64'd32 << RW) / 64'd17);
  localparam logic [XW-1:0] TWO = XW'(64'd2 << RW);

  // stage k holds x(k); stage 0 is the start value
  logic [XW-1:0]    x_q   [NR_ITERS+1];
  logic [RW-1:0]    d_q   [NR_ITERS+1];
  logic [TAG_W-1:0] tag_q [NR_ITERS+1];
  logic             v_q   [NR_ITERS+1];

  logic [XW+RW-1:0] c32d;
  assign c32d = C32 * d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q[0]   <= '0;
      d_q[0]   <= '0;
      tag_q[0] <= '0;
      v_q[0]   <= 1'b0;
    end else begin
      x_q[0]   <= C48 - XW'(c32d >> RW);
      d_q[0]   <= d;
      tag_q[0] <= in_tag;
      v_q[0]   <= in_valid;
    end
  end

  for (genvar k = 1; k <= NR_ITERS; k++) begin : g_iter
    logic [XW+RW-1:0] dx;   // d * x(k-1), Q2.2RW
    logic [XW-1:0]    e;    // 2 - d * x(k-1), Q2.RW
    logic [2*XW-1:0]  xe;   // x(k-1) * e, Q4.2RW
    always_comb begin
      dx = d_q[k-1] * x_q[k-1];
      e  = TWO - XW'(dx >> RW);
      xe = x_q[k-1] * e;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x_q[k]   <= '0;
        d_q[k]   <= '0;
        tag_q[k] <= '0;
        v_q[k]   <= 1'b0;
      end else begin
        x_q[k]   <= XW'(xe >> RW);
        d_q[k]   <= d_q[k-1];
        tag_q[k] <= tag_q[k-1];
        v_q[k]   <= v_q[k-1];
      end
    end
  end

  assign r         = x_q[NR_ITERS];
  assign out_tag   = tag_q[NR_ITERS];
  assign out_valid = v_q[NR_ITERS];

endmodule
