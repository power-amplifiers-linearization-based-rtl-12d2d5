// complex_mult: pipelined complex multiplier, p = a * b (or a * conj(b)).
//
// Four real products and one add/subtract pair:
//   re = ar*br - ai*bi,  im = ai*br + ar*bi        (CONJ_B = 0)
//   re = ar*br + ai*bi,  im = ai*br - ar*bi        (CONJ_B = 1)
// The result is kept at full precision (A_W+B_W+1 bits) so the caller
// picks its own scaling. The four-multiplier form follows the usual FPGA
// complex multiplier; the conjugate option serves the complex divider.
//
// Timing: one register stage. in_valid with a, b at edge n gives
// out_valid with p after edge n+1 (latency 1, one result per cycle).
module complex_mult #(
  parameter int unsigned A_W    = 16,
  parameter int unsigned B_W    = 16,
  parameter bit          CONJ_B = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [A_W-1:0]    a_re,
  input  logic signed [A_W-1:0]    a_im,
  input  logic signed [B_W-1:0]    b_re,
  input  logic signed [B_W-1:0]    b_im,
  output logic                     out_valid,
  output logic signed [A_W+B_W:0]  p_re,
  output logic signed [A_W+B_W:0]  p_im
);

  localparam int unsigned P_W = A_W + B_W + 1;

  logic signed [A_W+B_W-1:0] rr, ii, ir, ri;
  logic signed [P_W-1:0]     sum_re, sum_im;

  always_comb begin
    rr = a_re * b_re;
    ii = a_im * b_im;
    ir = a_im * b_re;
    ri = a_re * b_im;
    if (CONJ_B) begin
      sum_re = P_W'(rr) + P_W'(ii);
      sum_im = P_W'(ir) - P_W'(ri);
    end else begin
      sum_re = P_W'(rr) - P_W'(ii);
      sum_im = P_W'(ir) + P_W'(ri);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p_re      <= '0;
      p_im      <= '0;
    end else begin
      out_valid <= in_valid;
      p_re      <= sum_re;
      p_im      <= sum_im;
    end
  end

endmodule
