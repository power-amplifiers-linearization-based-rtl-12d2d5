// divisor_scaler: normalises an unsigned divisor into [0.5, 1).
//
// First stage of the complex divider. The leading one of den is found and
// the word is shifted left so that this one lands in the top bit; the top
// RW bits of the shifted word are the normalised divisor d, read as an
// unsigned fraction 0.1xxx.. in [0.5, 1). lead is the bit position of the
// leading one, so den = d * 2^(lead+1) (den taken as an integer), which
// the postscaler later undoes. den == 0 raises zero and gives d = 0.
// The leading-one detector and the shifter are this design's own choice
// of how to prescale; bits below the top RW are truncated.
//
// Timing: one register stage, latency 1, one divisor per cycle. A TAG_W
// sideband word travels alongside unchanged.
module divisor_scaler #(
  parameter int unsigned DEN_W = 32,
  parameter int unsigned RW    = 20,
  parameter int unsigned TAG_W = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [DEN_W-1:0]           den,
  input  logic [TAG_W-1:0]           in_tag,
  output logic                       out_valid,
  output logic [RW-1:0]              d,
  output logic [$clog2(DEN_W)-1:0]   lead,
  output logic                       zero,
  output logic [TAG_W-1:0]           out_tag
);

  localparam int unsigned LW = $clog2(DEN_W);

  logic [LW-1:0]    lead_c;
  logic [RW-1:0]    norm_c;

  always_comb begin
    lead_c = '0;
    for (int i = 0; i < DEN_W; i++) begin
      if (den[i]) lead_c = LW'(i);
    end
    norm_c = RW'((den << (LW'(DEN_W - 1) - lead_c)) >> (DEN_W - RW));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      d         <= '0;
      lead      <= '0;
      zero      <= 1'b0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      d         <= norm_c;
      lead      <= lead_c;
      zero      <= (den == '0);
      out_tag   <= in_tag;
    end
  end

  initial begin
    assert (RW <= DEN_W) else $error("divisor_scaler: RW must not exceed DEN_W");
  end

endmodule
