// tb_divisor_scaler: self-checking test of divisor_scaler.
//
// Feeds zero, single-bit and random divisors of random length and checks,
// one cycle later, that the reported leading-one position is right, that
// the normalised word has its top bit set and equals the divisor's top
// bits, and that the sideband tag passed through.
module tb_divisor_scaler;

  localparam int unsigned DEN_W = 32;
  localparam int unsigned RW    = 20;
  localparam real ULP = 1.0 / real'(1 << RW);
  localparam int unsigned N     = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid, out_valid, zero;
  logic [DEN_W-1:0]  den;
  logic [7:0]        in_tag, out_tag;
  logic [RW-1:0]     d;
  logic [4:0]        lead;

  divisor_scaler #(.DEN_W(DEN_W), .RW(RW), .TAG_W(8)) dut (.*);

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

  int          exp_lead;
  logic [63:0] ref_norm;
  real         val, dval;
  initial begin
    in_valid = 1'b0; den = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_tag   = 8'($urandom);
      if (n == 0)       den = '0;
      else if (n <= 32) den = DEN_W'(1) << (n - 1);
      else              den = DEN_W'($urandom) >> ($urandom_range(0, DEN_W - 1));
      if (den == 0 && n != 0) den = 1;
      exp_lead = -1;
      for (int i = 0; i < DEN_W; i++) if (den[i]) exp_lead = i;
      @(posedge clk); #1;
      check(out_valid && out_tag == in_tag, "valid/tag");
      if (den == 0) begin
        check(zero, "zero flag");
      end else begin
        check(!zero, "no zero flag");
        check(int'(lead) == exp_lead, $sformatf("lead %0d exp %0d den %h", lead, exp_lead, den));
        check(d[RW-1], "normalised top bit");
        // d, read as a fraction, must lie within one RW-bit step below den / 2^(lead+1)
        val  = real'(den) / (2.0 ** (exp_lead + 1));
        dval = real'(d) / (2.0 ** RW);
        check(dval <= val && val - dval < ULP,
              $sformatf("d %f exp %f", dval, val));
      end
    end
    @(negedge clk); in_valid = 1'b0;
    @(posedge clk); #1;
    check(!out_valid, "valid drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
