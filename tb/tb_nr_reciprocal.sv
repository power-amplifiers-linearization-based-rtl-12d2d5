// tb_nr_reciprocal: self-checking test of nr_reciprocal.
//
// Streams random normalised divisors (and both ends of [0.5, 1)) one per
// cycle and checks each reciprocal, NR_ITERS+1 = 6 cycles later, against
// 1/d computed in floating point: it must be within 4 units of the last
// place either way. It also checks that the start value alone (NR_ITERS = 0) is within
// 1/17 of the true reciprocal, and that one division accepted per cycle
// yields one result per cycle.
module tb_nr_reciprocal;

  localparam int unsigned RW  = 20;
  localparam real ULP = 1.0 / real'(1 << RW);
  localparam int unsigned LAT = 6;
  localparam int unsigned N   = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           in_valid, out_valid, out_valid0;
  logic [RW-1:0]  d;
  logic [15:0]    in_tag, out_tag, out_tag0;
  logic [RW+1:0]  r, r0;

  nr_reciprocal #(.RW(RW), .NR_ITERS(5), .TAG_W(16)) dut (.*);
  nr_reciprocal #(.RW(RW), .NR_ITERS(0), .TAG_W(16)) dut0 (
    .clk, .rst_n, .in_valid, .d, .in_tag,
    .out_valid (out_valid0), .r (r0), .out_tag (out_tag0));

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

  // stimulus: one divisor per cycle, tag = sample number
  logic [RW-1:0] d_hist [N];
  int cycle = 0, first_out = -1, outs = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    in_valid = 1'b0; d = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      if (n == 0)      d_hist[n] = {1'b1, {(RW-1){1'b0}}};
      else if (n == 1) d_hist[n] = '1;
      else             d_hist[n] = {1'b1, (RW-1)'($urandom)};
      d        = d_hist[n];
      in_tag   = 16'(n);
      in_valid = 1'b1;
      if (n == 0) first_out = cycle;
    end
    @(negedge clk); in_valid = 1'b0;
  end

  real exact, got, got0;
  int  in_cycle0;
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      if (outs == 0) check(cycle - first_out == LAT, $sformatf("latency %0d", cycle - first_out));
      check(int'(out_tag) == outs, "in-order, one per cycle");
      exact = (2.0 ** RW) / real'(d_hist[12'(out_tag)]);
      got   = real'(r) / (2.0 ** RW);
      check(got - exact < 4.0 * ULP && exact - got < 4.0 * ULP,
            $sformatf("d=%h r=%f exact=%f", d_hist[12'(out_tag)], got, exact));
      outs++;
      if (outs == N) begin
        check(!$isunknown(r), "done");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid0) begin
      exact = (2.0 ** RW) / real'(d_hist[12'(out_tag0)]);
      got0  = real'(r0) / (2.0 ** RW);
      check((got0 - exact) / exact < 1.0 / 17.0 + 1e-6 && (exact - got0) / exact < 1.0 / 17.0 + 1e-6,
            $sformatf("start value %f for %f", got0, exact));
    end
  end

endmodule
