// tb_complex_mult: self-checking test of complex_mult.
//
// Drives random operands (plus the extreme values) into one plain and one
// conjugating instance every cycle and compares each result, one cycle
// later, with products worked out here in 64-bit integers.
module tb_complex_mult;

  localparam int unsigned A_W = 16;
  localparam int unsigned B_W = 16;
  localparam int unsigned N   = 2000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    in_valid;
  logic signed [A_W-1:0]   a_re, a_im;
  logic signed [B_W-1:0]   b_re, b_im;
  logic                    v0, v1;
  logic signed [A_W+B_W:0] p0_re, p0_im, p1_re, p1_im;

  complex_mult #(.A_W(A_W), .B_W(B_W), .CONJ_B(1'b0)) dut0 (
    .clk, .rst_n, .in_valid, .a_re, .a_im, .b_re, .b_im,
    .out_valid (v0), .p_re (p0_re), .p_im (p0_im));
  complex_mult #(.A_W(A_W), .B_W(B_W), .CONJ_B(1'b1)) dut1 (
    .clk, .rst_n, .in_valid, .a_re, .a_im, .b_re, .b_im,
    .out_valid (v1), .p_re (p1_re), .p_im (p1_im));

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

  longint ar, ai, br, bi;
  initial begin
    in_valid = 1'b0;
    a_re = '0; a_im = '0; b_re = '0; b_im = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      if (n < 4) begin
        a_re = (n[0]) ? -16'sd32768 : 16'sd32767;
        a_im = (n[1]) ? -16'sd32768 : 16'sd32767;
        b_re = -16'sd32768;
        b_im = (n[0]) ? 16'sd32767 : -16'sd32768;
      end else begin
        a_re = $signed(16'($urandom)); a_im = $signed(16'($urandom));
        b_re = $signed(16'($urandom)); b_im = $signed(16'($urandom));
      end
      ar = a_re; ai = a_im; br = b_re; bi = b_im;
      @(posedge clk);
      #1;
      check(v0 && v1, "valid after one cycle");
      check(longint'(p0_re) == ar*br - ai*bi, $sformatf("re %0d", p0_re));
      check(longint'(p0_im) == ai*br + ar*bi, $sformatf("im %0d", p0_im));
      check(longint'(p1_re) == ar*br + ai*bi, $sformatf("conj re %0d", p1_re));
      check(longint'(p1_im) == ai*br - ar*bi, $sformatf("conj im %0d", p1_im));
    end
    @(negedge clk);
    in_valid = 1'b0;
    @(posedge clk); #1;
    check(!v0 && !v1, "valid drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
