// tb_gain_lut: self-checking test of gain_lut.
//
// Fills the whole table with random words, reads every word back, then
// mixes random reads and writes every cycle against a reference array kept
// here, including reads of the word being written (which must return the
// old word), and checks that rdata follows raddr by one cycle.
module tb_gain_lut;

  localparam int unsigned AW = 8;
  localparam int unsigned W  = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [AW-1:0] raddr, waddr;
  logic [W-1:0]  rdata, wdata;
  logic          we;

  gain_lut #(.AW(AW), .W(W)) dut (.*);

  int checks = 0, failures = 0, n_collide = 0;
  logic [W-1:0] model [2**AW];

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

  logic [W-1:0] exp_r;
  initial begin
    we = 1'b0; raddr = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      raddr = AW'(i);
      @(posedge clk); #1;
      check(rdata == model[i], $sformatf("fill readback %0d", i));
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      raddr = AW'($urandom);
      we    = $urandom_range(0, 1) == 1;
      waddr = ($urandom_range(0, 3) == 0) ? raddr : AW'($urandom);
      wdata = $urandom;
      exp_r = model[raddr];
      if (we && waddr == raddr) n_collide++;
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      check(rdata == exp_r, $sformatf("read %0d", raddr));
    end
    check(n_collide > 100, "same-word read and write exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
