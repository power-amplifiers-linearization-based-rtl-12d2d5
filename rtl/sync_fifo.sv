// sync_fifo: single-clock first-in first-out buffer with show-ahead output.
//
// Holds up to 2^AW words of W bits. dout shows the oldest word whenever
// empty is low; pop removes it at the clock edge. A push when full and a
// pop when empty are ignored (the caller checks full/empty). clear empties
// the buffer in one cycle. The predistorter uses it to hold each sample's
// context until the amplifier's feedback for that sample returns; that
// pairing scheme is this design's own.
module sync_fifo #(
  parameter int unsigned AW = 4,
  parameter int unsigned W  = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          push,
  input  logic [W-1:0]  din,
  input  logic          pop,
  output logic [W-1:0]  dout,
  output logic          full,
  output logic          empty
);

  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wr_ptr, rd_ptr;
  logic         do_push, do_pop;

  assign empty   = (wr_ptr == rd_ptr);
  assign full    = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else if (clear) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_push) wr_ptr <= wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push && !clear) mem[wr_ptr[AW-1:0]] <= din;
  end

endmodule
