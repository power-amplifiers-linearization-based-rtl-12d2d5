// gain_lut: RAM of complex predistortion gains.
//
// DEPTH = 2^AW words of W bits (a packed complex gain). One read port for
// the predistortion path and one write port for the adaptation and
// initialisation logic, so the gains can be refreshed while samples flow.
// The gain table itself follows the predistorter's lookup-table block;
// using a separate write port instead of one shared address is this
// design's choice. The array has no reset: the owner writes every word
// before use.
//
// Timing: synchronous read, rdata is mem[raddr] one cycle after raddr.
// A read and a write to the same word in the same cycle return the old
// word (read-first). Writes take effect at the clock edge.
module gain_lut #(
  parameter int unsigned AW = 8,
  parameter int unsigned W  = 32
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

endmodule
