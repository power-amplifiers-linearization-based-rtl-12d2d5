// pa_model: behavioural model of a power amplifier and its feedback path
// (not synthesizable; for simulation only).
//
// Stands in for the analog chain a predistorter drives: converter,
// amplifier, attenuator and receiver, seen at complex baseband. The
// amplifier is memoryless with Saleh-style curves
//     |y| = r / (1 + BETA * r^2),   arg(y) - arg(z) = ALPHA * r^2 / (1 + r^2)
// for drive amplitude r = |z|, normalised so that the small-signal gain is
// one. Each valid input gives one valid output DELAY cycles later, which
// models the loop delay of the feedback path.
module pa_model #(
  parameter real         BETA  = 0.5,
  parameter real         ALPHA = 0.5,
  parameter int unsigned DELAY = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  cgmp_pkg::sample_t z,
  output logic          out_valid,
  output cgmp_pkg::sample_t y
);

  localparam real FS = 32768.0;

  cgmp_pkg::sample_t y_line [DELAY];
  logic              v_line [DELAY];

  function automatic cgmp_pkg::sample_t amplify(input cgmp_pkg::sample_t s);
    real zr, zi, r, a, ph, c, si, yr, yi;
    cgmp_pkg::sample_t o;
    zr = real'(s.re) / FS;
    zi = real'(s.im) / FS;
    r  = $sqrt(zr * zr + zi * zi);
    a  = 1.0 / (1.0 + BETA * r * r);
    ph = ALPHA * r * r / (1.0 + r * r);
    c  = $cos(ph);
    si = $sin(ph);
    yr = a * (zr * c - zi * si);
    yi = a * (zr * si + zi * c);
    o.re = 16'($rtoi($floor(yr * FS + 0.5)));
    o.im = 16'($rtoi($floor(yi * FS + 0.5)));
    return o;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DELAY; i++) begin
        v_line[i] <= 1'b0;
        y_line[i] <= '0;
      end
    end else begin
      v_line[0] <= in_valid;
      y_line[0] <= amplify(z);
      for (int i = 1; i < DELAY; i++) begin
        v_line[i] <= v_line[i-1];
        y_line[i] <= y_line[i-1];
      end
    end
  end

  assign out_valid = v_line[DELAY-1];
  assign y         = y_line[DELAY-1];

endmodule
