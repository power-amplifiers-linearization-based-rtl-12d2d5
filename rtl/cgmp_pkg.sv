// cgmp_pkg: number formats shared by the complex-gain predistorter.
//
// Baseband samples are complex pairs of signed 16-bit two's-complement
// words in Q1.15 (full scale +/-1.0). Complex gains are signed 16-bit
// words in Q2.14 (range +/-2.0), so unity gain is 16384. These widths are
// this design's choice; the predistortion scheme itself does not fix them.
package cgmp_pkg;

  localparam int unsigned SMP_W  = 16;  // sample word width
  localparam int unsigned GAIN_W = 16;  // gain word width
  localparam int unsigned GAIN_F = 14;  // gain fraction bits

  typedef struct packed {
    logic signed [SMP_W-1:0] re;
    logic signed [SMP_W-1:0] im;
  } sample_t;

  typedef struct packed {
    logic signed [GAIN_W-1:0] re;
    logic signed [GAIN_W-1:0] im;
  } gain_t;

  localparam gain_t GAIN_ONE = '{re: 16'sd16384, im: 16'sd0};

endpackage
