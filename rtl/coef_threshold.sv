// coef_threshold -- hard thresholding of one wavelet coefficient.
//
// A coefficient whose magnitude is at least thr is kept, a smaller one is set to zero:
//   out = (|c| >= thr) ? c : 0,
// and nonzero flags a coefficient that survives as a non-zero value, so that counting it
// over a frame gives the retained-coefficient count of the compression ratio
// CR = N_total / N_nonzero. The rule is the method's; the word width is this design's.
// Purely combinational.
module coef_threshold
  import mloa_pkg::*;
(
  input  logic signed [SAMPLE_W-1:0] c,
  input  logic        [SAMPLE_W-1:0] thr,
  output logic signed [SAMPLE_W-1:0] out,
  output logic                       nonzero
);
  logic [SAMPLE_W:0] mag;
  assign mag     = c[SAMPLE_W-1] ? -(SAMPLE_W+1)'(c) : (SAMPLE_W+1)'(c);
  assign out     = (mag >= {1'b0, thr}) ? c : '0;
  assign nonzero = (out != '0);
endmodule
