// mloa_pkg -- types and constants shared by the approximate-multiplier DWT datapath.
//
// final_adder_e selects the adder that turns the two rows left by the partial-product
// reduction tree into the product: an exact ripple carry-propagate adder (CPA), an exact
// Kogge-Stone prefix adder (KSA), or the leader-column approximate Kogge-Stone adder
// (LC-AKSA), the configuration this design uses by default.
//
// The 9/7 analysis filter taps are the standard CDF 9/7 (JPEG2000 irreversible) values,
// quantised to Q1.15 sign-magnitude form: low-pass taps sum to exactly 32768 (DC gain 1),
// high-pass taps sum to exactly 0. Sample words are signed 16-bit with SAMPLE_FRAC
// fractional bits, so an 8-bit pixel p enters as p << 4. These numeric choices are this
// design's own; the filter family, the three decomposition levels and the symmetric
// boundary extension follow the method the design implements. The synthesis kernels of the
// inverse transform are derived from the same quantised taps.
package mloa_pkg;

  typedef enum logic [1:0] {
    FA_RIPPLE_CPA  = 2'd0,
    FA_KOGGE_STONE = 2'd1,
    FA_LC_AKSA     = 2'd2
  } final_adder_e;

  localparam int SAMPLE_W    = 16;  // signed sample / coefficient word
  localparam int SAMPLE_FRAC = 4;   // fractional bits of a sample word
  localparam int COEF_FRAC   = 15;  // fractional bits of a filter tap magnitude
  localparam int LP_TAPS     = 9;
  localparam int HP_TAPS     = 7;

  // Filter tap in sign-magnitude form, as the unsigned multiplier consumes it.
  typedef struct packed {
    logic        neg;
    logic [15:0] mag;
  } tap_t;

  // Low-pass taps h0[-4..4] (symmetric), Q1.15.
  localparam tap_t LP_TAP [LP_TAPS] = '{
    '{1'b0, 16'd877},  '{1'b1, 16'd553},  '{1'b1, 16'd2563}, '{1'b0, 16'd8745},
    '{1'b0, 16'd19756},
    '{1'b0, 16'd8745}, '{1'b1, 16'd2563}, '{1'b1, 16'd553},  '{1'b0, 16'd877}
  };

  // High-pass taps h1[-3..3] (symmetric, centred on the odd sample), Q1.15.
  localparam tap_t HP_TAP [HP_TAPS] = '{
    '{1'b0, 16'd2991}, '{1'b1, 16'd1886}, '{1'b1, 16'd19375},
    '{1'b0, 16'd36540},
    '{1'b1, 16'd19375}, '{1'b1, 16'd1886}, '{1'b0, 16'd2991}
  };

  // Synthesis kernels of the inverse 9/7 transform, applied to a nine-sample window of the
  // interleaved sequence u (u[2j] = L[j], u[2j+1] = H[j]) centred on output sample m.
  // SY_EVEN is used for even m, SY_ODD for odd m. They are the synthesis filters
  // g0[d] = (-1)^d h1[d] and g1[d] = (-1)^d h0[d] of the taps above, so the same rounding
  // carries over: SY_EVEN sums to 32768 over the L positions, SY_ODD likewise.
  localparam int SY_TAPS = 9;

  localparam tap_t SY_EVEN [SY_TAPS] = '{
    '{1'b0, 16'd0},    '{1'b0, 16'd553},  '{1'b1, 16'd1886}, '{1'b1, 16'd8745},
    '{1'b0, 16'd36540},
    '{1'b1, 16'd8745}, '{1'b1, 16'd1886}, '{1'b0, 16'd553},  '{1'b0, 16'd0}
  };

  localparam tap_t SY_ODD [SY_TAPS] = '{
    '{1'b0, 16'd877},  '{1'b1, 16'd2991}, '{1'b1, 16'd2563}, '{1'b0, 16'd19375},
    '{1'b0, 16'd19756},
    '{1'b0, 16'd19375}, '{1'b1, 16'd2563}, '{1'b1, 16'd2991}, '{1'b0, 16'd877}
  };

endpackage
