// dwt_filter_pair -- one analysis step of the 9/7 biorthogonal DWT built from MLOA multipliers.
//
// From a window of nine consecutive samples win[0..8] = x[c-4 .. c+4], centred on an even
// sample c, it forms in parallel
//   lo = sum_{t=-4..4} h0[t] * x[c+t]        (9-tap low-pass, output for position c/2)
//   hi = sum_{t=-3..3} h1[t] * x[c+1+t]      (7-tap high-pass, output for position c/2)
// which is filtering followed by downsampling by two. Each tap is one multiply of the MAC:
// the sample magnitude (16 bits) times the tap magnitude (Q1.15) in a 16 x 16
// mloa_lc_multiplier, the sign applied afterwards (sign-magnitude products), all products
// summed, rounded to nearest and shifted back by 15 bits, and saturated to 16 bits.
// The multiplier configuration (final adder, approximate width, pruned columns) is a
// parameter, fixed at design time, and the same for all sixteen taps.
//
// The filter structure (low-pass and high-pass MACs on multiplier-based products, then
// downsampling) follows the method; the taps are the standard CDF 9/7 values, and the
// sample format, the sign-magnitude use of the unsigned multiplier, rounding, saturation
// and one full multiplier per tap (no folding of symmetric taps) are this design's choices.
//
// Timing: in_valid with win is registered into lo/hi/out_valid one clock later, so a new
// window may be presented every clock.
module dwt_filter_pair
  import mloa_pkg::*;
#(
  parameter final_adder_e FINAL_ADDER = FA_LC_AKSA,
  parameter int           APPROX_BITS = SAMPLE_W - 1,
  parameter int           K_DROP      = 0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic signed [SAMPLE_W-1:0] win [LP_TAPS],
  output logic                       out_valid,
  output logic signed [SAMPLE_W-1:0] lo,
  output logic signed [SAMPLE_W-1:0] hi
);
  localparam int PW   = 2 * SAMPLE_W;   // product width
  localparam int ACCW = PW + 4;         // room for nine signed products

  logic [SAMPLE_W-1:0] mag [LP_TAPS];
  logic                neg [LP_TAPS];

  for (genvar t = 0; t < LP_TAPS; t++) begin : g_mag
    assign neg[t] = win[t][SAMPLE_W-1];
    assign mag[t] = neg[t] ? SAMPLE_W'(-win[t]) : SAMPLE_W'(win[t]);
  end

  logic signed [ACCW-1:0] lp_term [LP_TAPS];
  logic signed [ACCW-1:0] hp_term [HP_TAPS];

  for (genvar t = 0; t < LP_TAPS; t++) begin : g_lp
    logic [PW-1:0] prod;
    mloa_lc_multiplier #(
      .N(SAMPLE_W), .K_DROP(K_DROP), .FINAL_ADDER(FINAL_ADDER), .APPROX_BITS(APPROX_BITS)
    ) u_mul (
      .a(mag[t]), .b(LP_TAP[t].mag), .p(prod)
    );
    assign lp_term[t] = (neg[t] ^ LP_TAP[t].neg) ? -ACCW'(prod) : ACCW'(prod);
  end

  for (genvar t = 0; t < HP_TAPS; t++) begin : g_hp
    logic [PW-1:0] prod;
    mloa_lc_multiplier #(
      .N(SAMPLE_W), .K_DROP(K_DROP), .FINAL_ADDER(FINAL_ADDER), .APPROX_BITS(APPROX_BITS)
    ) u_mul (
      .a(mag[t+2]), .b(HP_TAP[t].mag), .p(prod)
    );
    assign hp_term[t] = (neg[t+2] ^ HP_TAP[t].neg) ? -ACCW'(prod) : ACCW'(prod);
  end

  function automatic logic signed [SAMPLE_W-1:0] round_sat(input logic signed [ACCW-1:0] acc);
    logic signed [ACCW-1:0] r;
    r = (acc + ACCW'(1 << (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (r > ACCW'(2 ** (SAMPLE_W - 1) - 1))    return {1'b0, {(SAMPLE_W-1){1'b1}}};
    else if (r < -ACCW'(2 ** (SAMPLE_W - 1)))  return {1'b1, {(SAMPLE_W-1){1'b0}}};
    else                                       return r[SAMPLE_W-1:0];
  endfunction

  logic signed [ACCW-1:0] lp_acc, hp_acc;
  always_comb begin
    lp_acc = '0;
    for (int t = 0; t < LP_TAPS; t++) lp_acc += lp_term[t];
    hp_acc = '0;
    for (int t = 0; t < HP_TAPS; t++) hp_acc += hp_term[t];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      lo        <= '0;
      hi        <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        lo <= round_sat(lp_acc);
        hi <= round_sat(hp_acc);
      end
    end
  end
endmodule
