// idwt_filter -- one output sample of the inverse 9/7 DWT built from MLOA multipliers.
//
// The inverse transform interleaves a low band L and a high band H into u (u[2j] = L[j],
// u[2j+1] = H[j]) and filters it; this is upsampling by two followed by the two synthesis
// filters, summed. For output sample m the window win[0..8] = u[m-4 .. m+4] is multiplied by
// the kernel SY_EVEN (m even) or SY_ODD (m odd), selected by `odd`. Nine 16 x 16
// mloa_lc_multiplier instances form the sample-magnitude x tap-magnitude products; signs are
// applied afterwards, the products summed, rounded (+2^14, shift by 15) and saturated to 16
// bits, exactly as in dwt_filter_pair.
//
// The inverse transform itself is what the method uses to reconstruct images; its structure
// here (one shared window, two kernels, multiplier configuration equal to the forward
// path) is this design's choice.
//
// Timing: registered output, one clock after in_valid; a window may enter every clock.
module idwt_filter
  import mloa_pkg::*;
#(
  parameter final_adder_e FINAL_ADDER = FA_LC_AKSA,
  parameter int           APPROX_BITS = SAMPLE_W - 1,
  parameter int           K_DROP      = 0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic                       odd,
  input  logic signed [SAMPLE_W-1:0] win [SY_TAPS],
  output logic                       out_valid,
  output logic signed [SAMPLE_W-1:0] y
);
  localparam int PW   = 2 * SAMPLE_W;
  localparam int ACCW = PW + 4;

  logic signed [ACCW-1:0] term [SY_TAPS];

  for (genvar t = 0; t < SY_TAPS; t++) begin : g_tap
    logic                neg;
    logic [SAMPLE_W-1:0] mag;
    tap_t                tap;
    logic [PW-1:0]       prod;
    assign neg = win[t][SAMPLE_W-1];
    assign mag = neg ? SAMPLE_W'(-win[t]) : SAMPLE_W'(win[t]);
    assign tap = odd ? SY_ODD[t] : SY_EVEN[t];
    mloa_lc_multiplier #(
      .N(SAMPLE_W), .K_DROP(K_DROP), .FINAL_ADDER(FINAL_ADDER), .APPROX_BITS(APPROX_BITS)
    ) u_mul (
      .a(mag), .b(tap.mag), .p(prod)
    );
    assign term[t] = (neg ^ tap.neg) ? -ACCW'(prod) : ACCW'(prod);
  end

  logic signed [ACCW-1:0] acc, r;
  always_comb begin
    acc = '0;
    for (int t = 0; t < SY_TAPS; t++) acc += term[t];
    r = (acc + ACCW'(1 << (COEF_FRAC - 1))) >>> COEF_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (r > ACCW'(2 ** (SAMPLE_W - 1) - 1))   y <= {1'b0, {(SAMPLE_W-1){1'b1}}};
        else if (r < -ACCW'(2 ** (SAMPLE_W - 1))) y <= {1'b1, {(SAMPLE_W-1){1'b0}}};
        else                                      y <= r[SAMPLE_W-1:0];
      end
    end
  end
endmodule
