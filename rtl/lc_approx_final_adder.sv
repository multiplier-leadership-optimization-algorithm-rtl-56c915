// lc_approx_final_adder -- leader-column approximate Kogge-Stone final adder (LC-AKSA).
//
// Adds the two rows that remain after partial-product reduction. The APPROX_BITS low bits
// use the approximate cell of the method,
//   S_i = (A_i xor B_i) or C_i,   C_(i+1) = A_i,
// so no carry ripples through the low part: each carry is just the row-A bit below it. The
// bits from APPROX_BITS upward are added exactly by a Kogge-Stone prefix adder whose carry
// in is the approximate carry C_(APPROX_BITS) = A_(APPROX_BITS-1). The cell equations follow
// the method; putting the split at the multiplier's leader column (APPROX_BITS = N-1 for an
// N x N product, the default 7 for 8 x 8) and using Kogge-Stone above it are this design's
// reading of "leader-column approximate Kogge-Stone adder". The error is always less than
// 2^(APPROX_BITS+1) in magnitude. Combinational.
module lc_approx_final_adder #(
  parameter int W           = 16,
  parameter int APPROX_BITS = 7
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  if (APPROX_BITS <= 0) begin : g_exact
    logic unused_cout;
    kogge_stone_adder #(.W(W)) u_ksa (
      .a(a), .b(b), .cin(1'b0), .sum(sum), .cout(unused_cout)
    );
  end else if (APPROX_BITS >= W) begin : g_all_approx
    logic [W:0] c;
    assign c[0] = 1'b0;
    assign c[W:1] = a;
    assign sum = (a ^ b) | c[W-1:0];
  end else begin : g_split
    logic [APPROX_BITS:0] c;
    logic                 unused_cout;
    assign c[0] = 1'b0;
    assign c[APPROX_BITS:1] = a[APPROX_BITS-1:0];
    assign sum[APPROX_BITS-1:0] = (a[APPROX_BITS-1:0] ^ b[APPROX_BITS-1:0])
                                | c[APPROX_BITS-1:0];
    kogge_stone_adder #(.W(W - APPROX_BITS)) u_ksa (
      .a   (a[W-1:APPROX_BITS]),
      .b   (b[W-1:APPROX_BITS]),
      .cin (c[APPROX_BITS]),
      .sum (sum[W-1:APPROX_BITS]),
      .cout(unused_cout)
    );
  end
endmodule
