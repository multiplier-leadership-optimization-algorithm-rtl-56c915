// kogge_stone_adder -- exact W-bit parallel-prefix adder, sum = a + b + cin.
//
// Bit generate/propagate pairs are combined over ceil(log2 W) prefix levels; at level l each
// bit i merges the group ending at i - 2^l (the Kogge-Stone pattern, fan-out 1 per level).
// The group generate/propagate of bits [i:0] then give the carry into bit i+1 together with
// cin. Used as the exact final adder of the multiplier and as the exact upper part of the
// leader-column approximate adder. Combinational; delay grows with log2(W).
module kogge_stone_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int LV = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] g [LV+1];
  logic [W-1:0] p [LV+1];
  logic [W:0]   c;

  assign g[0] = a & b;
  assign p[0] = a ^ b;

  for (genvar l = 0; l < LV; l++) begin : g_level
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= (1 << l)) begin : g_merge
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-(1<<l)]);
        assign p[l+1][i] = p[l][i] & p[l][i-(1<<l)];
      end else begin : g_keep
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_carry
    assign c[i+1] = g[LV][i] | (p[LV][i] & cin);
  end

  assign sum  = p[0] ^ c[W-1:0];
  assign cout = c[W];
endmodule
