// mloa_lc_multiplier -- N x N unsigned multiplier with leader-column (MLOA-LC) reduction.
//
// How it works:
//  1. Partial products pp(i,j) = a_i & b_j are placed in weighted columns k = i + j. With
//     K_DROP > 0 the partial products of the K_DROP lowest columns are pruned (not built).
//  2. The column heights H_k are fixed by N and K_DROP; the leader column k_L is the first
//     column of maximum height (k_L = N-1, height N, when K_DROP < N).
//  3. The tree reduces every column in stages to the Dadda targets d_1 = 2,
//     d_(r+1) = floor(1.5 d_r) (8 -> 6 -> 4 -> 3 -> 2 for N = 8). At each stage column k
//     must shed E_k = max(0, H_k + incoming carries - d_r) bits. Exact 4:2 compressors
//     (5 bits of the column in, sheds 4) are allowed only in the leader column and its
//     LC_SPAN neighbours on each side; elsewhere, and for what is left, 3:2 compressors
//     (shed 2) and half adders (shed 1) are used. The whole schedule is worked out at
//     elaboration by the constant function build_sched() and the compressors are instantiated
//     from it.
//  4. The two rows left are added by the final adder FINAL_ADDER: exact ripple CPA, exact
//     Kogge-Stone, or the leader-column approximate Kogge-Stone adder (default), whose
//     approximate part spans APPROX_BITS low bits (default N-1: every column below the
//     leader column).
//
// What follows the method: AND partial products, column heights and the leader column,
// the Dadda target sequence, 3:2/4:2 compressors focused on the leader column, pruning of
// low columns by k_drop and the approximate final-adder cell. This design's own choices:
// the 4:2 compressor takes its fifth input from its own column (not from a neighbour's
// cout), half adders finish columns that are one bit over target, the number of
// compressors per column is counted from least to most significant (a column must know
// the carries arriving from the column below), and LC_SPAN = 1.
//
// Interface: a, b unsigned N-bit operands, p the 2N-bit product (approximate unless
// K_DROP = 0 and the final adder is exact). Purely combinational; no clock.
module mloa_lc_multiplier
  import mloa_pkg::*;
#(
  parameter int           N           = 8,
  parameter int           K_DROP      = 0,
  parameter final_adder_e FINAL_ADDER = FA_LC_AKSA,
  parameter int           APPROX_BITS = N - 1,
  parameter int           LC_SPAN     = 1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int W     = 2 * N;   // product columns
  localparam int MAXS  = 8;       // enough stages for N up to 42
  localparam int MAXH  = 2 * N;   // slot count per column (heights never exceed N + 2)

  // ---------------------------------------------------------------------------------------
  // Reduction schedule, computed once at elaboration into the packed table SCHED of 8-bit
  // entries: entry (what, s, k) at index (what*(MAXS+1) + s)*W + k, with what = 0: height
  // of column k entering stage s (s = 0..STAGES), 1: 4:2 compressors, 2: 3:2 compressors,
  // 3: half adders placed in column k at stage s. Entry (4, 0, 0) holds the stage count.
  // ---------------------------------------------------------------------------------------
  localparam int TBL_N = 5 * (MAXS + 1) * W;
  typedef logic [TBL_N*8-1:0] sched_t;

  function automatic sched_t build_sched();
    sched_t t;
    // Flattened [stage][column] tables (index stage*W + column).
    int h   [(MAXS+1)*W];
    int n42 [(MAXS+1)*W];
    int n32 [(MAXS+1)*W];
    int n22 [(MAXS+1)*W];
    int dseq [MAXS+1];
    int nd, hmax, kl, stages, d, inc, e, avail, span, cnt;
    for (int i = 0; i < TBL_N; i++) t[i*8 +: 8] = 8'd0;
    hmax = 0; kl = 0;
    for (int c = 0; c < W; c++) begin
      cnt = 0;
      if (c >= K_DROP)
        for (int i = 0; i < N; i++)
          if (c - i >= 0 && c - i < N) cnt++;
      h[c] = cnt;
      if (cnt > hmax) begin hmax = cnt; kl = c; end
    end
    // Dadda targets below the initial maximum height, ascending.
    nd = 0; d = 2;
    while (d < hmax && nd < MAXS) begin
      dseq[nd] = d; nd++; d = (3 * d) / 2;
    end
    stages = nd;
    for (int i = 0; i < (MAXS+1)*W; i++) begin
      n42[i] = 0; n32[i] = 0; n22[i] = 0;
      if (i >= W) h[i] = 0;
    end
    for (int st = 0; st < stages; st++) begin
      d = dseq[stages - 1 - st];
      for (int c = 0; c < W; c++) begin
        inc   = (c > 0) ? (2 * n42[st*W + c-1] + n32[st*W + c-1] + n22[st*W + c-1]) : 0;
        e     = h[st*W + c] + inc - d;
        avail = h[st*W + c];
        span  = (c > kl) ? c - kl : kl - c;
        while (e > 0 && avail >= 2) begin
          if (span <= LC_SPAN && e >= 3 && avail >= 5) begin
            n42[st*W + c]++; avail -= 5; e -= 4;
          end else if (e >= 2 && avail >= 3) begin
            n32[st*W + c]++; avail -= 3; e -= 2;
          end else begin
            n22[st*W + c]++; avail -= 2; e -= 1;
          end
        end
        h[(st+1)*W + c] = h[st*W + c] - 4 * n42[st*W + c] - 2 * n32[st*W + c]
                        - n22[st*W + c] + inc;
      end
    end
    for (int i = 0; i < (MAXS+1)*W; i++) begin
      t[(0*(MAXS+1)*W + i)*8 +: 8] = 8'(h[i]);
      t[(1*(MAXS+1)*W + i)*8 +: 8] = 8'(n42[i]);
      t[(2*(MAXS+1)*W + i)*8 +: 8] = 8'(n32[i]);
      t[(3*(MAXS+1)*W + i)*8 +: 8] = 8'(n22[i]);
    end
    t[(4*(MAXS+1)*W)*8 +: 8] = 8'(stages);
    return t;
  endfunction

  localparam sched_t SCHED = build_sched();

  function automatic int sched(input int s, input int k, input int what);
    return int'(SCHED[((what*(MAXS+1) + s)*W + k)*8 +: 8]);
  endfunction

  localparam int STAGES = sched(0, 0, 4);

  // pp[k]: partial products of column k, packed from slot 0 upward.
  logic [MAXH-1:0] pp [W];

  for (genvar k = 0; k < W; k++) begin : g_pp
    always_comb begin
      int n;
      pp[k] = '0;
      n = 0;
      if (k >= K_DROP)
        for (int i = 0; i < N; i++)
          if (k - i >= 0 && k - i < N) begin
            pp[k][n] = a[i] & b[k-i];
            n++;
          end
    end
  end

  // Reduction stages. g_stage[s].cur holds the columns entering stage s, g_stage[s].nxt
  // the columns leaving it, g_stage[s].cy the carries each column hands to the next one.
  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    logic [MAXH-1:0] cur [W];
    logic [MAXH-1:0] nxt [W];
    logic [MAXH-1:0] cy  [W];

    if (s == 0) begin : g_from_pp
      assign cur = pp;
    end else begin : g_from_prev
      assign cur = g_stage[s-1].nxt;
    end

    for (genvar k = 0; k < W; k++) begin : g_col
      localparam int H    = sched(s, k, 0);
      localparam int A42  = sched(s, k, 1);
      localparam int A32  = sched(s, k, 2);
      localparam int A22  = sched(s, k, 3);
      localparam int NSUM = A42 + A32 + A22;
      localparam int CONS = 5 * A42 + 3 * A32 + 2 * A22;
      localparam int PASS = H - CONS;
      localparam int NCY  = 2 * A42 + A32 + A22;
      localparam int INC  = (k > 0) ? (2 * sched(s, k-1, 1) + sched(s, k-1, 2)
                                       + sched(s, k-1, 3)) : 0;

      logic [MAXH-1:0] sums;
      logic [MAXH-1:0] cyl;

      for (genvar i = 0; i < A42; i++) begin : g_c42
        compressor_4_2 u_c42 (
          .x    (cur[k][5*i +: 4]),
          .cin  (cur[k][5*i + 4]),
          .sum  (sums[i]),
          .carry(cyl[2*i]),
          .cout (cyl[2*i + 1])
        );
      end
      for (genvar i = 0; i < A32; i++) begin : g_c32
        compressor_3_2 u_c32 (
          .a    (cur[k][5*A42 + 3*i]),
          .b    (cur[k][5*A42 + 3*i + 1]),
          .c    (cur[k][5*A42 + 3*i + 2]),
          .sum  (sums[A42 + i]),
          .carry(cyl[2*A42 + i])
        );
      end
      for (genvar i = 0; i < A22; i++) begin : g_c22
        half_adder u_ha (
          .a    (cur[k][5*A42 + 3*A32 + 2*i]),
          .b    (cur[k][5*A42 + 3*A32 + 2*i + 1]),
          .sum  (sums[A42 + A32 + i]),
          .carry(cyl[2*A42 + A32 + i])
        );
      end
      for (genvar i = NSUM; i < MAXH; i++) begin : g_sum_pad
        assign sums[i] = 1'b0;
      end
      for (genvar i = NCY; i < MAXH; i++) begin : g_cy_pad
        assign cyl[i] = 1'b0;
      end
      assign cy[k] = cyl;

      // Next-stage column: own sums, untouched bits, then carries from column k-1.
      if (k == 0) begin : g_first
        always_comb begin
          nxt[k] = '0;
          for (int i = 0; i < NSUM; i++) nxt[k][i] = sums[i];
          for (int i = 0; i < PASS; i++) nxt[k][NSUM + i] = cur[k][CONS + i];
        end
      end else begin : g_other
        always_comb begin
          nxt[k] = '0;
          for (int i = 0; i < NSUM; i++) nxt[k][i] = sums[i];
          for (int i = 0; i < PASS; i++) nxt[k][NSUM + i] = cur[k][CONS + i];
          for (int i = 0; i < INC; i++)  nxt[k][NSUM + PASS + i] = cy[k-1][i];
        end
      end
    end
  end

  // Final two rows.
  logic [W-1:0] row_a, row_b;
  for (genvar k = 0; k < W; k++) begin : g_rows
    if (STAGES == 0) begin : g_direct
      assign row_a[k] = pp[k][0];
      assign row_b[k] = pp[k][1];
    end else begin : g_reduced
      assign row_a[k] = g_stage[STAGES-1].nxt[k][0];
      assign row_b[k] = g_stage[STAGES-1].nxt[k][1];
    end
  end

  if (FINAL_ADDER == FA_RIPPLE_CPA) begin : g_cpa
    assign p = row_a + row_b;
  end else if (FINAL_ADDER == FA_KOGGE_STONE) begin : g_ksa
    logic unused_cout;
    kogge_stone_adder #(.W(W)) u_ksa (
      .a(row_a), .b(row_b), .cin(1'b0), .sum(p), .cout(unused_cout)
    );
  end else begin : g_aksa
    lc_approx_final_adder #(.W(W), .APPROX_BITS(APPROX_BITS)) u_aksa (
      .a(row_a), .b(row_b), .sum(p)
    );
  end

endmodule
