// dwt2d_engine -- separable three-level 2-D 9/7 DWT controller with a thresholding pass.
//
// The engine owns no memory; it drives two frame memories:
//   A: holds the image (sample words, pixel << SAMPLE_FRAC) and, when done, the
//      coefficients in the usual pyramid layout (LL of the last level top-left; at each
//      level l the LH band below the LL block, HL to its right, HH diagonal).
//   B: holds the row-filtered intermediate L_r | H_r of the level being processed.
// For each level l = 0 .. LEVELS-1 on the region w = img_w >> l, h = img_h >> l:
//   ROW pass:    every row y of A is streamed sample by sample into a nine-sample window;
//                at every even centre c the filter pair yields L_r at column c/2 and H_r
//                at column w/2 + c/2 of row y in B (filter, then downsample columns by 2).
//   COLUMN pass: every column x of B is streamed the same way; the outputs go to row c/2
//                (low) and row h/2 + c/2 (high) of column x in A (downsample rows by 2).
// The next level works on the LL block only. Boundary samples are supplied by whole-sample
// symmetric extension (x[-n] = x[n], x[len-1+n] = x[len-1-n]), done in the read addresses.
// After the last level a THRESHOLD pass rewrites every coefficient of A through
// coef_threshold and counts the non-zero ones.
//
// The pass order, three levels, recursion on LL, downsampling and symmetric extension
// follow the method. One filter pair shared by both passes, the memory layout and the
// schedule below are this design's choices; the method's parallel row/column execution
// and replicated processing elements are not built.
//
// Timing: one sample is read per clock. A line of length len takes len + 8 clocks (eight
// extension samples); lines follow back to back and each pass ends with DRAIN clocks to
// empty the pipeline. The threshold pass takes img_w*img_h + DRAIN clocks. So a run takes
//   sum_l [ h_l*(w_l+8) + w_l*(h_l+8) + 2*DRAIN ] + img_w*img_h + DRAIN + 2
// clocks from start to done. img_w and img_h must be multiples of 2^LEVELS, no larger than
// W_MAX x H_MAX, and large enough that the region of the last level is at least 4 x 4
// (16 x 16 for three levels).
//
// Interface: start (one-clock pulse while idle) samples img_w, img_h and thr; busy is high
// from the next clock until done, a one-clock pulse; nonzero_cnt is valid with done.
module dwt2d_engine
  import mloa_pkg::*;
#(
  parameter int           W_MAX       = 768,
  parameter int           H_MAX       = 512,
  parameter int           LEVELS      = 3,
  parameter final_adder_e FINAL_ADDER = FA_LC_AKSA,
  parameter int           APPROX_BITS = SAMPLE_W - 1,
  parameter int           K_DROP      = 0,
  parameter int           AW          = $clog2(W_MAX * H_MAX)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [15:0]         img_w,
  input  logic [15:0]         img_h,
  input  logic [SAMPLE_W-1:0] thr,
  output logic                busy,
  output logic                done,
  output logic [31:0]         nonzero_cnt,
  // frame memory A
  output logic [AW-1:0]       a_raddr,
  input  logic [SAMPLE_W-1:0] a_rdata,
  output logic                a_we,
  output logic [AW-1:0]       a_waddr,
  output logic [SAMPLE_W-1:0] a_wdata,
  // frame memory B
  output logic [AW-1:0]       b_raddr,
  input  logic [SAMPLE_W-1:0] b_rdata,
  output logic                b_we,
  output logic [AW-1:0]       b_waddr,
  output logic [SAMPLE_W-1:0] b_wdata
);
  localparam int DRAIN = 6;
  localparam int LVW   = (LEVELS > 1) ? $clog2(LEVELS + 1) : 1;

  typedef enum logic [2:0] {S_IDLE, S_ROW, S_COL, S_THR, S_DRAIN, S_DONE} state_e;
  state_e state, after_drain;

  logic [15:0]         w_img, h_img;
  logic [SAMPLE_W-1:0] thr_q;
  logic [LVW-1:0]      level;
  logic [15:0]         w_l, h_l;       // region of the current level
  logic [15:0]         line;           // row (ROW pass) or column (COL pass) being read
  logic [15:0]         t;              // read counter within a line, 0 .. len+7
  logic [15:0]         len, nlines;
  logic [3:0]          drain_cnt;
  logic [AW-1:0]       thr_idx;
  logic [15:0]         thr_x, thr_y;

  assign len    = (state == S_ROW) ? w_l : h_l;
  assign nlines = (state == S_ROW) ? h_l : w_l;

  function automatic logic [AW-1:0] addr(input logic [15:0] y, input logic [15:0] x);
    return AW'(32'(y) * 32'(W_MAX) + 32'(x));
  endfunction

  // Whole-sample symmetric extension of index n (-4 .. len+3) into 0 .. len-1.
  function automatic logic [15:0] mirror(input int n, input int l);
    int m;
    m = n;
    if (m < 0) m = -m;
    if (m > l - 1) m = 2 * (l - 1) - m;
    if (m < 0) m = -m;
    return 16'(m);
  endfunction

  // ---- read side ---------------------------------------------------------------------
  int          n_issue;
  logic [15:0] pos;
  logic        issuing;
  assign n_issue = int'(t) - 4;
  assign pos     = mirror(n_issue, int'(len));
  assign issuing = (state == S_ROW) || (state == S_COL);

  assign a_raddr = (state == S_THR) ? thr_idx : addr(line, pos);
  assign b_raddr = addr(pos, line);

  // Tags travelling with the pipeline: read -> window shift -> filter -> writes.
  logic        rd_v;        // a sample arrives this clock
  logic        rd_col;      // it belongs to a COL pass
  int          rd_n;
  logic [15:0] rd_line, rd_len;

  logic signed [SAMPLE_W-1:0] win [LP_TAPS];
  logic        f_v;
  logic        f_col;
  logic [15:0] f_c, f_line, f_len;

  logic        o_col;
  logic [15:0] o_c, o_line, o_len;
  logic        f_out_v;
  logic signed [SAMPLE_W-1:0] lo, hi;

  logic        h_pend, h_col;
  logic [15:0] h_c, h_line, h_len;
  logic signed [SAMPLE_W-1:0] h_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_v <= 1'b0; rd_col <= 1'b0; rd_n <= 0; rd_line <= '0; rd_len <= '0;
      f_v <= 1'b0; f_col <= 1'b0; f_c <= '0; f_line <= '0; f_len <= '0;
      o_col <= 1'b0; o_c <= '0; o_line <= '0; o_len <= '0;
      h_pend <= 1'b0; h_col <= 1'b0; h_c <= '0; h_line <= '0; h_len <= '0; h_val <= '0;
      for (int i = 0; i < LP_TAPS; i++) win[i] <= '0;
    end else begin
      rd_v    <= issuing;
      rd_col  <= (state == S_COL);
      rd_n    <= n_issue;
      rd_line <= line;
      rd_len  <= len;
      // Window shift; the newest sample enters at win[8].
      f_v <= 1'b0;
      if (rd_v) begin
        for (int i = 0; i < LP_TAPS - 1; i++) win[i] <= win[i+1];
        win[LP_TAPS-1] <= rd_col ? b_rdata : a_rdata;
        if (rd_n >= 4 && rd_n[0] == 1'b0 && rd_n - 4 < int'(rd_len)) begin
          f_v    <= 1'b1;
          f_c    <= 16'(rd_n - 4);
          f_col  <= rd_col;
          f_line <= rd_line;
          f_len  <= rd_len;
        end
      end
      // Tags of the filter output (filter has one clock of latency).
      o_col  <= f_col;
      o_c    <= f_c;
      o_line <= f_line;
      o_len  <= f_len;
      // High-pass result written one clock after the low-pass one.
      h_pend <= f_out_v;
      h_col  <= o_col;
      h_c    <= o_c;
      h_line <= o_line;
      h_len  <= o_len;
      h_val  <= hi;
    end
  end

  dwt_filter_pair #(
    .FINAL_ADDER(FINAL_ADDER), .APPROX_BITS(APPROX_BITS), .K_DROP(K_DROP)
  ) u_filter (
    .clk(clk), .rst_n(rst_n), .in_valid(f_v), .win(win),
    .out_valid(f_out_v), .lo(lo), .hi(hi)
  );

  // ---- threshold pass pipeline ----------------------------------------------------------
  logic          thr_rd_v;
  logic [AW-1:0] thr_rd_addr;
  logic signed [SAMPLE_W-1:0] thr_out;
  logic          thr_nz;

  coef_threshold u_thr (.c(a_rdata), .thr(thr_q), .out(thr_out), .nonzero(thr_nz));

  // ---- write side ---------------------------------------------------------------------
  always_comb begin
    a_we = 1'b0; a_waddr = '0; a_wdata = '0;
    b_we = 1'b0; b_waddr = '0; b_wdata = '0;
    if (f_out_v) begin
      if (o_col) begin
        a_we = 1'b1; a_waddr = addr(o_c >> 1, o_line); a_wdata = lo;
      end else begin
        b_we = 1'b1; b_waddr = addr(o_line, o_c >> 1); b_wdata = lo;
      end
    end else if (h_pend) begin
      if (h_col) begin
        a_we = 1'b1; a_waddr = addr((h_len >> 1) + (h_c >> 1), h_line); a_wdata = h_val;
      end else begin
        b_we = 1'b1; b_waddr = addr(h_line, (h_len >> 1) + (h_c >> 1)); b_wdata = h_val;
      end
    end else if (thr_rd_v) begin
      a_we = 1'b1; a_waddr = thr_rd_addr; a_wdata = thr_out;
    end
  end

  // ---- control ------------------------------------------------------------------------
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; after_drain <= S_IDLE;
      w_img <= '0; h_img <= '0; thr_q <= '0;
      level <= '0; w_l <= '0; h_l <= '0; line <= '0; t <= '0; drain_cnt <= '0;
      thr_idx <= '0; thr_x <= '0; thr_y <= '0; thr_rd_v <= 1'b0; thr_rd_addr <= '0;
      nonzero_cnt <= '0; done <= 1'b0;
    end else begin
      done     <= 1'b0;
      thr_rd_v <= 1'b0;
      if (thr_rd_v && thr_nz) nonzero_cnt <= nonzero_cnt + 32'd1;
      case (state)
        S_IDLE: if (start) begin
          w_img <= img_w; h_img <= img_h; thr_q <= thr;
          level <= '0; w_l <= img_w; h_l <= img_h;
          line <= '0; t <= '0; nonzero_cnt <= '0;
          state <= S_ROW;
        end
        S_ROW, S_COL: begin
          if (t == len + 16'd7) begin
            t <= '0;
            if (line == nlines - 16'd1) begin
              line <= '0;
              drain_cnt <= '0;
              state <= S_DRAIN;
              if (state == S_ROW) after_drain <= S_COL;
              else if (int'(level) == LEVELS - 1) after_drain <= S_THR;
              else after_drain <= S_ROW;
            end else begin
              line <= line + 16'd1;
            end
          end else begin
            t <= t + 16'd1;
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 4'd1;
          if (int'(drain_cnt) == DRAIN - 1) begin
            if (after_drain == S_ROW) begin
              level <= level + 1'b1;
              w_l <= w_l >> 1;
              h_l <= h_l >> 1;
            end
            if (after_drain == S_THR) begin
              thr_idx <= '0; thr_x <= '0; thr_y <= '0;
            end
            state <= after_drain;
          end
        end
        S_THR: begin
          thr_rd_v    <= 1'b1;
          thr_rd_addr <= thr_idx;
          if (thr_x == w_img - 16'd1) begin
            thr_x <= '0;
            if (thr_y == h_img - 16'd1) begin
              drain_cnt <= '0;
              after_drain <= S_DONE;
              state <= S_DRAIN;
            end else begin
              thr_y   <= thr_y + 16'd1;
              thr_idx <= addr(thr_y + 16'd1, 16'd0);
            end
          end else begin
            thr_x   <= thr_x + 16'd1;
            thr_idx <= thr_idx + AW'(1);
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Writes of the filter outputs never collide: a line yields one output pair every two
  // samples, and the threshold pass runs alone.
  a_no_lo_hi_collision : assert property (@(posedge clk) disable iff (!rst_n)
    !(f_out_v && h_pend));
  a_no_thr_collision : assert property (@(posedge clk) disable iff (!rst_n)
    !(thr_rd_v && (f_out_v || h_pend)));
endmodule
