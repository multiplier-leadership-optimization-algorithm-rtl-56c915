// idwt2d_engine -- three-level separable inverse 9/7 DWT controller (reconstruction).
//
// It undoes dwt2d_engine on the same two frame memories: A holds the (thresholded)
// coefficients in pyramid layout and, when done, the reconstructed image as sample words
// (grey level << SAMPLE_FRAC, not clipped); B holds the column-reconstructed intermediate.
// Levels are processed from the coarsest (l = LEVELS-1) to the finest (l = 0), each on the
// region w x h = img >> l:
//   COLUMN pass: for every column x of A, the low rows 0 .. h/2-1 and high rows
//                h/2 .. h-1 are read interleaved (u[2j] = low row j, u[2j+1] = high row j)
//                through a nine-sample window; every position m yields one sample, written
//                to row m, column x of B.
//   ROW pass:    every row y of B is read the same way across its columns and written to
//                row y of A.
// The interleaved sequence is extended with whole-sample symmetry, which matches the
// forward transform's extension, so the transform pair reconstructs exactly up to rounding.
//
// Timing: one sample in and one out per clock; a line of length len takes len + 8 clocks,
// lines run back to back and every pass ends with DRAIN clocks, so a run takes
//   sum_l [ w_l*(h_l+8) + h_l*(w_l+8) + 2*DRAIN ] + 2
// clocks from start to done. Interface and size rules as for dwt2d_engine (no threshold).
// The reconstruction follows the method; pass order, memory use and control are this
// design's choices.
module idwt2d_engine
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
  output logic                busy,
  output logic                done,
  output logic [AW-1:0]       a_raddr,
  input  logic [SAMPLE_W-1:0] a_rdata,
  output logic                a_we,
  output logic [AW-1:0]       a_waddr,
  output logic [SAMPLE_W-1:0] a_wdata,
  output logic [AW-1:0]       b_raddr,
  input  logic [SAMPLE_W-1:0] b_rdata,
  output logic                b_we,
  output logic [AW-1:0]       b_waddr,
  output logic [SAMPLE_W-1:0] b_wdata
);
  localparam int DRAIN = 6;
  localparam int LVW   = (LEVELS > 1) ? $clog2(LEVELS + 1) : 1;

  typedef enum logic [2:0] {S_IDLE, S_COL, S_ROW, S_DRAIN, S_DONE} state_e;
  state_e state, after_drain;

  logic [LVW-1:0] level;
  logic [15:0]    w_l, h_l, line, t, len, nlines;
  logic [3:0]     drain_cnt;

  assign len    = (state == S_ROW) ? w_l : h_l;
  assign nlines = (state == S_ROW) ? h_l : w_l;

  function automatic logic [AW-1:0] addr(input logic [15:0] y, input logic [15:0] x);
    return AW'(32'(y) * 32'(W_MAX) + 32'(x));
  endfunction

  function automatic logic [15:0] mirror(input int n, input int l);
    int m;
    m = n;
    if (m < 0) m = -m;
    if (m > l - 1) m = 2 * (l - 1) - m;
    if (m < 0) m = -m;
    return 16'(m);
  endfunction

  // Read side: interleaved position p -> position inside the band layout.
  int          n_issue;
  logic [15:0] p, src;
  assign n_issue = int'(t) - 4;
  assign p       = mirror(n_issue, int'(len));
  assign src     = p[0] ? ((len >> 1) + (p >> 1)) : (p >> 1);

  assign a_raddr = addr(src, line);    // COL pass reads A
  assign b_raddr = addr(line, src);    // ROW pass reads B

  logic        rd_v, rd_row;
  int          rd_n;
  logic [15:0] rd_line, rd_len;
  logic signed [SAMPLE_W-1:0] win [SY_TAPS];
  logic        f_v, f_row, f_odd;
  logic [15:0] f_m, f_line;
  logic        o_row;
  logic [15:0] o_m, o_line;
  logic        out_v;
  logic signed [SAMPLE_W-1:0] y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_v <= 1'b0; rd_row <= 1'b0; rd_n <= 0; rd_line <= '0; rd_len <= '0;
      f_v <= 1'b0; f_row <= 1'b0; f_odd <= 1'b0; f_m <= '0; f_line <= '0;
      o_row <= 1'b0; o_m <= '0; o_line <= '0;
      for (int i = 0; i < SY_TAPS; i++) win[i] <= '0;
    end else begin
      rd_v    <= (state == S_COL) || (state == S_ROW);
      rd_row  <= (state == S_ROW);
      rd_n    <= n_issue;
      rd_line <= line;
      rd_len  <= len;
      f_v     <= 1'b0;
      if (rd_v) begin
        for (int i = 0; i < SY_TAPS - 1; i++) win[i] <= win[i+1];
        win[SY_TAPS-1] <= rd_row ? b_rdata : a_rdata;
        if (rd_n >= 4 && rd_n - 4 < int'(rd_len)) begin
          f_v    <= 1'b1;
          f_m    <= 16'(rd_n - 4);
          f_odd  <= rd_n[0];
          f_row  <= rd_row;
          f_line <= rd_line;
        end
      end
      o_row  <= f_row;
      o_m    <= f_m;
      o_line <= f_line;
    end
  end

  idwt_filter #(
    .FINAL_ADDER(FINAL_ADDER), .APPROX_BITS(APPROX_BITS), .K_DROP(K_DROP)
  ) u_filter (
    .clk(clk), .rst_n(rst_n), .in_valid(f_v), .odd(f_odd), .win(win),
    .out_valid(out_v), .y(y)
  );

  always_comb begin
    a_we = 1'b0; a_waddr = '0; a_wdata = '0;
    b_we = 1'b0; b_waddr = '0; b_wdata = '0;
    if (out_v) begin
      if (o_row) begin
        a_we = 1'b1; a_waddr = addr(o_line, o_m); a_wdata = y;
      end else begin
        b_we = 1'b1; b_waddr = addr(o_m, o_line); b_wdata = y;
      end
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; after_drain <= S_IDLE;
      level <= '0; w_l <= '0; h_l <= '0; line <= '0; t <= '0; drain_cnt <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          level <= LVW'(LEVELS - 1);
          w_l   <= img_w >> (LEVELS - 1);
          h_l   <= img_h >> (LEVELS - 1);
          line  <= '0; t <= '0;
          state <= S_COL;
        end
        S_COL, S_ROW: begin
          if (t == len + 16'd7) begin
            t <= '0;
            if (line == nlines - 16'd1) begin
              line <= '0;
              drain_cnt <= '0;
              state <= S_DRAIN;
              if (state == S_COL) after_drain <= S_ROW;
              else if (level == '0) after_drain <= S_DONE;
              else after_drain <= S_COL;
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
            if (after_drain == S_COL) begin
              level <= level - 1'b1;
              w_l <= w_l << 1;
              h_l <= h_l << 1;
            end
            state <= after_drain;
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
endmodule
