// mloa_dwt_top -- approximate-multiplier 9/7 DWT compression front end with reconstruction.
//
// An 8-bit grayscale image of up to W_MAX x H_MAX pixels is loaded through the host port,
// transformed by a three-level separable 9/7 DWT whose every filter tap is a multiply in
// a leader-column (MLOA-LC) multiplier with the approximate LC-AKSA final adder, and its
// coefficients are hard-thresholded (|C| < thr -> 0). The host then reads the thresholded
// coefficients back and gets the number of non-zero ones, so that the compression ratio is
// img_w*img_h / nonzero_cnt. A second command runs the inverse 9/7 DWT, built from the same
// multipliers, on the thresholded coefficients in place; the host then reads the
// reconstructed image, from which the quality of the compression (PSNR) can be measured.
//
// Blocks: frame memory A (image, then coefficients, then reconstruction), frame memory B
// (intermediate of either transform), dwt2d_engine (forward controller, filter pair with
// sixteen multipliers, threshold unit), idwt2d_engine (inverse controller, synthesis filter
// with nine multipliers).
//
// Host interface (all synchronous to clk):
//   load:  while busy is low, host_we writes pixel host_pixel at (host_x, host_y); it is
//          stored as the sample word host_pixel << SAMPLE_FRAC.
//   run:   start (one clock, while busy is low) with img_w, img_h, thr; busy stays high
//          until done pulses; nonzero_cnt and total_cnt are then valid.
//   inverse: start_inv (one clock, while busy is low) with img_w, img_h; busy stays high
//          until done pulses; memory A then holds reconstructed sample words.
//   read:  while busy is low, host_rdata is the word at (host_rx, host_ry) presented one
//          clock earlier: a coefficient (pyramid layout described in dwt2d_engine) after
//          start, a reconstructed sample after start_inv. Both are signed with SAMPLE_FRAC
//          fractional bits; a grey level is (word + 8) >> 4 clipped to 0..255.
// Memory ports belong to the running engine while busy and to the host otherwise. If
// start and start_inv arrive together, start wins.
//
// The forward path and thresholding follow the method; reconstruction in hardware, the
// host interface and the memory organisation are this design's choices.
module mloa_dwt_top
  import mloa_pkg::*;
#(
  parameter int           W_MAX       = 768,
  parameter int           H_MAX       = 512,
  parameter int           LEVELS      = 3,
  parameter final_adder_e FINAL_ADDER = FA_LC_AKSA,
  parameter int           APPROX_BITS = SAMPLE_W - 1,
  parameter int           K_DROP      = 0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host load port
  input  logic                       host_we,
  input  logic [15:0]                host_x,
  input  logic [15:0]                host_y,
  input  logic [7:0]                 host_pixel,
  // host read port
  input  logic [15:0]                host_rx,
  input  logic [15:0]                host_ry,
  output logic signed [SAMPLE_W-1:0] host_rdata,
  // control
  input  logic                       start,
  input  logic                       start_inv,
  input  logic [15:0]                img_w,
  input  logic [15:0]                img_h,
  input  logic [SAMPLE_W-1:0]        thr,
  output logic                       busy,
  output logic                       done,
  output logic [31:0]                nonzero_cnt,
  output logic [31:0]                total_cnt
);
  localparam int DEPTH = W_MAX * H_MAX;
  localparam int AW    = $clog2(DEPTH);

  logic [AW-1:0]       e_a_raddr, e_a_waddr, e_b_raddr, e_b_waddr;
  logic                e_a_we, e_b_we;
  logic [SAMPLE_W-1:0] e_a_wdata, e_b_wdata;
  logic [AW-1:0]       i_a_raddr, i_a_waddr, i_b_raddr, i_b_waddr;
  logic                i_a_we, i_b_we;
  logic [SAMPLE_W-1:0] i_a_wdata, i_b_wdata;
  logic                f_busy, f_done, i_busy, i_done;
  logic                go_fwd, go_inv;
  logic [AW-1:0]       b_raddr, b_waddr;
  logic                b_we;
  logic [SAMPLE_W-1:0] b_wdata;

  assign busy   = f_busy | i_busy;
  assign done   = f_done | i_done;
  assign go_fwd = start && !busy;
  assign go_inv = start_inv && !start && !busy;
  logic [SAMPLE_W-1:0] a_rdata, b_rdata;

  logic [AW-1:0]       a_raddr, a_waddr;
  logic                a_we;
  logic [SAMPLE_W-1:0] a_wdata;

  function automatic logic [AW-1:0] host_addr(input logic [15:0] y, input logic [15:0] x);
    return AW'(32'(y) * 32'(W_MAX) + 32'(x));
  endfunction

  always_comb begin
    if (i_busy) begin
      a_raddr = i_a_raddr;
      a_waddr = i_a_waddr;
      a_we    = i_a_we;
      a_wdata = i_a_wdata;
    end else if (f_busy) begin
      a_raddr = e_a_raddr;
      a_waddr = e_a_waddr;
      a_we    = e_a_we;
      a_wdata = e_a_wdata;
    end else begin
      a_raddr = host_addr(host_ry, host_rx);
      a_waddr = host_addr(host_y, host_x);
      a_we    = host_we;
      a_wdata = SAMPLE_W'({host_pixel, {SAMPLE_FRAC{1'b0}}});
    end
  end

  frame_ram #(.DEPTH(DEPTH), .DW(SAMPLE_W)) u_mem_a (
    .clk(clk), .we(a_we), .waddr(a_waddr), .wdata(a_wdata), .raddr(a_raddr), .rdata(a_rdata)
  );

  assign b_raddr = i_busy ? i_b_raddr : e_b_raddr;
  assign b_waddr = i_busy ? i_b_waddr : e_b_waddr;
  assign b_we    = i_busy ? i_b_we    : e_b_we;
  assign b_wdata = i_busy ? i_b_wdata : e_b_wdata;

  frame_ram #(.DEPTH(DEPTH), .DW(SAMPLE_W)) u_mem_b (
    .clk(clk), .we(b_we), .waddr(b_waddr), .wdata(b_wdata), .raddr(b_raddr), .rdata(b_rdata)
  );

  dwt2d_engine #(
    .W_MAX(W_MAX), .H_MAX(H_MAX), .LEVELS(LEVELS), .FINAL_ADDER(FINAL_ADDER),
    .APPROX_BITS(APPROX_BITS), .K_DROP(K_DROP), .AW(AW)
  ) u_engine (
    .clk(clk), .rst_n(rst_n), .start(go_fwd), .img_w(img_w), .img_h(img_h),
    .thr(thr), .busy(f_busy), .done(f_done), .nonzero_cnt(nonzero_cnt),
    .a_raddr(e_a_raddr), .a_rdata(a_rdata), .a_we(e_a_we), .a_waddr(e_a_waddr),
    .a_wdata(e_a_wdata),
    .b_raddr(e_b_raddr), .b_rdata(b_rdata), .b_we(e_b_we), .b_waddr(e_b_waddr),
    .b_wdata(e_b_wdata)
  );

  idwt2d_engine #(
    .W_MAX(W_MAX), .H_MAX(H_MAX), .LEVELS(LEVELS), .FINAL_ADDER(FINAL_ADDER),
    .APPROX_BITS(APPROX_BITS), .K_DROP(K_DROP), .AW(AW)
  ) u_inverse (
    .clk(clk), .rst_n(rst_n), .start(go_inv), .img_w(img_w), .img_h(img_h),
    .busy(i_busy), .done(i_done),
    .a_raddr(i_a_raddr), .a_rdata(a_rdata), .a_we(i_a_we), .a_waddr(i_a_waddr),
    .a_wdata(i_a_wdata),
    .b_raddr(i_b_raddr), .b_rdata(b_rdata), .b_we(i_b_we), .b_waddr(i_b_waddr),
    .b_wdata(i_b_wdata)
  );

  assign host_rdata = a_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     total_cnt <= '0;
    else if (go_fwd) total_cnt <= 32'(img_w) * 32'(img_h);
  end
endmodule
