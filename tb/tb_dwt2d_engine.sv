// tb_dwt2d_engine -- bit-exact check of the 2-D DWT controller.
//
// The engine is built with exact Kogge-Stone final adders, so its coefficients must equal,
// bit for bit, those of the integer model below: 9/7 taps in Q1.15, products summed exactly,
// rounded (+2^14, arithmetic shift by 15), saturated to 16 bits, whole-sample symmetric
// extension, three levels on the LL block, then hard thresholding. Two runs with different
// image sizes and thresholds check the run-time size handling; every coefficient, the
// non-zero count and the start-to-done clock count (formula in dwt2d_engine) are compared.
module tb_dwt2d_engine;
  import mloa_pkg::*;

  localparam int WM = 48, HM = 32, AW = $clog2(WM * HM), DRAIN = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                start, busy, done;
  logic [15:0]         img_w, img_h;
  logic [15:0]         thr;
  logic [31:0]         nonzero_cnt;
  logic [AW-1:0]       a_raddr, a_waddr, b_raddr, b_waddr, ta_waddr;
  logic [15:0]         a_rdata, b_rdata, a_wdata, b_wdata, ta_wdata;
  logic                a_we, b_we, ta_we, tb_load;

  int checks = 0, failures = 0;

  dwt2d_engine #(.W_MAX(WM), .H_MAX(HM), .FINAL_ADDER(FA_KOGGE_STONE)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .img_w(img_w), .img_h(img_h), .thr(thr),
    .busy(busy), .done(done), .nonzero_cnt(nonzero_cnt),
    .a_raddr(a_raddr), .a_rdata(a_rdata), .a_we(a_we), .a_waddr(a_waddr), .a_wdata(a_wdata),
    .b_raddr(b_raddr), .b_rdata(b_rdata), .b_we(b_we), .b_waddr(b_waddr), .b_wdata(b_wdata)
  );

  // The testbench loads memory A through the same write port while the engine is idle.
  frame_ram #(.DEPTH(WM * HM), .DW(16)) u_a (
    .clk(clk), .we(tb_load ? ta_we : a_we), .waddr(tb_load ? ta_waddr : a_waddr),
    .wdata(tb_load ? ta_wdata : a_wdata), .raddr(a_raddr), .rdata(a_rdata)
  );
  frame_ram #(.DEPTH(WM * HM), .DW(16)) u_b (
    .clk(clk), .we(b_we), .waddr(b_waddr), .wdata(b_wdata), .raddr(b_raddr), .rdata(b_rdata)
  );

  // ---- reference model ---------------------------------------------------------------
  int ref_a [HM][WM];
  int ref_b [HM][WM];
  int lpc [9];
  int hpc [7];

  function automatic int mir(input int n, input int l);
    int m;
    m = n;
    if (m < 0) m = -m;
    if (m > l - 1) m = 2 * (l - 1) - m;
    if (m < 0) m = -m;
    return m;
  endfunction

  function automatic int rsat(input longint acc);
    longint r;
    r = (acc + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  task automatic ref_dwt(input int w, input int h, input int th, output int nz);
    int wl, hl;
    longint al, ah;
    wl = w; hl = h;
    for (int lv = 0; lv < 3; lv++) begin
      for (int y = 0; y < hl; y++)
        for (int c = 0; c < wl; c += 2) begin
          al = 0; ah = 0;
          for (int t = 0; t < 9; t++) al += longint'(lpc[t]) * ref_a[y][mir(c + t - 4, wl)];
          for (int t = 0; t < 7; t++) ah += longint'(hpc[t]) * ref_a[y][mir(c + t - 2, wl)];
          ref_b[y][c/2]        = rsat(al);
          ref_b[y][wl/2 + c/2] = rsat(ah);
        end
      for (int x = 0; x < wl; x++)
        for (int c = 0; c < hl; c += 2) begin
          al = 0; ah = 0;
          for (int t = 0; t < 9; t++) al += longint'(lpc[t]) * ref_b[mir(c + t - 4, hl)][x];
          for (int t = 0; t < 7; t++) ah += longint'(hpc[t]) * ref_b[mir(c + t - 2, hl)][x];
          ref_a[c/2][x]        = rsat(al);
          ref_a[hl/2 + c/2][x] = rsat(ah);
        end
      wl /= 2; hl /= 2;
    end
    nz = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        if ((ref_a[y][x] < 0 ? -ref_a[y][x] : ref_a[y][x]) < th) ref_a[y][x] = 0;
        if (ref_a[y][x] != 0) nz++;
      end
  endtask

  // ---- one run -----------------------------------------------------------------------
  int ext_reads;
  always @(posedge clk)
    if (rst_n && (dut.state == dut.S_ROW || dut.state == dut.S_COL)
        && (dut.n_issue < 0 || dut.n_issue >= int'(dut.len)))
      ext_reads++;

  task automatic run(input int w, input int h, input int th);
    int nz, cyc, expect_cyc, wl, hl, v, bad;
    // image
    for (int y = 0; y < HM; y++) for (int x = 0; x < WM; x++) ref_a[y][x] = 0;
    tb_load = 1'b1;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        v = ((x * 7 + y * 13) % 200) + int'($urandom_range(0, 55));
        ref_a[y][x] = v * 16;
        @(negedge clk);
        ta_we = 1'b1; ta_waddr = AW'(y * WM + x); ta_wdata = 16'(v * 16);
      end
    @(negedge clk);
    ta_we = 1'b0; tb_load = 1'b0;
    ref_dwt(w, h, th, nz);
    // start
    img_w = 16'(w); img_h = 16'(h); thr = 16'(th);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    wl = w; hl = h; expect_cyc = 0;
    for (int lv = 0; lv < 3; lv++) begin
      expect_cyc += hl * (wl + 8) + wl * (hl + 8) + 2 * DRAIN;
      wl /= 2; hl /= 2;
    end
    expect_cyc += w * h + DRAIN + 2;
    checks++;
    if (cyc != expect_cyc) begin
      failures++;
      $display("FAIL %0dx%0d: %0d clocks, expected %0d", w, h, cyc, expect_cyc);
    end
    checks++;
    if (int'(nonzero_cnt) != nz) begin
      failures++;
      $display("FAIL %0dx%0d: nonzero %0d, expected %0d", w, h, nonzero_cnt, nz);
    end
    bad = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        checks++;
        if (int'($signed(u_a.mem[y * WM + x])) != ref_a[y][x]) begin
          failures++; bad++;
          if (bad < 8) $display("FAIL %0dx%0d coef (%0d,%0d) = %0d, expected %0d", w, h, x, y,
                                $signed(u_a.mem[y * WM + x]), ref_a[y][x]);
        end
      end
    $display("run %0dx%0d thr=%0d: %0d clocks, %0d non-zero of %0d", w, h, th, cyc, nz, w * h);
  endtask

  initial begin
    #20ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 9; t++) lpc[t] = LP_TAP[t].neg ? -int'(LP_TAP[t].mag) : int'(LP_TAP[t].mag);
    for (int t = 0; t < 7; t++) hpc[t] = HP_TAP[t].neg ? -int'(HP_TAP[t].mag) : int'(HP_TAP[t].mag);
    start = 1'b0; img_w = '0; img_h = '0; thr = '0;
    ta_we = 1'b0; ta_waddr = '0; ta_wdata = '0; tb_load = 1'b0;
    ext_reads = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(48, 32, 40);
    run(32, 16, 0);
    checks++;
    if (ext_reads == 0) begin
      failures++;
      $display("FAIL no symmetric-extension reads seen");
    end
    $display("extension reads: %0d", ext_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
