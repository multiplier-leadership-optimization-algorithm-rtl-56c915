// tb_mloa_dwt_full -- full-size run of the approximate DWT compression front end.
//
// The top keeps all its default parameters (frames up to 768 x 512). Three runs use the
// frame sizes of the benchmark images the method was evaluated on: 768 x 512 (Castle),
// 512 x 512 (Baboon, Boat) and 256 x 256 (Cameraman, Woman); synthetic images stand in
// for the photographs. Each run loads a synthetic 8-bit image
// through the host port, starts the transform, waits for done and reads every coefficient
// back through the host read port. Checks per run:
//   * start-to-done clock count equals the engine's formula;
//   * total_cnt = w*h, and nonzero_cnt equals the number of non-zero coefficients read;
//   * every read coefficient lies within TOL of the exact integer model (the design uses
//     approximate LC-AKSA multipliers, so small departures are expected);
//   * every zeroed coefficient is one the exact model also places near or under the
//     threshold, and every kept one is at least the threshold in magnitude.
// Each run then starts the inverse transform and reads the reconstruction back:
//   * start-to-done clock count equals the inverse engine's formula;
//   * every reconstructed sample lies within TOL of the exact inverse model applied to the
//     coefficients read from the design;
//   * the PSNR of the reconstructed 8-bit image against the original is at least PSNR_MIN
//     (30 dB, the quality floor the compression method is tuned to meet).
// Mechanisms counted over all runs, each of which must occur: symmetric-extension reads at
// line starts and ends, level changes (recursion on LL), row and column passes, coefficients
// zeroed and kept by the threshold, coefficients changed by the approximate multipliers,
// run-time frame sizes below the maximum, and inverse passes with extension reads.
module tb_mloa_dwt_full;
  import mloa_pkg::*;
  import tb_dwt_ref_pkg::*;

  localparam int WM = 768, HM = 512, DRAIN = 6;
  // Engine state encodings (order of its state enum).
  localparam int ST_ROW = 1, ST_COL = 2, ST_DRAIN = 4;
  localparam int TOL = 48;   // 3 grey levels in the Q.4 coefficient format
  localparam real PSNR_MIN = 30.0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               host_we, start, start_inv, busy, done;
  logic [15:0]        host_x, host_y, host_rx, host_ry, img_w, img_h, thr;
  logic [7:0]         host_pixel;
  logic signed [15:0] host_rdata;
  logic [31:0]        nonzero_cnt, total_cnt;

  int checks = 0, failures = 0;
  int n_ext_lo = 0, n_ext_hi = 0, n_level = 0, n_row = 0, n_col = 0;
  int n_zeroed = 0, n_kept = 0, n_approx = 0, n_small = 0, max_diff = 0;
  int n_inv_ext = 0, n_inv_pass = 0, max_rdiff = 0;

  mloa_dwt_top dut (
    .clk(clk), .rst_n(rst_n), .host_we(host_we), .host_x(host_x), .host_y(host_y),
    .host_pixel(host_pixel), .host_rx(host_rx), .host_ry(host_ry), .host_rdata(host_rdata),
    .start(start), .start_inv(start_inv), .img_w(img_w), .img_h(img_h), .thr(thr), .busy(busy), .done(done),
    .nonzero_cnt(nonzero_cnt), .total_cnt(total_cnt)
  );

  // Mechanism monitors.
  always @(posedge clk) begin
    if (rst_n && (int'(dut.u_engine.state) == ST_ROW
                  || int'(dut.u_engine.state) == ST_COL)) begin
      if (dut.u_engine.n_issue < 0) n_ext_lo++;
      if (dut.u_engine.n_issue >= int'(dut.u_engine.len)) n_ext_hi++;
      if (dut.u_engine.t == 0 && dut.u_engine.line == 0) begin
        if (int'(dut.u_engine.state) == ST_ROW) n_row++;
        else n_col++;
      end
    end
    if (rst_n && int'(dut.u_engine.state) == ST_DRAIN
        && int'(dut.u_engine.after_drain) == ST_ROW
        && int'(dut.u_engine.drain_cnt) == DRAIN - 1)
      n_level++;
    // inverse engine: states 1 (column) and 2 (row)
    if (rst_n && (int'(dut.u_inverse.state) == 1 || int'(dut.u_inverse.state) == 2)) begin
      if (dut.u_inverse.n_issue < 0 || dut.u_inverse.n_issue >= int'(dut.u_inverse.len))
        n_inv_ext++;
      if (dut.u_inverse.t == 0 && dut.u_inverse.line == 0) n_inv_pass++;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  task automatic run(input int w, input int h, input int th);
    int ref_c[], hw_c[];
    int nz_ref, cyc, expect_cyc, wl, hl, got, d, nz_read, g;
    real se, psnr;
    ref_c = new[WM * HM];
    hw_c = new[WM * HM];
    for (int i = 0; i < WM * HM; i++) hw_c[i] = 0;
    if (w < WM || h < HM) n_small++;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        @(negedge clk);
        host_we = 1'b1; host_x = 16'(x); host_y = 16'(y);
        host_pixel = 8'(pixel(x, y, w, h));
        ref_c[y*WM + x] = pixel(x, y, w, h) * 16;
      end
    @(negedge clk);
    host_we = 1'b0;
    nz_ref = dwt3(ref_c, WM, w, h, 0);   // exact coefficients, no threshold
    img_w = 16'(w); img_h = 16'(h); thr = 16'(th);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc > 5000000) break;
    end
    wl = w; hl = h; expect_cyc = 0;
    for (int lv = 0; lv < 3; lv++) begin
      expect_cyc += hl * (wl + 8) + wl * (hl + 8) + 2 * DRAIN;
      wl /= 2; hl /= 2;
    end
    expect_cyc += w * h + DRAIN + 2;
    chk(cyc == expect_cyc, $sformatf("%0dx%0d took %0d clocks, expected %0d", w, h, cyc, expect_cyc));
    chk(int'(total_cnt) == w * h, "total_cnt");
    @(negedge clk);
    nz_read = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        host_rx = 16'(x); host_ry = 16'(y);
        @(negedge clk);
        got = int'(host_rdata);
        hw_c[y*WM + x] = got;
        if (got != 0) nz_read++;
        if (got == 0) begin
          n_zeroed += (ref_c[y*WM + x] != 0) ? 1 : 0;
          d = ref_c[y*WM + x] < 0 ? -ref_c[y*WM + x] : ref_c[y*WM + x];
          chk(d < th + TOL, $sformatf("(%0d,%0d) zeroed but exact is %0d", x, y, ref_c[y*WM + x]));
        end else begin
          n_kept++;
          chk((got < 0 ? -got : got) >= th, $sformatf("(%0d,%0d) kept %0d under thr", x, y, got));
          d = got - ref_c[y*WM + x];
          if (d < 0) d = -d;
          if (d != 0) n_approx++;
          if (d > max_diff) max_diff = d;
          chk(d <= TOL, $sformatf("(%0d,%0d) = %0d, exact %0d", x, y, got, ref_c[y*WM + x]));
        end
      end
    chk(int'(nonzero_cnt) == nz_read, $sformatf("nonzero_cnt %0d, read %0d", nonzero_cnt, nz_read));
    $display("run %0dx%0d thr=%0d: %0d clocks, %0d of %0d kept, CR=%0.2f", w, h, th, cyc,
             nonzero_cnt, total_cnt, real'(total_cnt) / real'(nonzero_cnt));
    // ---- reconstruction ----
    idwt3(hw_c, WM, w, h);
    @(negedge clk);
    start_inv = 1'b1;
    @(negedge clk);
    start_inv = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc > 5000000) break;
    end
    wl = w; hl = h; expect_cyc = 2;
    for (int lv = 0; lv < 3; lv++) begin
      expect_cyc += wl * (hl + 8) + hl * (wl + 8) + 2 * DRAIN;
      wl /= 2; hl /= 2;
    end
    chk(cyc == expect_cyc, $sformatf("inverse %0dx%0d took %0d clocks, expected %0d", w, h, cyc,
                                     expect_cyc));
    @(negedge clk);
    se = 0.0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        host_rx = 16'(x); host_ry = 16'(y);
        @(negedge clk);
        got = int'(host_rdata);
        d = got - hw_c[y*WM + x];
        if (d < 0) d = -d;
        if (d > max_rdiff) max_rdiff = d;
        chk(d <= TOL, $sformatf("reconstruction (%0d,%0d) = %0d, exact inverse %0d", x, y, got,
                                hw_c[y*WM + x]));
        g = (got + 8) >>> 4;
        if (g < 0) g = 0;
        if (g > 255) g = 255;
        se += real'((g - pixel(x, y, w, h)) * (g - pixel(x, y, w, h)));
      end
    psnr = (se == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 * real'(w * h) / se);
    chk(psnr >= PSNR_MIN, $sformatf("%0dx%0d PSNR %0.2f dB below %0.1f", w, h, psnr, PSNR_MIN));
    $display("inverse %0dx%0d: %0d clocks, PSNR %0.2f dB", w, h, cyc, psnr);
  endtask

  initial begin
    #500ms;
    $display("watchdog expired");
    failures++;
    $display("inverse: passes %0d, extension reads %0d, max |diff| to exact inverse %0d",
             n_inv_pass, n_inv_ext, max_rdiff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_we = 1'b0; host_x = '0; host_y = '0; host_pixel = '0; host_rx = '0; host_ry = '0;
    start = 1'b0; start_inv = 1'b0; img_w = '0; img_h = '0; thr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(768, 512, 64);
    run(512, 512, 64);
    run(256, 256, 64);
    chk(n_ext_lo > 0, "extension before line start");
    chk(n_ext_hi > 0, "extension after line end");
    chk(n_level == 6, $sformatf("level changes %0d, expected 6", n_level));
    chk(n_row == 9 && n_col == 9, $sformatf("row/column passes %0d/%0d", n_row, n_col));
    chk(n_zeroed > 0, "threshold zeroed coefficients");
    chk(n_kept > 0, "threshold kept coefficients");
    chk(n_approx > 0, "approximate multipliers changed coefficients");
    chk(n_small > 0, "frame smaller than maximum");
    chk(n_inv_pass == 18, $sformatf("inverse passes %0d, expected 18", n_inv_pass));
    chk(n_inv_ext > 0, "inverse extension reads");
    $display("ext lo/hi %0d/%0d, level changes %0d, passes %0d/%0d, zeroed %0d, kept %0d, approx-changed %0d, max |diff| %0d",
             n_ext_lo, n_ext_hi, n_level, n_row, n_col, n_zeroed, n_kept, n_approx, max_diff);
    $display("inverse: passes %0d, extension reads %0d, max |diff| to exact inverse %0d",
             n_inv_pass, n_inv_ext, max_rdiff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
