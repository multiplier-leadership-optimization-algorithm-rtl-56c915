// tb_idwt2d_engine -- bit-exact check of the 2-D inverse DWT controller.
//
// Memory A is loaded with random coefficients in pyramid layout. The engine is built with
// exact Kogge-Stone final adders, so after the run memory A must equal, bit for bit, the
// result of the integer model idwt3 (interleave low/high halves, parity-selected nine-tap
// synthesis kernel, +2^14 >>> 15 rounding, 16-bit saturation, whole-sample symmetric
// extension, coarsest level first, columns then rows). A second run transforms an image
// with the forward model first and checks that the reconstruction is within 8 LSB (half
// a grey level; rounding in six filter passes gives about 4) of the original. The
// start-to-done clock count is compared with the
// formula in idwt2d_engine, and reads past both ends of a line are counted.
module tb_idwt2d_engine;
  import mloa_pkg::*;
  import tb_dwt_ref_pkg::*;

  localparam int WM = 48, HM = 32, AW = $clog2(WM * HM), DRAIN = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                start, busy, done;
  logic [15:0]         img_w, img_h;
  logic [AW-1:0]       a_raddr, a_waddr, b_raddr, b_waddr, ta_waddr;
  logic [15:0]         a_rdata, b_rdata, a_wdata, b_wdata, ta_wdata;
  logic                a_we, b_we, ta_we, tb_load;

  int checks = 0, failures = 0;

  idwt2d_engine #(.W_MAX(WM), .H_MAX(HM), .FINAL_ADDER(FA_KOGGE_STONE)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .img_w(img_w), .img_h(img_h),
    .busy(busy), .done(done),
    .a_raddr(a_raddr), .a_rdata(a_rdata), .a_we(a_we), .a_waddr(a_waddr), .a_wdata(a_wdata),
    .b_raddr(b_raddr), .b_rdata(b_rdata), .b_we(b_we), .b_waddr(b_waddr), .b_wdata(b_wdata)
  );

  frame_ram #(.DEPTH(WM * HM), .DW(16)) u_a (
    .clk(clk), .we(tb_load ? ta_we : a_we), .waddr(tb_load ? ta_waddr : a_waddr),
    .wdata(tb_load ? ta_wdata : a_wdata), .raddr(a_raddr), .rdata(a_rdata)
  );
  frame_ram #(.DEPTH(WM * HM), .DW(16)) u_b (
    .clk(clk), .we(b_we), .waddr(b_waddr), .wdata(b_wdata), .raddr(b_raddr), .rdata(b_rdata)
  );

  int ext_reads;
  always @(posedge clk)
    if (rst_n && busy && (int'(dut.state) == 1 || int'(dut.state) == 2)
        && (dut.n_issue < 0 || dut.n_issue >= int'(dut.len)))
      ext_reads++;

  // mode 0: random coefficients, bit-exact; mode 1: forward-transformed image, round trip
  task automatic run(input int w, input int h, input int mode);
    int a[], orig[];
    int cyc, expect_cyc, wl, hl, bad, d, maxd, nz;
    a = new[WM * HM];
    orig = new[WM * HM];
    for (int i = 0; i < WM * HM; i++) a[i] = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        if (mode == 0) a[y*WM + x] = int'($urandom_range(0, 12000)) - 6000;
        else           a[y*WM + x] = pixel(x, y, w, h) * 16;
        orig[y*WM + x] = a[y*WM + x];
      end
    if (mode == 1) nz = dwt3(a, WM, w, h, 0);
    tb_load = 1'b1;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        @(negedge clk);
        ta_we = 1'b1; ta_waddr = AW'(y * WM + x); ta_wdata = 16'(a[y*WM + x]);
      end
    @(negedge clk);
    ta_we = 1'b0; tb_load = 1'b0;
    idwt3(a, WM, w, h);
    img_w = 16'(w); img_h = 16'(h);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    wl = w; hl = h; expect_cyc = 2;
    for (int lv = 0; lv < 3; lv++) begin
      expect_cyc += wl * (hl + 8) + hl * (wl + 8) + 2 * DRAIN;
      wl /= 2; hl /= 2;
    end
    checks++;
    if (cyc != expect_cyc) begin
      failures++;
      $display("FAIL %0dx%0d: %0d clocks, expected %0d", w, h, cyc, expect_cyc);
    end
    bad = 0; maxd = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        checks++;
        if (int'($signed(u_a.mem[y * WM + x])) != a[y*WM + x]) begin
          failures++; bad++;
          if (bad < 8) $display("FAIL %0dx%0d sample (%0d,%0d) = %0d, expected %0d", w, h, x, y,
                                $signed(u_a.mem[y * WM + x]), a[y*WM + x]);
        end
        if (mode == 1) begin
          d = a[y*WM + x] - orig[y*WM + x];
          if (d < 0) d = -d;
          if (d > maxd) maxd = d;
        end
      end
    if (mode == 1) begin
      checks++;
      if (maxd > 8) begin
        failures++;
        $display("FAIL round trip error %0d LSB", maxd);
      end
    end
    $display("run %0dx%0d mode %0d: %0d clocks, round-trip max error %0d LSB (Q.4)",
             w, h, mode, cyc, maxd);
  endtask

  initial begin
    #20ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    start = 1'b0; img_w = '0; img_h = '0;
    ta_we = 1'b0; ta_waddr = '0; ta_wdata = '0; tb_load = 1'b0;
    ext_reads = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(48, 32, 0);
    run(32, 16, 0);
    run(48, 32, 1);
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
