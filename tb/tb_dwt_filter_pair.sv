// tb_dwt_filter_pair -- checks the 9/7 filter pair.
//   u_exact (exact Kogge-Stone final adders) must match the integer model bit for bit.
//   dut (default LC-AKSA multipliers) must stay within 19 LSBs of the exact result: each
//   approximate product is off by less than 2^16, nine of them by less than 9*2^16, which is
//   under 18 LSBs after the 15-bit shift, plus one for rounding.
// Both must present their result exactly one clock after in_valid. Random windows include
// full-scale and negative samples to reach saturation.
module tb_dwt_filter_pair;
  import mloa_pkg::*;
  import tb_dwt_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                in_valid;
  logic signed [15:0]  win [9];
  logic                v_a, v_e;
  logic signed [15:0]  lo_a, hi_a, lo_e, hi_e;
  int checks = 0, failures = 0, n_diff = 0, n_sat = 0;

  dwt_filter_pair dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .win(win),
    .out_valid(v_a), .lo(lo_a), .hi(hi_a)
  );
  dwt_filter_pair #(.FINAL_ADDER(FA_KOGGE_STONE)) u_exact (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .win(win),
    .out_valid(v_e), .lo(lo_e), .hi(hi_e)
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint al, ah;
    int rl, rh, dl, dh;
    in_valid = 1'b0;
    for (int i = 0; i < 9; i++) win[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      for (int i = 0; i < 9; i++) begin
        case (n % 4)
          0: win[i] = 16'($urandom_range(0, 4080));          // pixels
          1: win[i] = 16'($urandom);                         // full range
          2: win[i] = (i % 2 == 0) ? 16'sd32767 : -16'sd32768;  // saturating pattern
          default: win[i] = 16'($signed(16'($urandom)) >>> 3);
        endcase
      end
      in_valid = 1'b1;
      al = 0; ah = 0;
      for (int t = 0; t < 9; t++) al += longint'(tap_lp(t)) * win[t];
      for (int t = 0; t < 7; t++) ah += longint'(tap_hp(t)) * win[t+2];
      rl = rsat(al); rh = rsat(ah);
      if (rl == 32767 || rl == -32768 || rh == 32767 || rh == -32768) n_sat++;
      @(negedge clk);
      in_valid = 1'b0;
      chk(v_e && v_a, "out_valid one clock after in_valid");
      chk(int'(lo_e) == rl, $sformatf("exact lo %0d vs %0d", lo_e, rl));
      chk(int'(hi_e) == rh, $sformatf("exact hi %0d vs %0d", hi_e, rh));
      dl = int'(lo_a) - rl; if (dl < 0) dl = -dl;
      dh = int'(hi_a) - rh; if (dh < 0) dh = -dh;
      chk(dl <= 19 || rl == 32767 || rl == -32768, $sformatf("approx lo %0d vs %0d", lo_a, rl));
      chk(dh <= 19 || rh == 32767 || rh == -32768, $sformatf("approx hi %0d vs %0d", hi_a, rh));
      if (dl != 0 || dh != 0) n_diff++;
      @(negedge clk);
      chk(!v_e && !v_a, "out_valid drops");
    end
    chk(n_diff > 0, "approximate multipliers change some results");
    chk(n_sat > 0, "saturation exercised");
    $display("approximate results differing: %0d, saturating windows: %0d", n_diff, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
