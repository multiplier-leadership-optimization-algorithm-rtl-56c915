// tb_idwt_filter -- self-checking test of the inverse 9/7 synthesis filter.
//
// Random and extreme nine-sample windows are driven, one per clock, with both output
// parities. With exact Kogge-Stone final adders the output must equal the integer model
// (exact products, +2^14 >>> 15 rounding, 16-bit saturation) bit for bit. A second instance
// with the default approximate LC-AKSA adders must stay within a bound derived from the
// adder's error: each product is at most 2^16 too large, nine products, scaled by 2^-15,
// so at most 19 LSB after rounding. A few windows are also checked for the DC and Nyquist
// gains of the kernels (a constant low band reconstructs to the same constant).
module tb_idwt_filter;
  import mloa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid, odd;
  logic signed [15:0]   win [SY_TAPS];
  logic                 v_ex, v_ap;
  logic signed [15:0]   y_ex, y_ap;

  idwt_filter #(.FINAL_ADDER(FA_KOGGE_STONE)) dut_exact (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .odd(odd), .win(win),
    .out_valid(v_ex), .y(y_ex)
  );
  idwt_filter dut_approx (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .odd(odd), .win(win),
    .out_valid(v_ap), .y(y_ap)
  );

  int checks = 0, failures = 0, max_err = 0;

  function automatic int model(input bit o, input int w [SY_TAPS]);
    longint acc, r;
    int c;
    tap_t k;
    acc = 0;
    for (int t = 0; t < SY_TAPS; t++) begin
      k = o ? SY_ODD[t] : SY_EVEN[t];
      c = k.neg ? -int'(k.mag) : int'(k.mag);
      acc += longint'(c) * longint'(w[t]);
    end
    r = (acc + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  int exp_q [$];
  always @(posedge clk) begin
    int e, d;
    if (rst_n && v_ex) begin
      e = exp_q.pop_front();
      checks++;
      if (int'(y_ex) != e) begin
        failures++;
        if (failures < 10) $display("FAIL exact: got %0d expected %0d", y_ex, e);
      end
      d = int'(y_ap) - e;
      if (d < 0) d = -d;
      if (d > max_err) max_err = d;
      checks++;
      if (d > 19) begin
        failures++;
        if (failures < 10) $display("FAIL approx: got %0d expected %0d", y_ap, e);
      end
    end
    if (rst_n && (v_ex != v_ap)) begin
      failures++;
      $display("FAIL valid mismatch");
    end
  end

  task automatic drive(input bit o, input int w [SY_TAPS]);
    @(negedge clk);
    in_valid = 1'b1;
    odd = o;
    for (int t = 0; t < SY_TAPS; t++) win[t] = 16'(w[t]);
    exp_q.push_back(model(o, w));
  endtask

  initial begin
    #2ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int w [SY_TAPS];
    in_valid = 1'b0; odd = 1'b0;
    for (int t = 0; t < SY_TAPS; t++) win[t] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // constant low band, zero high band: interleaved window L,0,L,0,... around the output
    for (int o = 0; o < 2; o++) begin
      for (int t = 0; t < SY_TAPS; t++) w[t] = (((o + t) % 2) == 0) ? 1600 : 0;
      drive(o[0], w);
    end
    // extremes
    for (int o = 0; o < 2; o++) begin
      for (int t = 0; t < SY_TAPS; t++) w[t] = 32767;
      drive(o[0], w);
      for (int t = 0; t < SY_TAPS; t++) w[t] = -32768;
      drive(o[0], w);
      for (int t = 0; t < SY_TAPS; t++) w[t] = (t % 2 == 0) ? 32767 : -32768;
      drive(o[0], w);
    end
    // random windows with a mix of magnitudes
    for (int i = 0; i < 20000; i++) begin
      for (int t = 0; t < SY_TAPS; t++)
        w[t] = (i % 3 == 0) ? int'($signed(16'($urandom()))) : int'($urandom_range(0, 8000)) - 4000;
      drive(i[0], w);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    // the DC check: the first two outputs must reconstruct the constant exactly
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_q.size());
    end
    checks++;
    if (model(1'b0, '{1600, 0, 1600, 0, 1600, 0, 1600, 0, 1600}) != 1600 ||
        model(1'b1, '{0, 1600, 0, 1600, 0, 1600, 0, 1600, 0}) != 1600) begin
      failures++;
      $display("FAIL DC gain of the synthesis kernels is not one");
    end
    $display("approximate filter: max |error| = %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
