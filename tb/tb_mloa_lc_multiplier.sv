// tb_mloa_lc_multiplier -- self-checking test of the leader-column multiplier.
//
// Five instances are driven with the same operands:
//   u_cpa   N=8, exact ripple final adder      -> must equal a*b for all 65536 pairs
//   u_ksa   N=8, exact Kogge-Stone final adder -> must equal a*b for all 65536 pairs
//   u_aksa  N=8, LC-AKSA (the default)         -> |error| < 2^(APPROX_BITS+1) = 256,
//                                                 and must differ from a*b somewhere
//   u_drop  N=8, K_DROP=4, exact Kogge-Stone   -> must equal the sum of the partial
//                                                 products of columns 4 and above
//   u_w16   N=16, exact Kogge-Stone            -> random pairs, must equal a*b
// The error rate, mean error distance (MED) and normalised error distance
// (NED = MED / (255*255)) of the LC-AKSA instance are printed.
module tb_mloa_lc_multiplier;
  import mloa_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] p_cpa, p_ksa, p_aksa, p_drop;
  logic [15:0] a16, b16;
  logic [31:0] p_w16;

  int checks = 0, failures = 0;
  int n_err = 0;
  longint sum_ed = 0;

  mloa_lc_multiplier #(.N(8), .FINAL_ADDER(FA_RIPPLE_CPA))  u_cpa  (.a(a), .b(b), .p(p_cpa));
  mloa_lc_multiplier #(.N(8), .FINAL_ADDER(FA_KOGGE_STONE)) u_ksa  (.a(a), .b(b), .p(p_ksa));
  mloa_lc_multiplier                                        u_aksa (.a(a), .b(b), .p(p_aksa));
  mloa_lc_multiplier #(.N(8), .K_DROP(4), .FINAL_ADDER(FA_KOGGE_STONE))
                                                            u_drop (.a(a), .b(b), .p(p_drop));
  mloa_lc_multiplier #(.N(16), .FINAL_ADDER(FA_KOGGE_STONE))
                                                            u_w16  (.a(a16), .b(b16), .p(p_w16));

  function automatic int pruned_product(input int x, input int y, input int kdrop);
    int r;
    r = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        if (i + j >= kdrop && ((x >> i) & 1) == 1 && ((y >> j) & 1) == 1) r += (1 << (i + j));
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d b=%0d", what, a, b);
    end
  endtask

  initial begin
    #100ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exact, ed;
    a16 = '0; b16 = '0;
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a = 8'(x); b = 8'(y);
        #1;
        exact = x * y;
        check(int'(p_cpa) == exact, "cpa");
        check(int'(p_ksa) == exact, "ksa");
        check(int'(p_drop) == pruned_product(x, y, 4), "k_drop=4");
        ed = int'(p_aksa) - exact;
        if (ed < 0) ed = -ed;
        check(ed < 256, "aksa error bound");
        if (ed != 0) n_err++;
        sum_ed += longint'(ed);
      end
    end
    checks++;
    if (n_err == 0) begin
      failures++;
      $display("FAIL approximate adder never departs from the exact product");
    end
    $display("LC-AKSA 8x8: ER=%0.4f MED=%0.3f NED=%0.6f", real'(n_err) / 65536.0,
             real'(sum_ed) / 65536.0, real'(sum_ed) / 65536.0 / 65025.0);
    for (int t = 0; t < 20000; t++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (t == 0) begin a16 = 16'hFFFF; b16 = 16'hFFFF; end
      #1;
      checks++;
      if (p_w16 != 32'(a16) * 32'(b16)) begin
        failures++;
        if (failures < 10) $display("FAIL n16 %h*%h=%h got %h", a16, b16, 32'(a16) * 32'(b16), p_w16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
