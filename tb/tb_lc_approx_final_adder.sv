// tb_lc_approx_final_adder -- checks the leader-column approximate adder against a bit-serial
// model of its definition: for i < APPROX_BITS, S_i = (A_i xor B_i) or C_i with C_0 = 0 and
// C_(i+1) = A_i; the upper bits are the exact sum of the upper operand parts plus
// C_(APPROX_BITS). Run exhaustively over 16-bit operands drawn from a 10-bit sweep and
// randomly, for the default (W=16, APPROX_BITS=7) and for APPROX_BITS=0 (must be exact).
module tb_lc_approx_final_adder;
  logic [15:0] a, b, s_def, s_exact;
  int checks = 0, failures = 0;

  lc_approx_final_adder                   dut  (.a(a), .b(b), .sum(s_def));
  lc_approx_final_adder #(.APPROX_BITS(0)) u_ex (.a(a), .b(b), .sum(s_exact));

  function automatic logic [15:0] model(input logic [15:0] x, input logic [15:0] y, input int k);
    logic [15:0] r;
    logic        c;
    c = 1'b0;
    r = '0;
    for (int i = 0; i < k; i++) begin
      r[i] = (x[i] ^ y[i]) | c;
      c    = x[i];
    end
    r = r | ((((x >> k) + (y >> k) + 16'(c)) << k) & 16'hFFFF);
    return r;
  endfunction

  task automatic one();
    #1;
    checks += 2;
    if (s_def != model(a, b, 7)) begin
      failures++;
      if (failures < 10) $display("FAIL aksa %h+%h got %h want %h", a, b, s_def, model(a, b, 7));
    end
    if (s_exact != a + b) begin
      failures++;
      if (failures < 10) $display("FAIL exact %h+%h got %h", a, b, s_exact);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 1024; x++)
      for (int y = 0; y < 64; y++) begin
        a = 16'(x * 67);
        b = 16'(y * 1031 + x);
        one();
      end
    for (int t = 0; t < 50000; t++) begin
      a = 16'($urandom); b = 16'($urandom);
      one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
