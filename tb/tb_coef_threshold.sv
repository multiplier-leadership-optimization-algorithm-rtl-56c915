// tb_coef_threshold -- exhaustive check of hard thresholding over every 16-bit coefficient
// for several thresholds, including 0 (keep everything) and values above full scale.
module tb_coef_threshold;
  logic signed [15:0] c, out;
  logic        [15:0] thr;
  logic               nz;
  int checks = 0, failures = 0;

  coef_threshold dut (.c(c), .thr(thr), .out(out), .nonzero(nz));

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int th [5] = '{0, 1, 40, 1000, 40000};
    int m, e;
    foreach (th[k]) begin
      thr = 16'(th[k]);
      for (int v = -32768; v < 32768; v++) begin
        c = 16'(v);
        #1;
        m = (v < 0) ? -v : v;
        e = (m >= th[k]) ? v : 0;
        checks++;
        if (int'(out) != e || nz != (e != 0)) begin
          failures++;
          if (failures < 10) $display("FAIL c=%0d thr=%0d out=%0d nz=%b", v, th[k], out, nz);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
