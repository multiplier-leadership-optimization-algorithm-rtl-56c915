// tb_compressor_3_2 -- exhaustive check of the 3:2 compressor: a+b+c must equal sum+2*carry
// for all eight input combinations.
module tb_compressor_3_2;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  compressor_3_2 dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (int'(sum) + 2 * int'(carry) != int'(a) + int'(b) + int'(c)) begin
        failures++;
        $display("FAIL %b%b%b -> sum=%b carry=%b", a, b, c, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
