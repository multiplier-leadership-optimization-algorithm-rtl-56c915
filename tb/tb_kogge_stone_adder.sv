// tb_kogge_stone_adder -- checks the prefix adder against plain addition: exhaustive for an
// 8-bit instance (with both carry-in values) and random for the 16-bit default and a 13-bit
// instance whose width is not a power of two.
module tb_kogge_stone_adder;
  logic [7:0]  a8, b8, s8;
  logic [15:0] a16, b16, s16;
  logic [12:0] a13, b13, s13;
  logic        cin, c8, c16, c13;
  int checks = 0, failures = 0;

  kogge_stone_adder #(.W(8))  u8  (.a(a8),  .b(b8),  .cin(cin), .sum(s8),  .cout(c8));
  kogge_stone_adder           u16 (.a(a16), .b(b16), .cin(cin), .sum(s16), .cout(c16));
  kogge_stone_adder #(.W(13)) u13 (.a(a13), .b(b13), .cin(cin), .sum(s13), .cout(c13));

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0; a13 = '0; b13 = '0;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a8 = 8'(x); b8 = 8'(y); cin = 1'(ci);
          #1;
          checks++;
          if ({c8, s8} != 9'(x + y + ci)) begin
            failures++;
            if (failures < 10) $display("FAIL w8 %0d+%0d+%0d got %0d", x, y, ci, {c8, s8});
          end
        end
    for (int t = 0; t < 20000; t++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); cin = 1'($urandom);
      a13 = 13'($urandom); b13 = 13'($urandom);
      #1;
      checks += 2;
      if ({c16, s16} != 17'(a16) + 17'(b16) + 17'(cin)) begin
        failures++;
        if (failures < 10) $display("FAIL w16 %h+%h", a16, b16);
      end
      if ({c13, s13} != 14'(a13) + 14'(b13) + 14'(cin)) begin
        failures++;
        if (failures < 10) $display("FAIL w13 %h+%h", a13, b13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
