// tb_frame_ram -- checks the frame memory: random writes read back with one clock of read
// latency, and a read of the address being written in the same clock returns the old word.
module tb_frame_ram;
  localparam int DEPTH = 4096, AW = 12;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [15:0]   wdata, rdata;
  logic [15:0]   model [DEPTH];
  int checks = 0, failures = 0;

  frame_ram #(.DEPTH(DEPTH), .DW(16)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata)
  );

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] expect_q;
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      raddr = AW'($urandom);
      we = 1'($urandom);
      waddr = (n % 5 == 0) ? raddr : AW'($urandom);
      wdata = 16'($urandom);
      expect_q = model[raddr];
      if (we) model[waddr] = wdata;
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d: %h, expected %h", raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
