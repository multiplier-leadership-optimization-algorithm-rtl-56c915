// frame_ram -- frame memory for the image, the row-filtered intermediate and the sub-bands.
//
// DEPTH words of DW bits with one write port and one read port, both synchronous to clk.
// The read is registered: rdata holds mem[raddr] one clock after raddr is presented. A read
// and a write of the same address in one clock return the old word. No reset: contents are
// whatever was last written. The two-port organisation and the registered read are this
// design's choices; the memory itself stands for the image and sub-band storage of the
// transform.
module frame_ram #(
  parameter int DEPTH = 768 * 512,
  parameter int DW    = 16,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
