// compressor_3_2 -- exact 3:2 compressor (full adder) of the partial-product reduction tree.
//
// Three bits of weight 2^k are reduced to a sum bit of weight 2^k and a carry bit of weight
// 2^(k+1): a + b + c = sum + 2*carry. Purely combinational. The reduction tree uses it in
// every column; its gate-level form (two XORs and a majority) is the usual one and is this
// design's choice.
module compressor_3_2 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic axb;
  assign axb   = a ^ b;
  assign sum   = axb ^ c;
  assign carry = (a & b) | (axb & c);
endmodule
