// compressor_4_2 -- exact 4:2 compressor of the partial-product reduction tree.
//
// Four bits x[3:0] of weight 2^k and a fifth bit cin of the same weight are reduced to one
// bit of weight 2^k (sum) and two bits of weight 2^(k+1) (carry, cout):
//   x0 + x1 + x2 + x3 + cin = sum + 2*(carry + cout).
// It is the usual pair of chained 3:2 compressors: cout comes from the first one and does
// not depend on cin. The reduction tree places these compressors in the leader column and
// its neighbours; the internal structure is this design's choice. Purely combinational.
module compressor_4_2 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic s1;
  compressor_3_2 u_first  (.a(x[0]), .b(x[1]), .c(x[2]), .sum(s1),  .carry(cout));
  compressor_3_2 u_second (.a(s1),   .b(x[3]), .c(cin),  .sum(sum), .carry(carry));
endmodule
