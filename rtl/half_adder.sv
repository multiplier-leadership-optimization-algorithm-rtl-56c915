// half_adder -- 2:2 counter used by the reduction tree where a column is only one bit over
// its stage target: a + b = sum + 2*carry. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
