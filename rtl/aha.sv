// aha: approximate half adder for the approximate (least significant) columns.
//
// carry = a & b, sum = ~carry. The result is exact except for a = b = 0,
// which yields sum 1. Purely combinational.
module aha (
  input  logic a,
  input  logic b,
  output logic s,   // weight 1
  output logic co   // weight 2
);
  always_comb begin
    co = a & b;
    s  = ~co;
  end
endmodule
