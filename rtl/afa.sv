// afa: approximate full adder for the approximate (least significant) columns.
//
// carry = majority(a, b, ci) (exact), sum = a | b | ci. The result is exact
// except when exactly two inputs are 1 (gives 3 instead of 2).
// Purely combinational.
module afa (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,   // weight 1
  output logic co   // weight 2
);
  always_comb begin
    co = (a & b) | (b & ci) | (a & ci);
    s  = a | b | ci;
  end
endmodule
