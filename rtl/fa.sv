// fa: exact full adder used in the exact (most significant) columns and in the
// exact part of the final ripple-carry adder. Purely combinational.
module fa (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,   // weight 1
  output logic co   // weight 2
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (ci & (a ^ b));
  end
endmodule
