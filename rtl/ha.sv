// ha: exact half adder used in the exact (most significant) columns.
// Purely combinational.
module ha (
  input  logic a,
  input  logic b,
  output logic s,   // weight 1
  output logic co   // weight 2
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
