// c42_es: inexact 4:2 compressor with exact sum (Proposed-ES).
//
// A full-adder sum fsum = a1^a2^a3 is formed first; the exact sum is
// s = fsum ^ a4 and the approximate carry is c = ~fsum | a4. The sum is always
// right; s + 2c differs from the number of ones for inputs (a4..a1) 0000, 0111,
// 1000 (carry wrong, error +2/-2/+2) and 1111 (counts 2 instead of 4). It is
// used where the sum output weighs more on the product than the carry.
// Two XOR levels and one OR; purely combinational.
module c42_es (
  input  logic [3:0] a,   // a[0]..a[3] = A1..A4
  output logic       s,   // exact sum, weight 1
  output logic       c    // approximate carry, weight 2
);
  logic fsum;
  always_comb begin
    fsum = a[0] ^ a[1] ^ a[2];
    s    = fsum ^ a[3];
    c    = ~fsum | a[3];
  end
endmodule
