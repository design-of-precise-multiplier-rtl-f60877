// c42_ec: inexact 4:2 compressor with exact carry (Proposed-EC).
//
// An approximate full adder over a1..a3 gives afa_c = majority(a1,a2,a3) and
// afa_s = a1|a2|a3. The outputs are s = ~(afa_c ^ a4) and
// c = (afa_c & ~a4) | (afa_s & a4). The carry is exactly "two or more ones";
// the sum is wrong for inputs (a4..a1) 0000, 0111 and 1000, and 1111 counts 3
// instead of 4. It is used where the carry weighs more on the product: the
// first reduction stage and the top column of the approximate part.
// Purely combinational.
module c42_ec (
  input  logic [3:0] a,   // a[0]..a[3] = A1..A4
  output logic       s,   // approximate sum, weight 1
  output logic       c    // exact carry, weight 2
);
  logic afa_c, afa_s;
  always_comb begin
    afa_c = (a[0] & a[1]) | (a[1] & a[2]) | (a[0] & a[2]);
    afa_s = a[0] | a[1] | a[2];
    s     = ~(afa_c ^ a[3]);
    c     = (afa_c & ~a[3]) | (afa_s & a[3]);
  end
endmodule
