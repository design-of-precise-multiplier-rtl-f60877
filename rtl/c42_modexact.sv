// c42_modexact: modified exact 4:2 compressor with compensation bit, used in
// the exact (most significant) columns of the multiplier.
//
// The conventional 4:2 compressor has a carry input and a carry output that
// chain neighbouring compressors. Here the carry input is tied low and the
// carry output dropped, which leaves a 4-input cell with outputs s (weight 1)
// and c (weight 2). For 1111 the cell drives s = 1 and c = 1 (value 3, one
// short), and the separate compensation bit e = a1&a2&a3&a4 (weight 1) makes up
// the missing unit: s + 2c + e always equals the number of ones at the input.
// e is formed in parallel from the inputs and so adds no delay to s and c; it
// is placed in the same column of the next reduction stage.
// Purely combinational.
module c42_modexact (
  input  logic [3:0] a,   // a[0]..a[3] = A1..A4, all of the same weight
  output logic       s,   // sum, weight 1
  output logic       c,   // carry, weight 2
  output logic       e    // compensation bit, weight 1
);
  logic x12, x34;
  always_comb begin
    x12 = a[0] ^ a[1];
    x34 = a[2] ^ a[3];
    e   = (a[0] & a[1]) & (a[2] & a[3]);
    s   = (x12 ^ x34) | e;
    // at least two ones among the four inputs
    c   = (a[0] & a[1]) | (a[2] & a[3]) | (x12 & x34);
  end
endmodule
