// rca: final-stage ripple-carry adder of the multiplier.
//
// Adds two W-bit rows with a carry input. Bit positions below NAPPROX use the
// approximate full adder (afa), the others exact full adders (fa), so that the
// approximate columns of the multiplier keep their cheaper cells also in the
// final addition. The carry out of the top position is returned in co.
// Purely combinational; the carry ripples through all W positions.
module rca #(
  parameter int unsigned W       = 16,  // adder width
  parameter int unsigned NAPPROX = 8    // low positions built from afa cells
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         ci,
  output logic [W-1:0] sum,
  output logic         co
);
  logic [W:0] cy;
  assign cy[0] = ci;
  for (genvar i = 0; i < W; i++) begin : g_bit
    if (i < NAPPROX) begin : g_apx
      afa u_cell (.a(x[i]), .b(y[i]), .ci(cy[i]), .s(sum[i]), .co(cy[i+1]));
    end else begin : g_exa
      fa  u_cell (.a(x[i]), .b(y[i]), .ci(cy[i]), .s(sum[i]), .co(cy[i+1]));
    end
  end
  assign co = cy[W];
endmodule
