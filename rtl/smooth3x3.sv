// smooth3x3: 3x3 weighted image-smoothing kernel built on the approximate
// multiplier.
//
// For one output pixel it forms G = sum_{i=0..8} alpha[i] * w[i], where w is
// the 3x3 window of input pixels around the processed pixel (row-major,
// w[0] = f(x-1,y-1), w[4] = f(x,y), w[8] = f(x+1,y+1)) and alpha the mask
// weights. The nine products come from nine amul instances of the selected
// variant. Weights are unsigned fixed point with FRAC fractional bits (for an
// averaging mask they sum to 2^FRAC), so the pixel is G >> FRAC, saturated to
// the pixel range. Moving the window over the image is left to the caller:
// one window per cycle can be presented.
//
// Timing: window and weights are sampled with in_valid; products are
// registered in the first cycle and the normalised pixel in the second, so
// out_valid/out_pix follow in_valid two cycles later. Synchronous active-low
// reset clears the valid pipeline.
//
// The weighted-window equation follows the source; pixel width, weight
// format, normalisation, saturation and the two-cycle pipeline are this
// design's choices.
module smooth3x3
  import amul_pkg::*;
#(
  parameter int unsigned N       = 8,        // pixel and weight width
  parameter int unsigned FRAC    = 8,        // fractional bits of the weights
  parameter variant_e    VARIANT = P_BASIC   // multiplier variant
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] win   [9],   // 3x3 window, row-major
  input  logic [N-1:0] alpha [9],   // mask weights
  output logic         out_valid,
  output logic [N-1:0] out_pix
);
  localparam int SW = 2 * N + 4;    // sum of nine 2N-bit products

  logic [2*N-1:0] prod   [9];
  logic [2*N-1:0] prod_q [9];
  logic           v_q;
  logic [SW-1:0]  sum;
  logic [SW-1:0]  scaled;

  for (genvar i = 0; i < 9; i++) begin : g_mul
    amul #(.N(N), .VARIANT(VARIANT)) u_mul (.a(win[i]), .b(alpha[i]), .p(prod[i]));
  end

  always_ff @(posedge clk) begin
    if (in_valid) prod_q <= prod;
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i < 9; i++) sum += SW'(prod_q[i]);
    scaled = sum >> FRAC;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= v_q;
      if (v_q) out_pix <= (scaled > SW'({N{1'b1}})) ? {N{1'b1}} : scaled[N-1:0];
    end
  end
endmodule
