// fir27: direct-form FIR filter whose tap multiplications use the approximate
// multiplier (27 taps by default, as used for ECG denoising).
//
// y[k] = sum_{t=0..TAPS-1} h[t] * x[k-t]. Samples and coefficients are signed
// N-bit two's complement. Each tap multiplies magnitudes with an unsigned
// N x N amul and restores the sign afterwards, so the approximation acts on
// magnitudes the same way for positive and negative values. The coefficients
// are an input (they are designed offline for the wanted response and held
// stable by the caller).
//
// Timing: one sample per cycle. x_in is shifted into the delay line when
// in_valid is high; the new output, including that sample, appears on y_out
// with out_valid one cycle later. Synchronous active-low reset clears the
// delay line and the output.
//
// The tap count and the direct-form structure (delay line, one multiplier
// per tap, summation) follow the source; word widths, the sign-magnitude
// handling and the output register are this design's choices.
module fir27
  import amul_pkg::*;
#(
  parameter int unsigned TAPS    = 27,       // filter length
  parameter int unsigned N       = 8,        // sample and coefficient width
  parameter variant_e    VARIANT = P_BASIC,  // multiplier variant
  localparam int unsigned YW     = 2 * N + $clog2(TAPS)  // output width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [N-1:0] x_in,
  input  logic signed [N-1:0] coef [TAPS],
  output logic                out_valid,
  output logic signed [YW-1:0] y_out
);
  logic signed [N-1:0]   dl    [TAPS];   // dl[t] = x[k-t] once x_in is taken
  logic signed [N-1:0]   taps  [TAPS];   // tap inputs for the sample on x_in
  logic signed [YW-1:0]  acc;

  // the tap inputs include the sample being presented
  always_comb begin
    taps[0] = x_in;
    for (int t = 1; t < TAPS; t++) taps[t] = dl[t-1];
  end

  for (genvar t = 0; t < TAPS; t++) begin : g_tap
    logic [N-1:0]   mx, mh;
    logic [2*N-1:0] pm;
    logic           neg;
    logic signed [YW-1:0] term;
    assign mx  = taps[t][N-1] ? N'(-taps[t]) : N'(taps[t]);
    assign mh  = coef[t][N-1] ? N'(-coef[t]) : N'(coef[t]);
    assign neg = taps[t][N-1] ^ coef[t][N-1];
    amul #(.N(N), .VARIANT(VARIANT)) u_mul (.a(mx), .b(mh), .p(pm));
    assign term = neg ? -$signed({{(YW-2*N){1'b0}}, pm}) : $signed({{(YW-2*N){1'b0}}, pm});
  end

  logic signed [YW-1:0] terms [TAPS];
  for (genvar t = 0; t < TAPS; t++) begin : g_term
    assign terms[t] = g_tap[t].term;
  end

  // adder tree written as a sum; synthesis builds the tree
  always_comb begin
    acc = '0;
    for (int t = 0; t < TAPS; t++) acc += terms[t];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int t = 0; t < TAPS; t++) dl[t] <= '0;
      out_valid <= 1'b0;
      y_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dl[0] <= x_in;
        for (int t = 1; t < TAPS; t++) dl[t] <= dl[t-1];
        y_out <= acc;
      end
    end
  end
endmodule
