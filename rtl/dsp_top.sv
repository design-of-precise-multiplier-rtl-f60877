// dsp_top: the approximate-multiplier design and its two signal-processing
// systems, side by side.
//
//   * mult_*   : the n x n approximate multiplier in its three variants
//                (Proposed-basic, P-AE, P-AEER) on shared operands, for
//                comparing their products directly.
//   * sm_*     : the image-smoothing system (smooth_stream): a raster pixel
//                stream of IMG_W x IMG_H frames in, the smoothed interior
//                pixels out, three cycles after the pixel completing each
//                3x3 window.
//   * fir_*    : the 27-tap FIR filter (fir27), one sample per cycle, output
//                one cycle after the input.
// The two systems use the multiplier variant chosen by FILT_VARIANT. All
// sizes default to the source's main configuration (n = 8, 27 taps); the
// 512 x 512 frame size is this design's choice.
// One clock and one synchronous active-low reset serve both systems; the
// multipliers are combinational.
module dsp_top
  import amul_pkg::*;
#(
  parameter int unsigned N            = 8,
  parameter int unsigned TAPS         = 27,
  parameter int unsigned FRAC         = 8,
  parameter int unsigned IMG_W        = 512,
  parameter int unsigned IMG_H        = 512,
  parameter variant_e    FILT_VARIANT = P_BASIC,
  localparam int unsigned YW          = 2 * N + $clog2(TAPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // multiplier comparison port
  input  logic [N-1:0]         mult_a,
  input  logic [N-1:0]         mult_b,
  output logic [2*N-1:0]       mult_p_basic,
  output logic [2*N-1:0]       mult_p_ae,
  output logic [2*N-1:0]       mult_p_aeer,
  // image smoothing
  input  logic                 sm_pix_valid,
  input  logic [N-1:0]         sm_pix,
  input  logic [N-1:0]         sm_alpha [9],
  output logic                 sm_out_valid,
  output logic [N-1:0]         sm_out_pix,
  // ECG FIR filter
  input  logic                 fir_in_valid,
  input  logic signed [N-1:0]  fir_x,
  input  logic signed [N-1:0]  fir_coef [TAPS],
  output logic                 fir_out_valid,
  output logic signed [YW-1:0] fir_y
);
  amul #(.N(N), .VARIANT(P_BASIC)) u_mul_basic (.a(mult_a), .b(mult_b), .p(mult_p_basic));
  amul #(.N(N), .VARIANT(P_AE))    u_mul_ae    (.a(mult_a), .b(mult_b), .p(mult_p_ae));
  amul #(.N(N), .VARIANT(P_AEER))  u_mul_aeer  (.a(mult_a), .b(mult_b), .p(mult_p_aeer));

  smooth_stream #(.N(N), .FRAC(FRAC), .IMG_W(IMG_W), .IMG_H(IMG_H),
                  .VARIANT(FILT_VARIANT)) u_smooth (
    .clk, .rst_n,
    .pix_valid(sm_pix_valid), .pix_in(sm_pix), .alpha(sm_alpha),
    .out_valid(sm_out_valid), .out_pix(sm_out_pix));

  fir27 #(.TAPS(TAPS), .N(N), .VARIANT(FILT_VARIANT)) u_fir (
    .clk, .rst_n,
    .in_valid(fir_in_valid), .x_in(fir_x), .coef(fir_coef),
    .out_valid(fir_out_valid), .y_out(fir_y));
endmodule
