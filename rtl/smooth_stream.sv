// smooth_stream: image-smoothing system for a raster pixel stream. It moves a
// 3x3 window over the image pixel by pixel and smooths each window with
// smooth3x3 (nine approximate multipliers).
//
// Pixels arrive in raster order (left to right, top to bottom), one per cycle
// at most, qualified by pix_valid; the frame is IMG_W x IMG_H. Two line
// buffers of IMG_W pixels hold the two previous rows. For every incoming pixel
// the column above it (row y-2, row y-1, row y) is shifted into a 3x3 window
// register. Once the window lies fully inside the frame (row >= 2 and
// column >= 2) it is passed to smooth3x3, which smooths the window centred on
// pixel (column-1, row-1). The output is therefore the interior
// (IMG_W-2) x (IMG_H-2) pixels of the frame, in raster order; border pixels
// produce no output. After the last pixel of a frame the counters wrap and
// the next frame can follow at once.
//
// Timing: out_valid/out_pix follow the pixel that completes a window by three
// cycles (window register, then the two-cycle smooth3x3 pipeline). The mask
// weights alpha must be held stable during a frame. Synchronous active-low
// reset clears the row/column counters and the valid pipeline.
//
// Moving a 3x3 weighted window over the image pixel by pixel follows the
// source; the raster interface, the line buffers, the interior-only output
// and the default frame size (512 x 512, a common size for standard test
// images) are this design's choices.
module smooth_stream
  import amul_pkg::*;
#(
  parameter int unsigned N       = 8,        // pixel and weight width
  parameter int unsigned FRAC    = 8,        // fractional bits of the weights
  parameter int unsigned IMG_W   = 512,      // frame width in pixels
  parameter int unsigned IMG_H   = 512,      // frame height in pixels
  parameter variant_e    VARIANT = P_BASIC   // multiplier variant
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pix_valid,
  input  logic [N-1:0] pix_in,
  input  logic [N-1:0] alpha [9],   // mask weights, row-major
  output logic         out_valid,
  output logic [N-1:0] out_pix
);
  localparam int CW = $clog2(IMG_W);
  localparam int RW = $clog2(IMG_H);

  logic [N-1:0]  lb1 [IMG_W];     // row y-1
  logic [N-1:0]  lb2 [IMG_W];     // row y-2
  logic [N-1:0]  w   [3][3];      // w[r][c]: r = 0 top row, c = 2 newest column
  logic [N-1:0]  win [9];
  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic          win_valid;

  // line buffers and window: plain registers, written only with a pixel
  always_ff @(posedge clk) begin
    if (pix_valid) begin
      lb2[col] <= lb1[col];
      lb1[col] <= pix_in;
      for (int r = 0; r < 3; r++) begin
        w[r][0] <= w[r][1];
        w[r][1] <= w[r][2];
      end
      w[0][2] <= lb2[col];
      w[1][2] <= lb1[col];
      w[2][2] <= pix_in;
    end
  end

  // raster position and window-valid flag
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= pix_valid && (row >= RW'(2)) && (col >= CW'(2));
      if (pix_valid) begin
        if (col == CW'(IMG_W - 1)) begin
          col <= '0;
          row <= (row == RW'(IMG_H - 1)) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) win[3 * r + c] = w[r][c];
  end

  smooth3x3 #(.N(N), .FRAC(FRAC), .VARIANT(VARIANT)) u_smooth (
    .clk, .rst_n,
    .in_valid(win_valid), .win(win), .alpha(alpha),
    .out_valid(out_valid), .out_pix(out_pix));
endmodule
