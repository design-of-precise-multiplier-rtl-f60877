// tb_smooth_stream: streams two random 16 x 12 frames, back to back with idle
// cycles in between pixels, through the smoothing system and checks:
//   * exactly (16-2) x (12-2) outputs per frame, in raster order of the
//     interior pixels;
//   * each output equals the reference: the nine products of the window
//     around that interior pixel, taken from reference multipliers here,
//     summed, shifted by FRAC and saturated;
//   * each output arrives three cycles after the pixel completing its window.
// A watchdog bounds the run.
module tb_smooth_stream;
  import amul_pkg::*;
  localparam int N = 8, FRAC = 8, IW = 16, IH = 12;
  logic clk = 0, rst_n = 0, pix_valid = 0;
  logic [N-1:0] pix_in = '0;
  logic [N-1:0] alpha [9];
  logic out_valid;
  logic [N-1:0] out_pix;
  logic [N-1:0] rw [9];
  logic [2*N-1:0] rp [9];
  int checks = 0, failures = 0, nout = 0;

  smooth_stream #(.N(N), .FRAC(FRAC), .IMG_W(IW), .IMG_H(IH), .VARIANT(P_BASIC)) dut (
    .clk, .rst_n, .pix_valid, .pix_in, .alpha, .out_valid, .out_pix);
  for (genvar i = 0; i < 9; i++) begin : g_ref
    amul #(.N(N), .VARIANT(P_BASIC)) u_ref (.a(rw[i]), .b(alpha[i]), .p(rp[i]));
  end

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int exp_q [$];
  int done_cyc [$];   // cycle at which the completing pixel was taken

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e, c;
      nout++;
      e = exp_q.pop_front(); c = done_cyc.pop_front();
      checks++;
      if (int'(out_pix) != e) begin failures++; $display("FAIL out %0d want %0d (#%0d)", out_pix, e, nout); end
      checks++;
      if (cyc - c != 3) begin failures++; $display("FAIL latency %0d", cyc - c); end
    end
  end

  initial begin
    int img [2][IH][IW];
    int sum;
    for (int i = 0; i < 9; i++) alpha[i] = (i == 4) ? 8'd40 : 8'd27;  // sums to 256
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < IH; y++)
        for (int x = 0; x < IW; x++) img[f][y][x] = (f == 1 && y == 5) ? 255 : $urandom_range(0, 255);
    // expected outputs, interior pixels in raster order
    for (int f = 0; f < 2; f++)
      for (int y = 1; y < IH - 1; y++)
        for (int x = 1; x < IW - 1; x++) begin
          for (int i = 0; i < 9; i++) rw[i] = N'(img[f][y + i / 3 - 1][x + i % 3 - 1]);
          #1;
          sum = 0;
          for (int i = 0; i < 9; i++) sum += int'(rp[i]);
          sum = sum >> FRAC;
          exp_q.push_back(sum > 255 ? 255 : sum);
        end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < IH; y++)
        for (int x = 0; x < IW; x++) begin
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) begin
            pix_valid = 0;
            @(negedge clk);
          end
          pix_valid = 1;
          pix_in = N'(img[f][y][x]);
          if (y >= 2 && x >= 2) done_cyc.push_back(cyc);
        end
    @(negedge clk) pix_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (nout != 2 * (IW - 2) * (IH - 2) || exp_q.size() != 0) begin
      failures++; $display("FAIL %0d outputs", nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
