// tb_dsp_top: end-to-end test of the whole design at its default sizes
// (n = 8, 27 taps), with the workloads the design is meant for.
//
// 1. Multiplier port: all 65536 operand pairs on the three variants; each
//    product within 2^(n+2) of a*b, and the variants' mean error distances
//    reported. Counted mechanisms: the compensation bit E of a modified exact
//    compressor firing, the carry-free last stage of P-AE changing a product,
//    and the error-recovery bit E_R of P-AEER changing a product.
// 2. Image smoothing: a full 512 x 512 synthetic frame (gradient plus noise)
//    is streamed in raster order, one pixel per cycle, and smoothed with an
//    averaging 3x3 mask. All 510 x 510 interior pixels must come out, each
//    three cycles after the pixel completing its window and within the error
//    budget of the exact result; the PSNR against exact smoothing must
//    exceed 30 dB.
// 3. ECG-style filtering: a synthetic ECG-like waveform with added noise is
//    low-pass filtered by the 27-tap FIR (windowed-sinc coefficients computed
//    here). Each output comes one cycle after its sample, equals the
//    reference built from reference multipliers, and the RMS deviation from
//    the exact filter stays below 10 % of the exact output's peak.
// A mechanism that never happened counts as a failure. Watchdog included.
module tb_dsp_top;
  import amul_pkg::*;
  localparam int N = 8, TAPS = 27, FRAC = 8, YW = 2 * N + $clog2(TAPS);
  localparam int W = 512, H = 512;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] mult_a = '0, mult_b = '0;
  logic [2*N-1:0] p_basic, p_ae, p_aeer;
  logic sm_pix_valid = 0;
  logic [N-1:0] sm_pix = '0;
  logic [N-1:0] sm_alpha [9];
  logic sm_out_valid;
  logic [N-1:0] sm_out_pix;
  logic fir_in_valid = 0;
  logic signed [N-1:0] fir_x = '0;
  logic signed [N-1:0] fir_coef [TAPS];
  logic fir_out_valid;
  logic signed [YW-1:0] fir_y;

  dsp_top dut (
    .clk, .rst_n,
    .mult_a, .mult_b, .mult_p_basic(p_basic), .mult_p_ae(p_ae), .mult_p_aeer(p_aeer),
    .sm_pix_valid, .sm_pix, .sm_alpha, .sm_out_valid, .sm_out_pix,
    .fir_in_valid, .fir_x, .fir_coef, .fir_out_valid, .fir_y);

  // reference multipliers for the FIR model (same variant as the filters)
  logic [N-1:0] ma [TAPS], mb [TAPS];
  logic [2*N-1:0] rp [TAPS];
  for (genvar t = 0; t < TAPS; t++) begin : g_ref
    amul #(.N(N), .VARIANT(P_BASIC)) u_ref (.a(ma[t]), .b(mb[t]), .p(rp[t]));
  end

  int checks = 0, failures = 0;
  int n_comp = 0, n_drop = 0, n_er = 0, n_sm = 0, n_fir = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- smoothing output checker ----------------
  int sm_exp_ex [$], sm_exp_c [$];
  real sm_se = 0.0;
  always @(posedge clk) begin
    if (rst_n && sm_out_valid) begin
      int x, c, d;
      x = sm_exp_ex.pop_front(); c = sm_exp_c.pop_front();
      n_sm++;
      checks++;
      if (cyc - c != 3) begin failures++; $display("FAIL smoothing latency %0d", cyc - c); end
      d = int'(sm_out_pix) - x;
      sm_se += real'(d * d);
      checks++;
      if (d > 37 || d < -37) begin failures++; $display("FAIL smoothing pixel %0d exact %0d", sm_out_pix, x); end
    end
  end

  // ---------------- FIR output checker ----------------
  longint fir_exp [$], fir_exact [$];
  int fir_c [$];
  real fir_se = 0.0, fir_peak = 0.0;
  always @(posedge clk) begin
    if (rst_n && fir_out_valid) begin
      longint e, x;
      int c;
      e = fir_exp.pop_front(); x = fir_exact.pop_front(); c = fir_c.pop_front();
      n_fir++;
      checks++;
      if (cyc - c != 1) begin failures++; $display("FAIL FIR latency %0d", cyc - c); end
      checks++;
      if (longint'(fir_y) != e) begin failures++; $display("FAIL FIR y=%0d want %0d", fir_y, e); end
      fir_se += real'(longint'(fir_y) - x) ** 2;
      if (real'(x) > fir_peak) fir_peak = real'(x);
      if (-real'(x) > fir_peak) fir_peak = -real'(x);
    end
  end

  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  initial begin
    longint ex, e;
    longint ed [3];
    int img [][];
    int cnt;
    real psnr, rms;
    logic signed [N-1:0] hist [TAPS];
    int sig_len;

    for (int i = 0; i < 9; i++) sm_alpha[i] = (i == 4) ? 8'd32 : 8'd28;   // sums to 256
    for (int t = 0; t < TAPS; t++) fir_coef[t] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // ---- 1. multiplier, exhaustive ----
    for (int v = 0; v < 3; v++) ed[v] = 0;
    for (int i = 0; i < (1 << N); i++) begin
      for (int k = 0; k < (1 << N); k++) begin
        mult_a = N'(i); mult_b = N'(k);
        #1;
        ex = longint'(i) * longint'(k);
        for (int v = 0; v < 3; v++) begin
          longint pv;
          pv = (v == 0) ? longint'(p_basic) : (v == 1) ? longint'(p_ae) : longint'(p_aeer);
          e = (pv > ex) ? pv - ex : ex - pv;
          ed[v] += e;
          checks++;
          if (e >= (longint'(1) << (N + 2))) begin
            failures++; $display("FAIL mult v%0d %0d x %0d got %0d", v, i, k, pv);
          end
        end
        if (dut.u_mul_basic.g_st[1].g_col[11].g_red.g_c42[0].g_ex.u_c.e) n_comp++;
        if (p_ae != p_basic) n_drop++;
        if (p_aeer != p_ae) n_er++;
      end
    end
    $display("MED basic %0.1f, P-AE %0.1f, P-AEER %0.1f", real'(ed[0]) / 65536.0,
             real'(ed[1]) / 65536.0, real'(ed[2]) / 65536.0);

    // ---- 2. image smoothing ----
    img = new[H];
    for (int y = 0; y < H; y++) begin
      img[y] = new[W];
      for (int x = 0; x < W; x++)
        img[y][x] = clampi((x + 3 * y) / 4 + $urandom_range(0, 40) - 20, 0, 255);
    end
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < W - 1; x++) begin
        int exs;
        exs = 0;
        for (int i = 0; i < 9; i++)
          exs += img[y + i / 3 - 1][x + i % 3 - 1] * int'(sm_alpha[i]);
        sm_exp_ex.push_back(clampi(exs >> FRAC, 0, 255));
      end
    @(negedge clk);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        sm_pix_valid = 1;
        sm_pix = N'(img[y][x]);
        if (y >= 2 && x >= 2) sm_exp_c.push_back(cyc);
        @(negedge clk);
      end
    end
    sm_pix_valid = 0;
    repeat (6) @(negedge clk);
    psnr = 10.0 * $log10(255.0 * 255.0 / (sm_se / real'((W - 2) * (H - 2)) + 1.0e-9));
    $display("smoothing: %0d pixels, PSNR vs exact %0.2f dB", n_sm, psnr);
    checks++;
    if (n_sm != (W - 2) * (H - 2) || psnr < 30.0) begin failures++; $display("FAIL smoothing quality/count"); end

    // ---- 3. ECG-style FIR ----
    // windowed-sinc low-pass, cut-off 0.1 of the sample rate, Q7
    for (int t = 0; t < TAPS; t++) begin
      real m, hv;
      m = real'(t - (TAPS - 1) / 2);
      hv = (m == 0.0) ? 0.2 : $sin(2.0 * 3.14159265 * 0.1 * m) / (3.14159265 * m);
      hv = hv * (0.54 - 0.46 * $cos(2.0 * 3.14159265 * real'(t) / real'(TAPS - 1)));
      fir_coef[t] = N'($rtoi(hv * 600.0 + ((hv >= 0.0) ? 0.5 : -0.5)));
    end
    for (int t = 0; t < TAPS; t++) hist[t] = '0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    sig_len = 800;
    for (int n = 0; n < sig_len; n++) begin
      real s;
      longint acc, exs;
      int ph;
      // ECG-like: sharp R peak every 100 samples, smaller T wave, plus noise
      ph = n % 100;
      s = -40.0;
      if (ph >= 40 && ph < 46) s = s + ((ph < 43) ? 50.0 * real'(ph - 40) : 50.0 * real'(46 - ph));
      if (ph >= 60 && ph < 80) s = s + 50.0 * $sin(3.14159265 * real'(ph - 60) / 20.0);
      s = s + real'($urandom_range(0, 30)) - 15.0;
      fir_x = N'($rtoi(s));
      for (int t = TAPS - 1; t > 0; t--) hist[t] = hist[t-1];
      hist[0] = fir_x;
      for (int t = 0; t < TAPS; t++) begin
        ma[t] = hist[t][N-1] ? N'(-hist[t]) : N'(hist[t]);
        mb[t] = fir_coef[t][N-1] ? N'(-fir_coef[t]) : N'(fir_coef[t]);
      end
      #1;
      acc = 0; exs = 0;
      for (int t = 0; t < TAPS; t++) begin
        if (hist[t][N-1] ^ fir_coef[t][N-1]) acc -= longint'(rp[t]);
        else acc += longint'(rp[t]);
        exs += longint'(hist[t]) * longint'(fir_coef[t]);
      end
      fir_in_valid = 1;
      fir_exp.push_back(acc); fir_exact.push_back(exs); fir_c.push_back(cyc);
      @(negedge clk);
    end
    fir_in_valid = 0;
    repeat (3) @(negedge clk);
    rms = $sqrt(fir_se / real'(sig_len));
    $display("FIR: %0d outputs, RMS deviation %0.2f %% of peak %0.0f", n_fir,
             100.0 * rms / fir_peak, fir_peak);
    checks++;
    if (n_fir != sig_len || rms > 0.10 * fir_peak) begin failures++; $display("FAIL FIR deviation/count"); end

    // ---- mechanisms ----
    $display("mechanisms: E compensation %0d, P-AE carry drop %0d, E_R recovery %0d, smoothing %0d, FIR %0d",
             n_comp, n_drop, n_er, n_sm, n_fir);
    checks++; if (n_comp == 0) begin failures++; $display("FAIL E never fired"); end
    checks++; if (n_drop == 0) begin failures++; $display("FAIL P-AE never differed"); end
    checks++; if (n_er == 0)   begin failures++; $display("FAIL E_R never acted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
