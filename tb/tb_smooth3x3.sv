// tb_smooth3x3: drives the 3x3 smoothing kernel with random windows and masks,
// one window per cycle with gaps, and checks every output pixel:
//   * exactly two cycles after its window (pipeline latency);
//   * equal to the reference sum of the nine multiplier products (reference
//     multipliers instantiated here), shifted by FRAC and saturated;
//   * within the multiplier error budget of the exact weighted average
//     (9 products, each off by less than 2^(n+2), divided by 2^FRAC);
// and that saturation was exercised. A watchdog bounds the run.
module tb_smooth3x3;
  import amul_pkg::*;
  localparam int N = 8, FRAC = 8;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [N-1:0] win [9], alpha [9];
  logic out_valid;
  logic [N-1:0] out_pix;
  logic [2*N-1:0] ref_p [9];
  int checks = 0, failures = 0, nsat = 0;

  smooth3x3 #(.N(N), .FRAC(FRAC), .VARIANT(P_BASIC)) dut (
    .clk, .rst_n, .in_valid, .win, .alpha, .out_valid, .out_pix);
  for (genvar i = 0; i < 9; i++) begin : g_ref
    amul #(.N(N), .VARIANT(P_BASIC)) u_ref (.a(win[i]), .b(alpha[i]), .p(ref_p[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, queued with the cycle of issue
  int exp_pix [$], exp_exact [$], exp_cyc [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e, x, t;
      e = exp_pix.pop_front(); x = exp_exact.pop_front(); t = exp_cyc.pop_front();
      checks++;
      if (cyc - t != 2) begin failures++; $display("FAIL latency %0d", cyc - t); end
      checks++;
      if (int'(out_pix) != e) begin failures++; $display("FAIL pix %0d want %0d", out_pix, e); end
      checks++;
      if (out_pix > x + 36 + 1 || out_pix + 36 + 1 < x) begin
        failures++; $display("FAIL pix %0d too far from exact %0d", out_pix, x);
      end
    end
  end

  initial begin
    int sum, ex, wsum, r;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        in_valid = 0;
      end else begin
        in_valid = 1;
        wsum = 0;
        for (int i = 0; i < 9; i++) begin
          win[i] = N'($urandom);
          // mostly averaging masks (sum 256), sometimes heavier ones
          alpha[i] = (n % 5 == 0) ? N'($urandom_range(40, 255)) : N'($urandom_range(20, 36));
        end
        #1;
        sum = 0; ex = 0;
        for (int i = 0; i < 9; i++) begin
          sum += int'(ref_p[i]);
          ex  += int'(win[i]) * int'(alpha[i]);
        end
        r = sum >> FRAC;
        if (r > 255) begin r = 255; nsat++; end
        ex = ex >> FRAC;
        if (ex > 255) ex = 255;
        exp_pix.push_back(r); exp_exact.push_back(ex); exp_cyc.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    checks++;
    if (exp_pix.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_pix.size()); end
    $display("saturated outputs: %0d", nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
