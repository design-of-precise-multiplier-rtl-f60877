// tb_fir27: streams random signed samples through the 27-tap FIR filter with
// random signed coefficients and idle cycles, and checks every output:
//   * it appears one cycle after its sample;
//   * it equals the reference sum over the taps of sign * approx(|h| * |x|)
//     computed here with a delay line of its own and reference multipliers;
//   * it lies within the error budget of the exact convolution (27 products,
//     each off by less than 2^(n+2)).
// It also checks that negative products occurred. A watchdog bounds the run.
module tb_fir27;
  import amul_pkg::*;
  localparam int TAPS = 27, N = 8, YW = 2 * N + $clog2(TAPS);
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [N-1:0] x_in = '0;
  logic signed [N-1:0] coef [TAPS];
  logic out_valid;
  logic signed [YW-1:0] y_out;
  logic signed [N-1:0] hist [TAPS];   // hist[t] = x[k-t]
  logic [N-1:0] ma [TAPS], mb [TAPS];
  logic [2*N-1:0] rp [TAPS];
  int checks = 0, failures = 0, nneg = 0;

  fir27 #(.TAPS(TAPS), .N(N), .VARIANT(P_BASIC)) dut (
    .clk, .rst_n, .in_valid, .x_in, .coef, .out_valid, .y_out);
  for (genvar t = 0; t < TAPS; t++) begin : g_ref
    amul #(.N(N), .VARIANT(P_BASIC)) u_ref (.a(ma[t]), .b(mb[t]), .p(rp[t]));
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
  longint exp_y [$];
  longint exp_x [$];
  int exp_c [$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint e, x;
      int c;
      e = exp_y.pop_front(); x = exp_x.pop_front(); c = exp_c.pop_front();
      checks++;
      if (cyc - c != 1) begin failures++; $display("FAIL latency %0d", cyc - c); end
      checks++;
      if (longint'(y_out) != e) begin failures++; $display("FAIL y=%0d want %0d", y_out, e); end
      checks++;
      if (longint'(y_out) - x > 27 * 1024 || x - longint'(y_out) > 27 * 1024) begin
        failures++; $display("FAIL y=%0d far from exact %0d", y_out, x);
      end
    end
  end

  initial begin
    longint acc, ex;
    for (int t = 0; t < TAPS; t++) begin
      coef[t] = N'($urandom);
      hist[t] = '0;
    end
    coef[0] = -128;   // most negative coefficient
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        in_valid = 0;
      end else begin
        in_valid = 1;
        x_in = (n == 10) ? -128 : N'($urandom);
        for (int t = TAPS - 1; t > 0; t--) hist[t] = hist[t-1];
        hist[0] = x_in;
        for (int t = 0; t < TAPS; t++) begin
          ma[t] = hist[t][N-1] ? N'(-hist[t]) : N'(hist[t]);
          mb[t] = coef[t][N-1] ? N'(-coef[t]) : N'(coef[t]);
        end
        #1;
        acc = 0; ex = 0;
        for (int t = 0; t < TAPS; t++) begin
          if (hist[t][N-1] ^ coef[t][N-1]) begin acc -= longint'(rp[t]); nneg++; end
          else acc += longint'(rp[t]);
          ex += longint'(hist[t]) * longint'(coef[t]);
        end
        exp_y.push_back(acc); exp_x.push_back(ex); exp_c.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (nneg == 0) begin failures++; $display("FAIL no negative products"); end
    checks++;
    if (exp_y.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_y.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
