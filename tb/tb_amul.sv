// tb_amul: exhaustive test of the 8 x 8 approximate multiplier in all three
// variants (Proposed-basic, P-AE, P-AEER).
//
// Every pair of operands is applied. Checks, against a*b computed here:
//   * the error of each product stays below 2^(n+2) (the bound of this
//     schedule; see the design notes on the maximum error);
//   * the mean error distance (MED) of each variant lies between 2^(n-3) and
//     2^n (the design is approximate, not exact, and close);
//   * the exact part adds exactly: when a and b are multiples of 2^(n/2) all
//     partial products of the approximate columns are zero, so the error
//     must equal the constant bias the approximate part shows for 0 x 0;
//   * the three variants differ from one another on some inputs (the final
//     stage variants are really different).
// A watchdog ends the run if it takes too long.
module tb_amul;
  import amul_pkg::*;
  localparam int N = 8;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p_basic, p_ae, p_aeer;
  int checks = 0, failures = 0;

  amul #(.N(N), .VARIANT(P_BASIC)) u_basic (.a(a), .b(b), .p(p_basic));
  amul #(.N(N), .VARIANT(P_AE))    u_ae    (.a(a), .b(b), .p(p_ae));
  amul #(.N(N), .VARIANT(P_AEER))  u_aeer  (.a(a), .b(b), .p(p_aeer));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint absdiff(input longint x, input longint y);
    return (x > y) ? x - y : y - x;
  endfunction

  initial begin
    longint ed_sum [3];
    longint ed_max [3];
    longint red_sum_x1e6 [3];
    int diff_ae = 0, diff_er = 0;
    longint ex, e;
    for (int v = 0; v < 3; v++) begin ed_sum[v] = 0; ed_max[v] = 0; red_sum_x1e6[v] = 0; end
    for (int i = 0; i < (1 << N); i++) begin
      for (int k = 0; k < (1 << N); k++) begin
        a = N'(i); b = N'(k);
        #1;
        ex = longint'(i) * longint'(k);
        for (int v = 0; v < 3; v++) begin
          longint pv;
          pv = (v == 0) ? longint'(p_basic) : (v == 1) ? longint'(p_ae) : longint'(p_aeer);
          e = absdiff(pv, ex);
          ed_sum[v] += e;
          if (e > ed_max[v]) ed_max[v] = e;
          if (ex != 0) red_sum_x1e6[v] += (e * 1000000) / ex;
          checks++;
          if (e >= (longint'(1) << (N + 2))) begin
            failures++;
            if (failures < 10)
              $display("FAIL variant %0d: %0d x %0d = %0d, got %0d", v, i, k, ex, pv);
          end
        end
        if (p_ae != p_basic) diff_ae++;
        if (p_aeer != p_ae) diff_er++;
      end
    end
    for (int v = 0; v < 3; v++) begin
      $display("variant %0d: MED=%0.1f max ED=%0d MRED=%0.4f", v,
               real'(ed_sum[v]) / 65536.0, ed_max[v],
               real'(red_sum_x1e6[v]) / 1.0e6 / 65535.0);
      checks++;
      if (ed_sum[v] / 65536 < (1 << (N - 3)) || ed_sum[v] / 65536 >= (1 << N)) begin
        failures++;
        $display("FAIL variant %0d: MED out of range", v);
      end
    end
    // exact part: constant bias for operands with empty approximate columns
    begin
      longint bias [3];
      a = '0; b = '0; #1;
      bias[0] = longint'(p_basic); bias[1] = longint'(p_ae); bias[2] = longint'(p_aeer);
      for (int x = 0; x < (1 << (N / 2)); x++) begin
        for (int y = 0; y < (1 << (N / 2)); y++) begin
          a = N'(x << (N / 2)); b = N'(y << (N / 2)); #1;
          ex = longint'(a) * longint'(b);
          for (int v = 0; v < 3; v++) begin
            longint pv;
            pv = (v == 0) ? longint'(p_basic) : (v == 1) ? longint'(p_ae) : longint'(p_aeer);
            checks++;
            if (pv - ex != bias[v]) begin
              failures++;
              if (failures < 20)
                $display("FAIL exact part, variant %0d: %0d x %0d = %0d, got %0d (bias %0d)",
                         v, a, b, ex, pv, bias[v]);
            end
          end
        end
      end
    end
    checks++;
    if (diff_ae == 0) begin failures++; $display("FAIL: P-AE equals basic everywhere"); end
    checks++;
    if (diff_er == 0) begin failures++; $display("FAIL: P-AEER equals P-AE everywhere"); end
    $display("products differing basic/AE: %0d, AE/AEER: %0d", diff_ae, diff_er);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
