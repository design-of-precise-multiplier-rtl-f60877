// tb_c42_modexact: applies all 16 inputs to the modified exact 4:2 compressor
// and checks s + 2c + e against the number of ones, and e against A1&A2&A3&A4.
module tb_c42_modexact;
  logic [3:0] a;
  logic s, c, e;
  c42_modexact dut (.a(a), .s(s), .c(c), .e(e));
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, want;
    for (int i = 0; i < 16; i++) begin
      a = 4'(i);
      #1;
      ones = $countones(a);
      want = ones;
        checks++;
        if (int'(s) + 2 * int'(c) + int'(e) != ones || e != (ones == 4)) begin
          failures++; $display("FAIL a=%b s=%b c=%b e=%b", a, s, c, e);
        end
        checks++;
        if (ones == 4 && !(s && c)) begin
          failures++; $display("FAIL 1111 must give s=c=1");
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
