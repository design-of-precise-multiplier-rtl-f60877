// tb_c42_es: applies all 16 inputs to the exact-sum 4:2 compressor. The sum
// must be the parity; s + 2c must equal the number of ones except for
// (a4..a1) 0000 -> 2, 0111 -> 1, 1000 -> 3 and 1111 -> 2.
module tb_c42_es;
  logic [3:0] a;
  logic s, c;
  c42_es dut (.a(a), .s(s), .c(c));
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
        case (a)
          4'b0000: want = 2;
          4'b0111: want = 1;
          4'b1000: want = 3;
          4'b1111: want = 2;
          default: want = ones;
        endcase
        checks++;
        if (s != ones[0] || int'(s) + 2 * int'(c) != want) begin
          failures++; $display("FAIL a=%b s=%b c=%b want %0d", a, s, c, want);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
