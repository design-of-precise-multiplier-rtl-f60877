// tb_aha: all inputs of the approximate half adder; carry = a&b, sum = ~(a&b).
module tb_aha;
  logic [1:0] v;
  logic s, co;
  aha dut (.a(v[0]), .b(v[1]), .s(s), .co(co));
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      v = 2'(i);
      #1;
      checks++;
      if (!((co == (v[0] & v[1])) && (s == !(v[0] & v[1])))) begin
        failures++; $display("FAIL in=%b s=%b co=%b", v, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
