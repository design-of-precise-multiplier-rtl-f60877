// tb_afa: all inputs of the approximate full adder; carry = majority,
// sum = OR of the inputs.
module tb_afa;
  logic [2:0] v;
  logic s, co;
  afa dut (.a(v[0]), .b(v[1]), .ci(v[2]), .s(s), .co(co));
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      v = 3'(i);
      #1;
      checks++;
      if (!((co == ($countones(v) >= 2)) && (s == ($countones(v) != 0)))) begin
        failures++; $display("FAIL in=%b s=%b co=%b", v, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
