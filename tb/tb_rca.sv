// tb_rca: random and corner vectors for the final-stage ripple-carry adder.
// An all-exact instance (NAPPROX = 0) must equal x + y + ci. In the default
// instance (low 8 positions approximate) the carries stay exact, so each low
// sum bit must be x | y | carry-in of that position, with the carries taken
// from the exact addition, and the high bits must equal the exact sum.
module tb_rca;
  localparam int W = 16;
  logic [W-1:0] x, y, s_ex, s_ap;
  logic ci, co_ex, co_ap;
  int checks = 0, failures = 0;

  rca #(.W(W), .NAPPROX(0)) u_ex (.x(x), .y(y), .ci(ci), .sum(s_ex), .co(co_ex));
  rca u_ap (.x(x), .y(y), .ci(ci), .sum(s_ap), .co(co_ap));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] ref_sum;
    logic [W-1:0] cy, want;
    for (int i = 0; i < 3000; i++) begin
      if (i < 4) begin
        x = (i[0]) ? '1 : '0; y = (i[1]) ? '1 : '0;
      end else begin
        x = W'($urandom); y = W'($urandom);
      end
      ci = 1'($urandom);
      #1;
      ref_sum = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, ci};
      checks++;
      if ({co_ex, s_ex} != ref_sum) begin
        failures++; $display("FAIL exact %h + %h + %b = %h got %h", x, y, ci, ref_sum, {co_ex, s_ex});
      end
      cy   = ref_sum[W-1:0] ^ x ^ y;   // carry into each position
      want = ref_sum[W-1:0];
      for (int b = 0; b < 8; b++) want[b] = x[b] | y[b] | cy[b];
      checks++;
      if (s_ap != want || co_ap != ref_sum[W]) begin
        failures++; $display("FAIL approx %h + %h + %b: want %h got %h", x, y, ci, want, s_ap);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
