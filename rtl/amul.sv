// amul: n x n unsigned approximate multiplier built from inexact 4:2
// compressors (Proposed-basic, P-AE and P-AEER variants).
//
// The n*n partial products a[i]&b[k] are arranged in 2n columns by weight and
// reduced stage by stage until every column holds at most two bits
// (schedule: amul_pkg::make_plan, four stages for n = 8). The n least significant
// columns form the approximate part. Proposed-basic uses the exact-carry
// compressor (c42_ec) there throughout. The area-efficient variants use c42_ec
// in the first stage and the exact-sum compressor (c42_es) in later stages,
// except in column n-1, whose carry enters the exact part and therefore stays
// exact-carry. 3- and 2-bit groups there use afa/aha. The n most significant columns form the
// exact part: the modified exact compressor (c42_modexact) with its
// compensation bit, exact full and half adders.
//
// Final stage, selected by VARIANT:
//   P_BASIC  2n-bit ripple-carry adder over both rows (afa cells in the low n
//            positions, exact cells above).
//   P_AE     the last stage leaves one bit in each approximate column and drops
//            the carries it would produce there (only column n-1 passes its
//            carry on); product bits 0..n-1 are those single bits and an n-bit
//            exact ripple-carry adder adds the two rows of the exact part.
//   P_AEER   as P_AE, but the last-stage carries of the n/4 columns below
//            column n-1 are also formed and the bit entering column n becomes
//            E_R = C(n-1) | (C(n-2) & ... & C(n-1-n/4)), i.e. for n = 8
//            E_R = C7 | (C6 & C5).
// Errors come only from the approximate part; with this schedule the product
// differs from a*b by less than 2^(n+2) (largest error 696 to 708 for n = 8). The
// inexact cells set output bits for all-zero inputs, so the error is mostly a
// positive bias and 0 x 0 is not 0. The carry out of the top column is dropped.
// Purely combinational; a, b in, p out in the same cycle.
//
// The cell kinds, their placement rules, the final-stage variants and E_R
// follow the source description; the exact column-by-column schedule for a
// general n is this design's own (see amul_pkg).
module amul
  import amul_pkg::*;
#(
  parameter int unsigned N       = 8,        // operand width n
  parameter variant_e    VARIANT = P_BASIC   // final-stage variant
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam plan_tab_t PLAN = make_plan(N, VARIANT);
  localparam int K    = int'(PLAN[0][0][F_NSTAGES]);
  localparam int MAXH = int'(PLAN[0][0][F_MAXH]) + 1;
  localparam int NC   = 2 * N;
  localparam int NER  = (N / 4 < 1) ? 1 : N / 4;  // carries ANDed into E_R

  logic            er_bit;    // error-recovery bit (P_AEER), else C(n-1)

  // g_st[s].g_col[j].v : bits of column j after stage s (stage 0 = partial
  //                      products)
  // g_st[s].g_col[j].c : carries produced by the cells of column j in stage s
  for (genvar s = 0; s <= K; s++) begin : g_st
    for (genvar j = 0; j < NC; j++) begin : g_col
      wire [MAXH-1:0] v;
      wire [MAXH-1:0] c;

      if (s == 0) begin : g_pp
        // ---- partial products ----
        localparam int H  = pp_height(N, j);
        localparam int I0 = (j > N - 1) ? j - (N - 1) : 0;  // lowest a index
        for (genvar i = 0; i < MAXH; i++) begin : g_b
          if (i < H) begin : g_on
            assign v[i] = a[I0 + i] & b[j - I0 - i];
          end else begin : g_off
            assign v[i] = 1'b0;
          end
        end
        assign c = '0;
      end else begin : g_red
        // ---- one reduction stage of one column ----
        localparam int HIN  = int'(PLAN[s][j][F_HIN]);
        localparam int CIN  = int'(PLAN[s][j][F_CIN]);
        localparam int N42  = int'(PLAN[s][j][F_N42]);
        localparam int NFA  = int'(PLAN[s][j][F_NFA]);
        localparam int NHA  = int'(PLAN[s][j][F_NHA]);
        localparam int NE   = int'(PLAN[s][j][F_NE]);
        localparam int HOUT = int'(PLAN[s][j][F_HOUT]);
        localparam int NOPS = N42 + NFA + NHA;
        localparam int USED = 4 * N42 + 3 * NFA + 2 * NHA;  // input bits consumed
        localparam int NPASS = HIN - USED;
        // output order: carries in | 4:2 sums | E bits | FA sums | HA sums | pass
        localparam int O42 = CIN;
        localparam int OE  = O42 + N42;
        localparam int OFA = OE + NE;
        localparam int OHA = OFA + NFA;
        localparam int OPS = OHA + NHA;
        localparam bit APPROX = (j < N);
        localparam bit USE_EC = (VARIANT == P_BASIC) || (s == 1) || (j == N - 1);

        logic [MAXH-1:0] in;
        assign in = g_st[s-1].g_col[j].v;

        // carries from the column below (this stage)
        for (genvar i = 0; i < CIN; i++) begin : g_cin
          if (j == N && i == 0 && s == K && VARIANT == P_AEER) begin : g_er
            assign v[i] = er_bit;
          end else begin : g_c
            assign v[i] = g_col[j-1].c[i];
          end
        end

        for (genvar k = 0; k < N42; k++) begin : g_c42
          if (!APPROX) begin : g_ex
            c42_modexact u_c (.a(in[4*k +: 4]), .s(v[O42+k]), .c(c[k]), .e(v[OE+k]));
          end else if (USE_EC) begin : g_ec
            c42_ec u_c (.a(in[4*k +: 4]), .s(v[O42+k]), .c(c[k]));
          end else begin : g_es
            c42_es u_c (.a(in[4*k +: 4]), .s(v[O42+k]), .c(c[k]));
          end
        end

        for (genvar k = 0; k < NFA; k++) begin : g_fa
          localparam int B = 4 * N42 + 3 * k;
          if (APPROX) begin : g_ap
            afa u_c (.a(in[B]), .b(in[B+1]), .ci(in[B+2]), .s(v[OFA+k]), .co(c[N42+k]));
          end else begin : g_ex
            fa  u_c (.a(in[B]), .b(in[B+1]), .ci(in[B+2]), .s(v[OFA+k]), .co(c[N42+k]));
          end
        end

        for (genvar k = 0; k < NHA; k++) begin : g_ha
          localparam int B = 4 * N42 + 3 * NFA + 2 * k;
          if (APPROX) begin : g_ap
            aha u_c (.a(in[B]), .b(in[B+1]), .s(v[OHA+k]), .co(c[N42+NFA+k]));
          end else begin : g_ex
            ha  u_c (.a(in[B]), .b(in[B+1]), .s(v[OHA+k]), .co(c[N42+NFA+k]));
          end
        end

        for (genvar i = 0; i < NPASS; i++) begin : g_pass
          assign v[OPS+i] = in[USED+i];
        end
        for (genvar i = HOUT; i < MAXH; i++) begin : g_vz
          assign v[i] = 1'b0;
        end
        for (genvar i = NOPS; i < MAXH; i++) begin : g_cz
          assign c[i] = 1'b0;
        end
      end
    end
  end

  // ---- error recovery (P_AEER) ----
  // er_chain[i]: AND of the last-stage carries of columns n-2 .. n-1-i
  logic [NER:0] er_chain;
  assign er_chain[0] = 1'b1;
  for (genvar i = 1; i <= NER; i++) begin : g_er
    assign er_chain[i] = er_chain[i-1] & g_st[K].g_col[N-1-i].c[0];
  end
  assign er_bit = g_st[K].g_col[N-1].c[0] | er_chain[NER];

  // ---- final addition ----
  logic [MAXH-1:0] col_final [NC];
  for (genvar j = 0; j < NC; j++) begin : g_last
    assign col_final[j] = g_st[K].g_col[j].v;
  end
  logic [NC-1:0] row0, row1;
  always_comb begin
    for (int j = 0; j < NC; j++) begin
      row0[j] = col_final[j][0];
      row1[j] = col_final[j][1];
    end
  end

  if (VARIANT == P_BASIC) begin : g_fin_basic
    logic co_unused;
    rca #(.W(NC), .NAPPROX(N)) u_rca (
      .x(row0), .y(row1), .ci(1'b0), .sum(p), .co(co_unused));
  end else begin : g_fin_ae
    logic co_unused;
    logic [N-1:0] hi;
    rca #(.W(N), .NAPPROX(0)) u_rca (
      .x(row0[NC-1:N]), .y(row1[NC-1:N]), .ci(1'b0), .sum(hi), .co(co_unused));
    assign p = {hi, row0[N-1:0]};
  end

endmodule
