// amul_pkg: shared types and the elaboration-time reduction schedule of the
// approximate n x n multiplier.
//
// The multiplier reduces its partial-product (PP) columns in several stages of
// 4:2 compressors, full adders and half adders until every column holds at most
// two bits. Which cells sit in which column of which stage is not drawn for a
// general n, so this package computes it with a constant function, make_plan(),
// that the multiplier calls once while it is elaborated. The schedule is a Dadda-like
// greedy: stage targets halve (largest power of two below n, then down to 2),
// columns are processed from the least significant one upward, a column keeps
// the carries that arrive from the column below and uses as few cells as it
// takes to get down to the stage target. Stages are added until all columns
// hold two bits or fewer (four stages for n = 8).
//
// Approximate part (the n least significant columns): 4:2 compressors are the
// inexact Exact-Carry / Exact-Sum cells, 3- and 2-bit groups use the
// approximate full and half adders. Exact part (the other n columns): the
// modified exact 4:2 compressor, which also emits a compensation bit E into the
// same column of the next stage, and exact full/half adders.
//
// Area-efficient variants (P_AE, P_AEER): in the last stage the approximate
// columns are reduced to a single bit and their carries are not passed on,
// except the carry of column n-1, which enters the exact part. P_AEER replaces
// that carry by the error-recovery bit E_R (see amul.sv).
//
// The schedule itself (greedy, halving targets) is this design's choice; the
// placement rules (which cell kind in which column and stage) follow the text.
package amul_pkg;

  typedef enum int {
    P_BASIC = 0,  // final 2n-bit ripple-carry addition
    P_AE    = 1,  // carries of the last stage dropped in the approximate part
    P_AEER  = 2   // P_AE plus the error-recovery bit E_R
  } variant_e;

  // fields of the schedule table for one (stage, column)
  typedef enum int {
    F_NSTAGES = 0,  // number of reduction stages (stage and col ignored)
    F_HIN     = 1,  // bits entering the stage in this column
    F_CIN     = 2,  // carries arriving from the column below in this stage
    F_N42     = 3,  // 4:2 compressors in this column
    F_NFA     = 4,  // full adders (exact or approximate)
    F_NHA     = 5,  // half adders (exact or approximate)
    F_NE      = 6,  // compensation bits E produced (exact part only)
    F_HOUT    = 7,  // bits leaving the stage in this column
    F_MAXH    = 8   // largest column height anywhere (stage and col ignored)
  } plan_field_e;

  localparam int MAXCOL = 32;  // supports n up to 16

  // bits that can be removed from p bits with full adders and at most one
  // half adder (used so that a 4:2 choice never blocks reaching the target)
  function automatic int max_reduction(input int p);
    return (p / 3) * 2 + ((p % 3 == 2) ? 1 : 0);
  endfunction

  function automatic int pp_height(input int n, input int j);
    if (j >= 2 * n - 1) return 0;
    return (j + 1 < 2 * n - 1 - j) ? j + 1 : 2 * n - 1 - j;
  endfunction

  localparam int MAXST = 8;   // reduction stages supported

  // full schedule: tab[s][j][field] for stage s (1..K) and column j;
  // tab[0][0][F_NSTAGES] = K and tab[0][0][F_MAXH] = largest column height
  typedef logic [MAXST:0][MAXCOL-1:0][8:0][7:0] plan_tab_t;  // packed: cheap to copy

  // Runs the schedule twice: the first pass (plain schedule, every stage the
  // same) finds the number of stages K needed to bring every column down to
  // two bits; the second pass runs K stages, treats stage K as the last one
  // (where the area-efficient variants differ) and records every cell count.
  function automatic plan_tab_t make_plan(input int n, input int variant);
    plan_tab_t tab;
    int h  [MAXCOL];
    int nh [MAXCOL];
    int t, cin, p, loc, n42, nfa, nha, ne, ex, tt, c, ops, mx, maxh, kfix, ns;
    bit approx, fin, done;
    for (int s = 0; s <= MAXST; s++)
      for (int j = 0; j < MAXCOL; j++)
        for (int f = 0; f < 9; f++) tab[s][j][f] = '0;
    kfix = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int j = 0; j < MAXCOL; j++) h[j] = pp_height(n, j);
      maxh = n;
      t = 1;
      while (t * 2 < n) t = t * 2;
      if (t < 2) t = 2;
      done = 0;
      ns = 0;
      for (int s = 1; s <= MAXST && !done; s++) begin
        mx = 0;
        for (int j = 0; j < 2 * n; j++) if (h[j] > mx) mx = h[j];
        if ((pass == 0 && mx <= 2) || (pass == 1 && s > kfix)) begin
          done = 1;
        end else begin
          ns = s;
          fin = (pass == 1) && (s == kfix) && (variant != P_BASIC);
          cin = 0;
          for (int j = 0; j < 2 * n; j++) begin
            approx = (j < n);
            p = h[j]; n42 = 0; nfa = 0; nha = 0; ne = 0; loc = 0;
            c  = cin;
            tt = t;
            if (fin && approx) begin
              c  = 0;
              tt = 1;
            end
            while (c + p + loc > tt && p >= 2) begin
              ex = c + p + loc - tt;
              if (approx) begin
                if (p >= 4 && ex >= 3)      begin n42++; p -= 4; loc += 1; end
                else if (p >= 3 && ex >= 2) begin nfa++; p -= 3; loc += 1; end
                else if (p >= 4)            begin n42++; p -= 4; loc += 1; end
                else                        begin nha++; p -= 2; loc += 1; end
              end else begin
                if (p >= 4 && ex >= 2 && max_reduction(p - 4) >= ex - 2)
                                            begin n42++; ne++; p -= 4; loc += 2; end
                else if (p >= 3 && ex >= 2) begin nfa++; p -= 3; loc += 1; end
                else                        begin nha++; p -= 2; loc += 1; end
              end
            end
            nh[j] = c + p + loc;
            if (nh[j] > maxh) maxh = nh[j];
            tab[s][j][F_HIN]  = 8'(h[j]);
            tab[s][j][F_CIN]  = 8'(c);
            tab[s][j][F_N42]  = 8'(n42);
            tab[s][j][F_NFA]  = 8'(nfa);
            tab[s][j][F_NHA]  = 8'(nha);
            tab[s][j][F_NE]   = 8'(ne);
            tab[s][j][F_HOUT] = 8'(nh[j]);
            ops = n42 + nfa + nha;
            if (fin && approx && j < n - 1) cin = 0;  // carries not generated
            else if (fin && j == n - 1 && variant == P_AEER && ops == 0) cin = 1;  // slot for E_R
            else cin = ops;
          end
          for (int j = 0; j < MAXCOL; j++) h[j] = (j < 2 * n) ? nh[j] : 0;
          t = (t / 2 < 2) ? 2 : t / 2;
        end
      end
      kfix = ns;
    end
    tab[0][0][F_NSTAGES] = 8'(kfix);
    tab[0][0][F_MAXH]    = 8'(maxh);
    return tab;
  endfunction

endpackage
