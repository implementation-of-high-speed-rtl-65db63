// tmul_pkg: compile-time planning for the fixed-width truncated multiplier.
//
// An N x N unsigned multiplication has 2N partial-product (PP) columns; column c
// has weight 2^c. The fixed-width result keeps the P most significant bits, so
// one unit in the last place (ulp) is column K = 2N-P. The functions below work
// out, from N and P alone, every structural decision the multiplier needs:
//
//   deletion   - the lowest PP bits are never formed, taken greedily from
//                column 0 upward while their total weight stays <= ulp/2
//                (deletion error E_D in [-ulp/2, 0]).
//   bias       - one constant word, (ulp - 1) = columns 0..K-1 all ones, is
//                injected into the PP matrix. It stands for the 1/4 ulp deletion
//                bias, the 1/4 ulp truncation bias and the 1/2 ulp rounding
//                bias, less one unit of column 0 so that the error stays
//                strictly below 1 ulp (a zero operand then gives a zero result).
//   reduction  - Dadda-style column-by-column reduction from the least
//                significant column, counting the carries that arrive from the
//                column below in the same level, with level targets taken from
//                the sequence 2, 3, 4, 6, 9, 13, ... Each level places as few full
//                adders (FA) and half adders (HA) as reach its target height.
//   truncation - after the last level, both rows in columns below TRUNC = K-2
//                are dropped; their value is at most 2^(K-1) - 2 < ulp/2
//                (truncation error E_T in (-ulp/2, 0]). Adders of the last level
//                whose sum would fall there keep only their carry (FC/HC cells).
//
// Deleted weight plus truncated weight never exceeds ulp - 1, so the result
// floor((a*b - deleted - truncated + ulp - 1) / ulp) is always floor(a*b/ulp)
// or that value plus one: a faithfully rounded product.
//
// The functions are evaluated only during elaboration. They recompute the whole
// plan on each call, which is cheap at the sizes supported (N <= MAXN).
package tmul_pkg;

  localparam int MAXN = 32;          // widest operand the planner supports
  localparam int MAXW = 2 * MAXN + 1; // PP columns plus one overflow column
  localparam int MAXL = 12;          // most reduction levels the planner tracks

  // Column holding one ulp of the P-bit result.
  function automatic int ulp_col(int n, int p);
    return 2 * n - p;
  endfunction

  // Columns below this one are dropped after reduction.
  function automatic int trunc_col(int n, int p);
    return 2 * n - p - 2;
  endfunction

  // Lowest and highest multiplicand index i present in column c (j = c - i).
  function automatic int col_lo(int n, int c);
    return (c - n + 1 > 0) ? c - n + 1 : 0;
  endfunction

  function automatic int col_hi(int n, int c);
    return (c < n - 1) ? c : n - 1;
  endfunction

  // Number of PP bits deleted from column c. Bits are deleted in order of
  // increasing weight until the next one would push the total above ulp/2.
  function automatic int del_count_all(int n, int p, int c);
    longint budget;
    longint cum;
    int     cnt;
    budget = longint'(1) << (ulp_col(n, p) - 1);
    cum    = 0;
    for (int cc = 0; cc < 2 * n; cc++) begin
      cnt = 0;
      for (int i = col_lo(n, cc); i <= col_hi(n, cc); i++) begin
        if (cum + (longint'(1) << cc) <= budget) begin
          cum += longint'(1) << cc;
          cnt++;
        end
      end
      if (cc == c) return cnt;
    end
    return 0;
  endfunction

  // Deletion mask: bit i*MAXN+j is 1 when PP bit a[i]&b[j] is formed and 0
  // when it is deleted. Within a column the bits with the smallest multiplicand
  // index i are deleted first.
  typedef logic [MAXN*MAXN-1:0] kept_t;

  function automatic kept_t kept_mask(int n, int p);
    kept_t  m;
    int     cnt;
    m = '0;
    for (int c = 0; c < 2 * n; c++) begin
      cnt = del_count_all(n, p, c);
      for (int i = col_lo(n, c); i <= col_hi(n, c); i++)
        m[i*MAXN + (c-i)] = (i - col_lo(n, c)) >= cnt;
    end
    return m;
  endfunction

  // Bit c of the bias constant ulp - 1.
  function automatic bit bias_bit(int n, int p, int c);
    return c < ulp_col(n, p);
  endfunction

  // Multiplicand index i of the r-th bit of level-0 column c. Kept PP bits come
  // first in order of increasing i, the bias bit last (returned as -1).
  function automatic int init_row_i(kept_t m, int n, int c, int r);
    int k;
    k = 0;
    for (int i = col_lo(n, c); i <= col_hi(n, c); i++) begin
      if (m[i*MAXN + (c-i)]) begin
        if (k == r) return i;
        k++;
      end
    end
    return -1;
  endfunction

  // Dadda target sequence 2, 3, 4, 6, 9, 13, ...
  function automatic int dadda_d(int idx);
    int d;
    d = 2;
    for (int k = 0; k < idx; k++) d = (d * 3) / 2;
    return d;
  endfunction

  // The reduction plan, packed as 8-bit fields:
  //   HEIGHT[l][c] height of column c entering level l (l = 0..MAXL)
  //   FA[l][c], HA[l][c] full / half adders in column c at level l
  //   then the number of levels, the tallest column and an ok flag.
  localparam int PF      = 8;
  localparam int PH_OFF  = 0;
  localparam int PFA_OFF = PH_OFF + (MAXL + 1) * MAXW * PF;
  localparam int PHA_OFF = PFA_OFF + MAXL * MAXW * PF;
  localparam int PX_OFF  = PHA_OFF + MAXL * MAXW * PF;
  localparam int PLAN_BITS = PX_OFF + 3 * PF;
  typedef logic [PLAN_BITS-1:0] plan_t;

  function automatic int plan_height(plan_t pl, int l, int c);
    return int'(pl[PH_OFF + (l * MAXW + c) * PF +: PF]);
  endfunction
  function automatic int plan_fa(plan_t pl, int l, int c);
    return int'(pl[PFA_OFF + (l * MAXW + c) * PF +: PF]);
  endfunction
  function automatic int plan_ha(plan_t pl, int l, int c);
    return int'(pl[PHA_OFF + (l * MAXW + c) * PF +: PF]);
  endfunction
  function automatic int plan_levels(plan_t pl);
    return int'(pl[PX_OFF +: PF]);
  endfunction
  function automatic int plan_maxh(plan_t pl);
    return int'(pl[PX_OFF + PF +: PF]);
  endfunction
  function automatic bit plan_ok(plan_t pl);
    return pl[PX_OFF + 2 * PF];
  endfunction

  // Works out the whole reduction plan.
  function automatic plan_t make_plan(int n, int p);
    int h  [(MAXL+1)*MAXW];   // flattened as [level * MAXW + column]
    int fa [MAXL*MAXW];
    int ha [MAXL*MAXW];
    int w, maxh, nlev, didx, d, cin, e, f, hh, ok, x, cnt;
    longint budget, cum;
    plan_t pl;
    w      = 2 * n;
    maxh   = 0;
    for (int k = 0; k < (MAXL+1)*MAXW; k++) h[k] = 0;
    for (int k = 0; k < MAXL*MAXW; k++) begin
      fa[k] = 0;
      ha[k] = 0;
    end
    // level 0: PP bits left after deletion, plus the bias bit
    budget = longint'(1) << (ulp_col(n, p) - 1);
    cum    = 0;
    for (int cc = 0; cc < w; cc++) begin
      cnt = 0;
      for (int i = col_lo(n, cc); i <= col_hi(n, cc); i++) begin
        if (cum + (longint'(1) << cc) <= budget) cum += longint'(1) << cc;
        else cnt++;
      end
      h[cc] = cnt + (bias_bit(n, p, cc) ? 1 : 0);
      if (h[cc] > maxh) maxh = h[cc];
    end
    // first target: the largest Dadda number below the tallest column
    didx = 0;
    while (dadda_d(didx + 1) < maxh) didx++;
    nlev = (maxh > 2) ? didx + 1 : 0;
    for (int lv = 0; lv < nlev; lv++) begin
      d   = dadda_d(didx - lv);
      cin = 0;
      for (int cc = 0; cc <= w; cc++) begin
        x  = lv * MAXW + cc;
        hh = h[x];
        if (cc < w) begin
          e = hh + cin - d;
          if (e > 0) begin
            f = e / 2;
            if (3 * f > hh) f = hh / 3;
            fa[x] = f;
            if (e - 2 * f > 0 && hh - 3 * f >= 2) ha[x] = 1;
          end
        end
        h[x + MAXW] = hh - 2 * fa[x] - ha[x] + cin;
        if (h[x + MAXW] > maxh) maxh = h[x + MAXW];
        cin = fa[x] + ha[x];
      end
    end
    ok = 1;
    for (int cc = 0; cc < w; cc++) if (h[nlev * MAXW + cc] > 2) ok = 0;
    pl = '0;
    for (int k = 0; k < (MAXL+1)*MAXW; k++) pl[PH_OFF + k * PF +: PF] = PF'(h[k]);
    for (int k = 0; k < MAXL*MAXW; k++) begin
      pl[PFA_OFF + k * PF +: PF] = PF'(fa[k]);
      pl[PHA_OFF + k * PF +: PF] = PF'(ha[k]);
    end
    pl[PX_OFF +: PF]          = PF'(nlev);
    pl[PX_OFF + PF +: PF]     = PF'(maxh);
    pl[PX_OFF + 2 * PF]       = ok[0];
    return pl;
  endfunction

endpackage
