// mcm_pkg: types and elaboration-time planning for a multiple constant
// multiplication (MCM) block built from shifts, adders/subtracters and
// delay registers.
//
// Everything in this package runs while the design elaborates; none of it
// becomes hardware. Given a table of fixed filter coefficients it
//   1. recodes each coefficient in canonic signed digit (CSD) form,
//   2. merges coefficients of equal magnitude (they share one product) and
//      drops zero coefficients,
//   3. runs the approximate horizontal common subexpression elimination:
//      it repeatedly takes the most frequent two-digit pattern of span 3, 4
//      or 5 digits ([101], [10-1], [1001], [100-1], [10001], [1000-1] and
//      their negations) and extracts every occurrence of it, until no
//      pattern occurs twice,
//   4. pairs the digits that remain with the digit in the same column of the
//      tap h places later (both taps with a coefficient magnitude that occurs
//      only once, so merged products stay merged) (vertical subexpression x[n] +/- x[n-h], h = 1, 2,
//      3 in turn), keeping a pair kind only if it lowers the cost
//      CF = beta*Nreg + gamma*Nas.
// The result is a plan: for every tap and digit column, which term (single
// digit, horizontal pattern, vertical pair) is added there and with what
// sign. The modules read the plan through generate blocks.
//
// Following the method: the CSD form, the pattern set of span 3 to 5, the
// horizontal-first-then-vertical order, the merging of equal coefficients and
// the cost weights gamma = 1.0, beta = 0.6. Choices of this design: patterns
// are ranked by how many non-overlapping occurrences a least-significant-
// first scan finds, vertical pairs are at most three samples tall and taken
// shortest first, and a pair kind is kept when its pairs save more than its
// adder plus the registers it adds to the delay line.
package mcm_pkg;

  localparam int MAX_TAPS = 256;  // largest number of taps a plan can hold
  localparam int MAX_DIG  = 16;   // CSD digit columns per coefficient
  localparam int N_HPAT   = 6;    // horizontal patterns, ids 1..6
  localparam int MAX_VH   = 3;    // tallest vertical pair, in samples
  localparam int N_VTERM  = 2 * MAX_VH + 1;  // vertical term slots, index 0 unused

  // Cost weights of CF, in tenths (gamma = 1.0 per adder, beta = 0.6 per register).
  localparam int GAMMA10 = 10;
  localparam int BETA10  = 6;

  localparam int CW = 16;         // bits per entry of a coefficient table

  // Coefficient table: entry k is the signed coefficient of tap k. Packed,
  // so that elaboration-time functions can take and return it whole.
  typedef logic [MAX_TAPS-1:0][CW-1:0] coef_tab_t;

  // CSD digits of one coefficient (+1, 0, -1 as 2-bit signed values), and
  // of all taps.
  typedef logic signed [1:0]             dig_t;
  typedef dig_t    [MAX_DIG-1:0]         digits_t;
  typedef digits_t [MAX_TAPS-1:0]        dmat_t;

  typedef enum logic [1:0] {
    V_NONE = 2'd0,   // no vertical term in this column
    V_SUM  = 2'd1,   // x[n] + x[n-h]
    V_DIFF = 2'd2    // x[n] - x[n-h]
  } vkind_e;

  // One digit column of one tap after CSE. Up to three terms may start here.
  typedef struct packed {
    logic       s_nz;    // a single digit +/-1 is left in this column
    logic       s_neg;   //   ... and it is -1
    logic [2:0] h_pat;   // horizontal pattern id anchored at this column, 0: none
    logic       h_neg;   //   ... subtracted rather than added
    vkind_e     v_kind;  // vertical pair anchored at this column
    logic [1:0] v_h;     //   ... of height h = 1 .. MAX_VH (taps k and k+h)
    logic       v_neg;   //   ... subtracted rather than added
  } term_t;

  typedef term_t [MAX_DIG-1:0] row_t;
  typedef row_t [MAX_TAPS-1:0] plan_t;

  // ---------------------------------------------------------------------
  // Horizontal patterns. Id p in 1..6 has span L = 2, 2, 3, 3, 4, 4 digit
  // positions between its two nonzero digits, and value 2^L + 1 for odd p
  // ([101], [1001], [10001]) or 2^L - 1 for even p ([10-1], [100-1], [1000-1]).
  // ---------------------------------------------------------------------
  function automatic int hpat_len(int p);
    return 2 + (p - 1) / 2;
  endfunction

  function automatic bit hpat_plus(int p);
    return ((p - 1) % 2) == 0;
  endfunction

  function automatic int hpat_value(int p);
    return hpat_plus(p) ? (1 << hpat_len(p)) + 1 : (1 << hpat_len(p)) - 1;
  endfunction

  // Slot of vertical term kind v, height h, in the vertical term array.
  function automatic int vidx(vkind_e v, int h);
    return 2 * (h - 1) + int'(v);
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // Coefficient of tap k.
  function automatic int coef_at(coef_tab_t c, int k);
    return int'(signed'(c[k]));
  endfunction

  // CSD recoding of the magnitude; a negative value gets every digit negated,
  // so that c and -c have mirror-image rows.
  function automatic digits_t csd(int value);
    digits_t d;
    int v;
    v = iabs(value);
    d = '0;
    for (int j = 0; j < MAX_DIG; j++) begin
      if (v % 2 != 0) begin
        d[j] = ((v % 4) == 1) ? 2'sd1 : -2'sd1;
        v    = v - int'(d[j]);
      end
      v = v / 2;
    end
    if (value < 0)
      for (int j = 0; j < MAX_DIG; j++) d[j] = -d[j];
    return d;
  endfunction

  // Number of nonzero CSD digits.
  function automatic int csd_weight(int value);
    digits_t d;
    int w;
    d = csd(value);
    w = 0;
    for (int j = 0; j < MAX_DIG; j++) if (d[j] != 0) w++;
    return w;
  endfunction

  // Random coefficient set for examples and tests: a symmetric (linear
  // phase) filter with B-bit signed coefficients, roughly one in twelve
  // of them zero, taps from n on zero. A 32-bit linear congruential
  // generator (multiplier 1664525, increment 1013904223) drives it.
  function automatic coef_tab_t random_coefs(int unsigned seed, int n, int b);
    coef_tab_t c;
    int unsigned s;
    int lim;
    s   = seed;
    lim = (1 << (b - 1)) - 1;
    c = '0;
    for (int k = 0; k < (n + 1) / 2; k++) begin
      s = s * 32'd1664525 + 32'd1013904223;
      if (((s >> 20) % 12) == 0) c[k] = '0;
      else c[k] = CW'(int'((s >> 8) % unsigned'(2 * lim + 1)) - lim);
      c[n - 1 - k] = c[k];
    end
    return c;
  endfunction

  // A coefficient is primary when no earlier tap has the same magnitude.
  function automatic bit is_primary(coef_tab_t c, int k);
    if (c[k] == '0) return 1'b0;
    for (int m = 0; m < k; m++) if (iabs(coef_at(c, m)) == iabs(coef_at(c, k))) return 1'b0;
    return 1'b1;
  endfunction

  // Does pattern p occur at column j of the digit row?
  function automatic bit hpat_at(digits_t d, int p, int j);
    int l;
    l = hpat_len(p);
    if (j + l >= MAX_DIG) return 1'b0;
    if (d[j] == 0 || d[j + l] == 0) return 1'b0;
    return hpat_plus(p) ? (d[j] == d[j + l]) : (d[j] == -d[j + l]);
  endfunction

  // Occurrences of pattern p in a row, scanning from the least significant
  // column and consuming the digits of each occurrence.
  function automatic int hpat_count(digits_t d, int p);
    int cnt;
    cnt = 0;
    for (int j = 0; j < MAX_DIG; j++)
      if (hpat_at(d, p, j)) begin
        d[j] = 0;
        d[j + hpat_len(p)] = 0;
        cnt++;
      end
    return cnt;
  endfunction

  // ---------------------------------------------------------------------
  // The plan.
  // ---------------------------------------------------------------------
  function automatic plan_t make_plan(coef_tab_t c, int n);
    plan_t   pl;
    dmat_t   d;
    int      best, bestf, f, cnt_sum, cnt_diff, kind, regs, newreg;
    bit      en_sum, en_diff, done;
    bit      prim [MAX_TAPS];
    bit      solo [MAX_TAPS];

    for (int k = 0; k < MAX_TAPS; k++) begin
      pl[k]   = '0;
      prim[k] = (k < n) && is_primary(c, k);
      d[k]    = (k < n) ? csd(coef_at(c, k)) : '0;
    end

    // Approximate horizontal CSE: most frequent 3-5 digit pattern first.
    done = 1'b0;
    for (int iter = 0; iter < 4 * MAX_DIG && !done; iter++) begin
      best  = 0;
      bestf = 1;
      for (int p = 1; p <= N_HPAT; p++) begin
        f = 0;
        for (int k = 0; k < n; k++)
          if (prim[k]) f += hpat_count(d[k], p);
        if (f > bestf) begin
          best  = p;
          bestf = f;
        end
      end
      if (best == 0) done = 1'b1;
      else
        for (int k = 0; k < n; k++)
          for (int j = 0; j < MAX_DIG; j++)
            if (hpat_at(d[k], best, j)) begin
              pl[k][j].h_pat = 3'(best);
              pl[k][j].h_neg = d[k][j + hpat_len(best)] < 0;
              d[k][j] = 0;
              d[k][j + hpat_len(best)] = 0;
            end
    end

    // Only taps whose coefficient magnitude occurs once take part in vertical
    // pairs: the others are merged products, which a pair would split.
    for (int k = 0; k < MAX_TAPS; k++) begin
      solo[k] = prim[k];
      for (int m = k + 1; m < n; m++)
        if (solo[k] && iabs(coef_at(c, m)) == iabs(coef_at(c, k))) solo[k] = 1'b0;
    end

    // Vertical CSE of the digits left, height 1 first, then 2, 3. For each
    // height, count the pairs each kind would get. Each pair saves one
    // adder; a kind costs one adder, and the first kind that needs a longer
    // delay line pays for its extra registers.
    regs = 0;
    for (int h = 1; h <= MAX_VH; h++) begin
      dmat_t dd;
      cnt_sum  = 0;
      cnt_diff = 0;
      dd       = d;
      for (int k = 0; k + h < n; k++)
        for (int j = 0; j < MAX_DIG; j++)
          if (solo[k] && solo[k + h] && dd[k][j] != 0 && dd[k + h][j] != 0) begin
            if (dd[k][j] == dd[k + h][j]) cnt_sum++;
            else cnt_diff++;
            dd[k][j]     = 0;
            dd[k + h][j] = 0;
          end
      newreg  = (h > regs) ? h - regs : 0;
      en_sum  = cnt_sum * GAMMA10 > GAMMA10 + BETA10 * newreg;
      en_diff = cnt_diff * GAMMA10 > GAMMA10 + (en_sum ? 0 : BETA10 * newreg);
      if (en_sum || en_diff) regs = h;

      for (int k = 0; k + h < n; k++)
        for (int j = 0; j < MAX_DIG; j++)
          if (solo[k] && solo[k + h] && d[k][j] != 0 && d[k + h][j] != 0) begin
            kind = (d[k][j] == d[k + h][j]) ? 1 : 2;
            if ((kind == 1 && en_sum) || (kind == 2 && en_diff)) begin
              pl[k][j].v_kind = vkind_e'(kind);
              pl[k][j].v_h    = 2'(h);
              pl[k][j].v_neg  = d[k][j] < 0;
              d[k][j]         = 0;
              d[k + h][j]     = 0;
            end
          end
    end

    // Whatever is left is added digit by digit.
    for (int k = 0; k < n; k++)
      for (int j = 0; j < MAX_DIG; j++)
        if (d[k][j] != 0) begin
          pl[k][j].s_nz  = 1'b1;
          pl[k][j].s_neg = d[k][j] < 0;
        end
    return pl;
  endfunction

  // ---------------------------------------------------------------------
  // Queries on a plan.
  // ---------------------------------------------------------------------
  function automatic row_t plan_row(plan_t pl, int k);
    return pl[k];
  endfunction

  function automatic row_t row_negate(row_t r);
    for (int j = 0; j < MAX_DIG; j++) begin
      if (r[j].s_nz)             r[j].s_neg = ~r[j].s_neg;
      if (r[j].h_pat != 3'd0)    r[j].h_neg = ~r[j].h_neg;
      if (r[j].v_kind != V_NONE) r[j].v_neg = ~r[j].v_neg;
    end
    return r;
  endfunction

  function automatic int row_terms(row_t r);
    int t;
    t = 0;
    for (int j = 0; j < MAX_DIG; j++)
      t += int'(r[j].s_nz) + int'(r[j].h_pat != 3'd0) + int'(r[j].v_kind != V_NONE);
    return t;
  endfunction

  // Rows compared column by column (one narrow compare per column keeps
  // elaboration-time evaluation simple for every tool).
  function automatic bit row_eq(row_t a, row_t b);
    for (int j = 0; j < MAX_DIG; j++)
      if (a[j] != b[j]) return 1'b0;
    return 1'b1;
  endfunction

  // Tap whose product tap k reuses: the first tap with the same or the
  // negated row. A tap with an empty row returns itself.
  function automatic int row_src(plan_t pl, int k);
    row_t r, rn;
    r  = pl[k];
    rn = row_negate(r);
    if (row_terms(r) == 0) return k;
    for (int m = 0; m < k; m++)
      if (row_eq(pl[m], r) || row_eq(pl[m], rn)) return m;
    return k;
  endfunction

  // Tap k adds the negation of its source product.
  function automatic bit row_src_neg(plan_t pl, int k);
    int m;
    m = row_src(pl, k);
    return (m != k) && !row_eq(pl[m], pl[k]);
  endfunction

  function automatic bit hpat_used(plan_t pl, int n, int p);
    for (int k = 0; k < n; k++)
      for (int j = 0; j < MAX_DIG; j++)
        if (int'(pl[k][j].h_pat) == p) return 1'b1;
    return 1'b0;
  endfunction

  function automatic bit vkind_used(plan_t pl, int n, vkind_e v, int h);
    for (int k = 0; k < n; k++)
      for (int j = 0; j < MAX_DIG; j++)
        if (pl[k][j].v_kind == v && int'(pl[k][j].v_h) == h) return 1'b1;
    return 1'b0;
  endfunction

  // Length of the delay line the vertical pairs need (0: none).
  function automatic int vmax_h(plan_t pl, int n);
    int m;
    m = 0;
    for (int k = 0; k < n; k++)
      for (int j = 0; j < MAX_DIG; j++)
        if (pl[k][j].v_kind != V_NONE && int'(pl[k][j].v_h) > m) m = int'(pl[k][j].v_h);
    return m;
  endfunction

  // Mechanism counts of a plan, for reports and tests.
  typedef struct packed {
    int n_hterms;     // horizontal pattern terms placed
    int n_hpat;       // distinct horizontal patterns built
    int n_vsum;       // vertical x + x[-h] terms placed
    int n_vdiff;      // vertical x - x[-h] terms placed
    int n_vtall;      // of these, terms of height 2 or more
    int n_zero;       // zero taps
    int n_merged;     // taps reusing an equal product
    int n_negmerged;  // taps reusing a negated product
    int n_as;         // adders/subtracters in multiplier block and chain
    int n_reg;        // word registers (chain, output, vertical delay)
    int n_as_plain;   // adders/subtracters without any CSE or merging
  } stats_t;

  function automatic stats_t plan_stats(coef_tab_t c, int n);
    plan_t  pl;
    stats_t s;
    int     t;
    pl = make_plan(c, n);
    s  = '0;
    for (int p = 1; p <= N_HPAT; p++) if (hpat_used(pl, n, p)) s.n_hpat++;
    s.n_as = s.n_hpat;
    for (int h = 1; h <= MAX_VH; h++) begin
      if (vkind_used(pl, n, V_SUM, h))  s.n_as++;
      if (vkind_used(pl, n, V_DIFF, h)) s.n_as++;
    end
    // n - 1 chain registers, the output register and the delay line.
    s.n_reg = n + vmax_h(pl, n);
    for (int k = 0; k < n; k++) begin
      for (int j = 0; j < MAX_DIG; j++) begin
        if (pl[k][j].h_pat != 3'd0)     s.n_hterms++;
        if (pl[k][j].v_kind == V_SUM)  s.n_vsum++;
        if (pl[k][j].v_kind == V_DIFF) s.n_vdiff++;
        if (pl[k][j].v_kind != V_NONE && pl[k][j].v_h > 2'd1) s.n_vtall++;
      end
      t = row_terms(pl[k]);
      if (c[k] == '0) s.n_zero++;
      if (t > 0) begin
        if (row_src(pl, k) == k) s.n_as += t - 1;
        else if (row_src_neg(pl, k)) s.n_negmerged++;
        else s.n_merged++;
        if (k < n - 1) s.n_as++;  // chain adder of this tap
      end
      if (c[k] != '0) begin
        s.n_as_plain += csd_weight(coef_at(c, k)) - 1;
        if (k < n - 1) s.n_as_plain++;
      end
    end
    return s;
  endfunction

endpackage
