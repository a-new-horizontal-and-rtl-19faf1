// tb_mcm_pkg: checks the planning functions.
//   - CSD recoding: for every value from -9000 to 9000 the digits add up to
//     the value and no two neighbouring digits are nonzero.
//   - Pattern values: ids 1..6 are 5, 3, 9, 7, 17, 15.
//   - Plans: for the hand-made set and random sets of 13 and 14 bits and up
//     to 216 taps, each row is summed back into the weights w[k][h] of
//     x[n-h] in tap k, and the sum over h of w[k-h][h] must equal c[k];
//     a tap that reuses a product must have the same or the negated row;
//     the adder count must fall below that of plain CSD.
module tb_mcm_pkg;
  import mcm_pkg::*;

  int checks = 0;
  int failures = 0;

  function automatic coef_tab_t hand_coefs();
    coef_tab_t c = '0;
    int v [15] = '{5, 40, 0, 65, 2113, -130, 4226, -40, 40, 1000, -3, 7, 260, 0, 8452};
    for (int k = 0; k < 15; k++) c[k] = v[k][CW-1:0];
    return c;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_plan(coef_tab_t c, int n);
    plan_t  pl;
    stats_t st;
    longint a;
    longint bh [MAX_TAPS][MAX_VH+1];   // bh[k][h]: weight of x[n-h] in tap k
    longint tot;
    int     m, vh;
    pl = make_plan(c, n);
    for (int k = 0; k < n; k++) begin
      for (int h = 0; h <= MAX_VH; h++) bh[k][h] = 0;
      a = 0;
      for (int j = 0; j < MAX_DIG; j++) begin
        if (pl[k][j].s_nz)
          a += (pl[k][j].s_neg ? -1 : 1) * (longint'(1) << j);
        if (pl[k][j].h_pat != 0)
          a += (pl[k][j].h_neg ? -1 : 1) * longint'(hpat_value(int'(pl[k][j].h_pat))) * (longint'(1) << j);
        if (pl[k][j].v_kind != V_NONE) begin
          vh = int'(pl[k][j].v_h);
          checks++;
          if (vh < 1 || vh > MAX_VH || k + vh >= n) failures++;
          else begin
            a += (pl[k][j].v_neg ? -1 : 1) * (longint'(1) << j);
            bh[k][vh] += (pl[k][j].v_neg ? -1 : 1) * ((pl[k][j].v_kind == V_SUM) ? 1 : -1) * (longint'(1) << j);
          end
        end
      end
      bh[k][0] = a;
    end
    for (int k = 0; k < n; k++) begin
      tot = 0;
      for (int h = 0; h <= MAX_VH; h++) if (k - h >= 0) tot += bh[k-h][h];
      check($sformatf("plan n=%0d tap %0d", n, k), tot, longint'(coef_at(c, k)));
      m = row_src(pl, k);
      if (m != k) begin
        checks++;
        if (!(pl[m] == pl[k] || pl[m] == row_negate(pl[k]))) failures++;
      end
    end
    st = plan_stats(c, n);
    checks++;
    if (st.n_as >= st.n_as_plain) failures++;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    digits_t d;
    longint  v;
    bit      adj;
    int      pv [7] = '{0, 5, 3, 9, 7, 17, 15};
    for (int val = -9000; val <= 9000; val++) begin
      d   = csd(val);
      v   = 0;
      adj = 1'b0;
      for (int j = 0; j < MAX_DIG; j++) begin
        v += longint'(d[j]) * (longint'(1) << j);
        if (j > 0 && d[j] != 0 && d[j-1] != 0) adj = 1'b1;
      end
      check($sformatf("csd %0d", val), v, val);
      check($sformatf("csd %0d adjacent digits", val), adj, 0);
    end
    for (int p = 1; p <= N_HPAT; p++) check("pattern value", hpat_value(p), pv[p]);
    check_plan(hand_coefs(), 15);
    check_plan(random_coefs(32'd1, 77, 13), 77);
    check_plan(random_coefs(32'd7, 216, 14), 216);
    for (int s = 0; s < 6; s++) check_plan(random_coefs(32'd100 + s, 70 + 29 * s, 13 + s % 2), 70 + 29 * s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
