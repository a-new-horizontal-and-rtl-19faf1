// tb_mcm_fir: end-to-end test of the filter. Two filters run side by side on
// the same random samples and sample-enable pattern:
//   u_hand  - 15 taps with a hand-made coefficient set chosen so that every
//             mechanism of the multiplier block is used: horizontal patterns,
//             vertical sums and differences, vertical pairs two samples tall,
//             a zero tap, a tap that reuses an equal product and one that
//             reuses a negated product;
//   u_big   - 216 taps of 14-bit random symmetric coefficients: the largest
//             tap count and the widest coefficients of the benchmark set.
// The expected output is the direct convolution sum over k of c[k]*x[n-k],
// computed in the testbench from the coefficient tables and a record of past
// samples. Every clock the output is compared; with en low it must hold.
// Extreme input values (full-scale positive and negative) are mixed in, and
// the filter is reset once in the middle of the run. The mechanism counts
// of both plans are printed and each mechanism must occur at least once.
module tb_mcm_fir;
  import mcm_pkg::*;

  localparam int WX = 16;

  localparam int N1 = 15;
  localparam int B1 = 15;
  function automatic coef_tab_t hand_coefs();
    coef_tab_t c = '0;
    int v [N1] = '{5, 40, 0, 65, 2113, -130, 4226, -40, 40, 1000, -3, 7, 260, 0, 8452};
    for (int k = 0; k < N1; k++) c[k] = v[k][CW-1:0];
    return c;
  endfunction
  localparam coef_tab_t C1 = hand_coefs();

  localparam int N2 = 216;
  localparam int B2 = 14;
  localparam coef_tab_t C2 = random_coefs(32'd7, N2, B2);

  localparam int W1 = WX + B1 + $clog2(N1 + 1);
  localparam int W2 = WX + B2 + $clog2(N2 + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [WX-1:0] x = '0;
  logic signed [W1-1:0] y1;
  logic signed [W2-1:0] y2;

  mcm_fir #(.N(N1), .B(B1), .WX(WX), .COEF(C1)) u_hand (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y1));
  mcm_fir #(.N(N2), .B(B2), .WX(WX), .COEF(C2)) u_big (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y2));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int holds = 0;
  int samples = 0;
  int extremes = 0;
  int resets = 0;

  longint hist [MAX_TAPS];   // hist[k] = x[n-k] of the last sample taken

  function automatic longint conv(coef_tab_t c, int n);
    longint s = 0;
    for (int k = 0; k < n; k++) s += longint'(coef_at(c, k)) * hist[k];
    return s;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d at sample %0d", what, got, exp, samples);
    end
  endtask

  task automatic mech(string what, int cnt);
    $display("  %-34s %0d", what, cnt);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never used: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    stats_t s1, s2;
    longint y1_prev, y2_prev;
    s1 = plan_stats(C1, N1);
    s2 = plan_stats(C2, N2);
    $display("hand-made set: %0d adders/subtracters (%0d without CSE), %0d registers",
             s1.n_as, s1.n_as_plain, s1.n_reg);
    $display("216x14 set:    %0d adders/subtracters (%0d without CSE), %0d registers",
             s2.n_as, s2.n_as_plain, s2.n_reg);
    mech("horizontal pattern terms", s1.n_hterms + s2.n_hterms);
    mech("vertical sum terms x+x[-h]", s1.n_vsum);
    mech("vertical difference terms x-x[-h]", s1.n_vdiff);
    mech("vertical terms of height 2 or more", s1.n_vtall);
    mech("zero taps", s1.n_zero);
    mech("taps reusing an equal product", s1.n_merged + s2.n_merged);
    mech("taps reusing a negated product", s1.n_negmerged);
    checks++;
    if (s1.n_as >= s1.n_as_plain || s2.n_as >= s2.n_as_plain) begin
      failures++;
      $display("FAIL CSE did not reduce the adder count");
    end

    for (int k = 0; k < MAX_TAPS; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (cyc == 1500) begin
        rst_n = 1'b0;
        #1;
        for (int k = 0; k < MAX_TAPS; k++) hist[k] = 0;
        check("y1 after reset", longint'(y1), 0);
        check("y2 after reset", longint'(y2), 0);
        resets++;
        #1 rst_n = 1'b1;
      end
      en = ($urandom % 5) != 0;
      case ($urandom % 10)
        0: x = 16'sh7fff;
        1: x = -16'sh8000;
        default: x = WX'($urandom);
      endcase
      if (x == 16'sh7fff || x == -16'sh8000) extremes++;
      y1_prev = longint'(y1);
      y2_prev = longint'(y2);
      @(posedge clk);
      #1;
      if (en) begin
        for (int k = MAX_TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = longint'(x);
        samples++;
        check("y1", longint'(y1), conv(C1, N1));
        check("y2", longint'(y2), conv(C2, N2));
      end else begin
        holds++;
        check("y1 hold", longint'(y1), y1_prev);
        check("y2 hold", longint'(y2), y2_prev);
      end
    end
    mech("clocks with en low (hold)", holds);
    mech("full-scale input samples", extremes);
    mech("resets during operation", resets);
    $display("samples filtered: %0d", samples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
