// tb_mcm_block: checks the multiplier block on its own, with the 15-tap
// hand-made coefficient set that uses every mechanism (horizontal patterns,
// vertical sums and differences of height 1 and 2, zero taps, equal and
// negated reuse).
//
// Vertical pairs move part of a coefficient into an earlier tap, so each
// tap output is e[k] = sum over h of w[k][h]*x[n-h] (h = 0 .. MAX_VH) rather
// than c[k]*x[n] (e[k] is prod[k], negated for a tap that subtracts a reused
// product). The testbench learns w from an impulse (x = 1, then zeros), then
// requires sum over h of w[k-h][h] = c[k] for every tap and w[k][h] = 0
// where k+h runs past the last tap, so that the delay chain restores the
// coefficients; finally it checks the linear model on random samples with a
// random sample enable.
module tb_mcm_block;
  import mcm_pkg::*;

  localparam int N  = 15;
  localparam int B  = 15;
  localparam int WX = 16;
  localparam int WP = WX + B + 1 + $clog2(MAX_VH + 1);

  function automatic coef_tab_t hand_coefs();
    coef_tab_t c = '0;
    int v [N] = '{5, 40, 0, 65, 2113, -130, 4226, -40, 40, 1000, -3, 7, 260, 0, 8452};
    for (int k = 0; k < N; k++) c[k] = v[k][CW-1:0];
    return c;
  endfunction
  localparam coef_tab_t C = hand_coefs();
  localparam plan_t     P = make_plan(C, N);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [WX-1:0] x = '0;
  logic signed [WP-1:0] prod [N];

  mcm_block #(.N(N), .B(B), .WX(WX), .COEF(C)) u_dut (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .prod(prod));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  function automatic longint tap_out(int k);
    return row_src_neg(P, k) ? -longint'(prod[k]) : longint'(prod[k]);
  endfunction

  task automatic check(string what, int k, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s tap %0d: got %0d expected %0d", what, k, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    longint w [N][MAX_VH+1];
    longint xh [MAX_VH+1];   // xh[h] = x[n-h]
    longint xv, e, tot;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // Impulse: x = 1 (earlier samples are zero after reset), then zeros.
    for (int h = 0; h <= MAX_VH; h++) begin
      @(negedge clk);
      en = 1'b1;
      x  = (h == 0) ? 16'sd1 : 16'sd0;
      #1 for (int k = 0; k < N; k++) w[k][h] = tap_out(k);
    end
    for (int k = 0; k < N; k++) begin
      tot = 0;
      for (int h = 0; h <= MAX_VH; h++) begin
        if (k - h >= 0) tot += w[k-h][h];
        if (k + h >= N) check("weight past last tap", k, w[k][h], 0);
      end
      check("sum of weights", k, tot, longint'(coef_at(C, k)));
    end

    for (int h = 0; h <= MAX_VH; h++) xh[h] = 0;   // the impulse has passed
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      xv = (t % 37 == 3) ? -32768 : longint'($signed(16'($urandom)));
      x  = WX'(xv);
      xh[0] = xv;
      #1;
      for (int k = 0; k < N; k++) begin
        e = 0;
        for (int h = 0; h <= MAX_VH; h++) e += w[k][h] * xh[h];
        check("linear", k, tap_out(k), e);
      end
      @(posedge clk);
      if (en) for (int h = MAX_VH; h > 0; h--) xh[h] = xh[h-1];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
