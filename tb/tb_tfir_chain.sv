// tb_tfir_chain: drives random tap products into the delay-and-add chain
// built for the 15-tap hand-made plan, with a random sample enable, and
// checks the output against y[n] = sum over used taps k of +/-prod[k][n-k]
// (minus for taps that subtract a reused product). Products of unused taps
// are driven with random values too and must be ignored. Also checks the
// one-clock latency, the hold while en is low and the reset.
module tb_tfir_chain;
  import mcm_pkg::*;

  localparam int N    = 15;
  localparam int WP   = 28;
  localparam int WACC = 31;

  function automatic coef_tab_t hand_coefs();
    coef_tab_t c = '0;
    int v [N] = '{5, 40, 0, 65, 2113, -130, 4226, -40, 40, 1000, -3, 7, 260, 0, 8452};
    for (int k = 0; k < N; k++) c[k] = v[k][CW-1:0];
    return c;
  endfunction
  localparam plan_t P = make_plan(hand_coefs(), N);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [WP-1:0]   prod [N];
  logic signed [WACC-1:0] y;

  tfir_chain #(.N(N), .WP(WP), .WACC(WACC), .PLAN(P)) u_dut (
    .clk(clk), .rst_n(rst_n), .en(en), .prod(prod), .y(y));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int holds = 0;

  longint hist [N][N];   // hist[d][k] = prod[k] of the sample d samples back

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    longint e, y_prev;
    for (int d = 0; d < N; d++) for (int k = 0; k < N; k++) hist[d][k] = 0;
    for (int k = 0; k < N; k++) prod[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en = ($urandom % 5) != 0;
      for (int k = 0; k < N; k++) prod[k] = WP'(longint'($signed(24'($urandom))));
      y_prev = longint'(y);
      @(posedge clk);
      #1;
      checks++;
      if (en) begin
        for (int d = N - 1; d > 0; d--) hist[d] = hist[d-1];
        for (int k = 0; k < N; k++) hist[0][k] = longint'(prod[k]);
        e = 0;
        for (int k = 0; k < N; k++)
          if (row_terms(P[k]) != 0) e += row_src_neg(P, k) ? -hist[k][k] : hist[k][k];
        e = longint'($signed(WACC'(e)));
        if (longint'(y) != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d got %0d expected %0d", t, y, e);
        end
      end else begin
        holds++;
        if (longint'(y) != y_prev) failures++;
      end
    end
    rst_n = 1'b0;
    #1;
    checks++;
    if (y != '0) failures++;
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
