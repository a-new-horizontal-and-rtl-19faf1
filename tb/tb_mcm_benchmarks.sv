// tb_mcm_benchmarks: builds the filter at each of the twenty benchmark sizes
// (N taps x b-bit coefficients, from 77 x 13 to 216 x 13), each with its own
// random symmetric coefficient set, runs 300 random samples through all of
// them and checks every output against the direct convolution. For each size
// it prints the adder/subtracter and register counts of the plan, the cost
// CF = 0.6*Nreg + 1.0*Nas, and the same cost with plain CSD multipliers.
module tb_mcm_benchmarks;
  import mcm_pkg::*;

  localparam int NB = 20;
  localparam int WX = 16;
  localparam int SZ_N [NB] = '{77, 116, 138, 136, 92, 142, 141, 146, 146, 142,
                               101, 98, 102, 105, 101, 105, 143, 142, 216, 144};
  localparam int SZ_B [NB] = '{13, 14, 14, 14, 13, 14, 14, 13, 14, 14,
                               13, 13, 13, 13, 13, 14, 14, 14, 13, 14};
  localparam int WY = WX + 14 + 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [WX-1:0] x = '0;
  longint yv [NB];

  for (genvar i = 0; i < NB; i++) begin : g_inst
    localparam int N = SZ_N[i];
    localparam int B = SZ_B[i];
    localparam coef_tab_t C = random_coefs(32'd1000 + i, N, B);
    logic signed [WX+B+$clog2(N+1)-1:0] y;
    mcm_fir #(.N(N), .B(B), .WX(WX), .COEF(C)) u_fir (
      .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y));
    assign yv[i] = longint'(y);
  end

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  longint hist [MAX_TAPS];

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    coef_tab_t c [NB];
    stats_t    s;
    longint    e;
    int        cf, cf_plain, sum_pct;
    sum_pct = 0;
    for (int i = 0; i < NB; i++) begin
      c[i] = random_coefs(32'd1000 + i, SZ_N[i], SZ_B[i]);
      s    = plan_stats(c[i], SZ_N[i]);
      cf       = BETA10 * s.n_reg + GAMMA10 * s.n_as;
      cf_plain = BETA10 * SZ_N[i] + GAMMA10 * s.n_as_plain;
      sum_pct += 1000 * cf / cf_plain;
      $display("%3d x %2d: %4d add/sub, %3d reg, CF %6.1f; plain CSD %4d add/sub, CF %6.1f (%0.1f%%)",
               SZ_N[i], SZ_B[i], s.n_as, s.n_reg, cf / 10.0, s.n_as_plain, cf_plain / 10.0,
               100.0 * cf / cf_plain);
      checks++;
      if (cf >= cf_plain) failures++;
    end
    $display("average cost relative to plain CSD: %0.1f%%", sum_pct / 10.0 / NB);
    for (int k = 0; k < MAX_TAPS; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      en = 1'b1;
      x  = (t % 9 == 4) ? -16'sh8000 : WX'($urandom);
      @(posedge clk);
      #1;
      for (int k = MAX_TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = longint'(x);
      for (int i = 0; i < NB; i++) begin
        e = 0;
        for (int k = 0; k < SZ_N[i]; k++) e += longint'(coef_at(c[i], k)) * hist[k];
        checks++;
        if (yv[i] != e) begin
          failures++;
          if (failures < 10) $display("FAIL size %0d t=%0d got %0d expected %0d", i, t, yv[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
