// tb_mcm_fir_full: the filter at its default size (77 taps, 13-bit random
// symmetric coefficients, 16-bit samples) filtering 1000 random samples,
// full-scale values and sample-enable gaps included, compared every clock
// with the direct convolution of the default coefficient table.
module tb_mcm_fir_full;
  import mcm_pkg::*;

  localparam int N  = 77;
  localparam int WX = 16;
  localparam coef_tab_t C = random_coefs(32'd1, 77, 13);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [WX-1:0] x = '0;
  logic signed [WX+13+$clog2(N+1)-1:0] y;

  mcm_fir u_dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  longint hist [N];

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    longint e, y_prev;
    for (int k = 0; k < N; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 1200; t++) begin
      @(negedge clk);
      en = ($urandom % 6) != 0;
      case ($urandom % 8)
        0: x = 16'sh7fff;
        1: x = -16'sh8000;
        default: x = WX'($urandom);
      endcase
      y_prev = longint'(y);
      @(posedge clk);
      #1;
      checks++;
      if (en) begin
        for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = longint'(x);
        e = 0;
        for (int k = 0; k < N; k++) e += longint'(coef_at(C, k)) * hist[k];
        if (longint'(y) != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d got %0d expected %0d", t, y, e);
        end
      end else if (longint'(y) != y_prev) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
