// tb_cs_vertical: drives random samples with a random sample enable into a
// three-register delay line and checks y_sum[h-1] = x[n] + x[n-h] and
// y_diff[h-1] = x[n] - x[n-h] for h = 1, 2, 3, where x[n-h] are the last
// samples taken (zero after reset), against a record kept by the testbench.
module tb_cs_vertical;
  localparam int W = 30;
  localparam int H = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [W-1:0] x = '0;
  logic signed [W-1:0] y_sum [H], y_diff [H];

  cs_vertical #(.W(W), .HMAX(H)) u_dut (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y_sum(y_sum), .y_diff(y_diff));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int holds = 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    longint prev [H+1];   // prev[h] = x[n-h]
    longint xv;
    for (int h = 0; h <= H; h++) prev[h] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      xv = (t % 50 == 7) ? -32768 : longint'($signed(16'($urandom)));
      x  = W'(xv);
      #1;
      for (int h = 1; h <= H; h++) begin
        checks += 2;
        if (longint'(y_sum[h-1]) != xv + prev[h] || longint'(y_diff[h-1]) != xv - prev[h]) begin
          failures++;
          if (failures < 10) $display("FAIL h=%0d x=%0d x[n-h]=%0d sum=%0d diff=%0d", h, xv, prev[h], y_sum[h-1], y_diff[h-1]);
        end
      end
      @(posedge clk);
      if (en) begin
        for (int h = H; h > 1; h--) prev[h] = prev[h-1];
        prev[1] = xv;
      end else holds++;
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
