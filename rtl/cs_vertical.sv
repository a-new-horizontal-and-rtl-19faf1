// cs_vertical: the vertical common subexpressions of the multiplier block,
// x[n] + x[n-h] and x[n] - x[n-h] for heights h = 1 .. HMAX.
//
// A vertical subexpression is a pair of nonzero CSD digits in the same
// column of two taps h places apart in a transposed-form filter. Those taps
// see the input h samples apart, so the pair is realised once as
// x[n] +/- x[n-h] and added into the earlier tap only. One delay line of
// HMAX registers (D in the usual notation) holds x[n-1] .. x[n-HMAX] and is
// shared by every sum and difference. All 2*HMAX adders are described; a
// sum that nothing reads is removed by synthesis, so the parent decides
// which ones exist by what it reads.
//
// Interface: x is the signed sample (sign-extended to W bits), taken when en
// is high. y_sum[h-1] = x[n] + x[n-h] and y_diff[h-1] = x[n] - x[n-h] are
// combinational from x and the delay line. rst_n clears the delay line
// asynchronously (samples before the first one read as zero).
module cs_vertical #(
  parameter int W    = 30,
  parameter int HMAX = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y_sum  [HMAX],
  output logic signed [W-1:0] y_diff [HMAX]
);

  logic signed [W-1:0] x_d [HMAX];   // x_d[i] = x[n-1-i]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HMAX; i++) x_d[i] <= '0;
    end else if (en) begin
      x_d[0] <= x;
      for (int i = 1; i < HMAX; i++) x_d[i] <= x_d[i-1];
    end
  end

  for (genvar i = 0; i < HMAX; i++) begin : g_h
    assign y_sum[i]  = x + x_d[i];
    assign y_diff[i] = x - x_d[i];
  end

endmodule
