// mcm_fir: a transposed-form FIR filter with fixed coefficients whose
// multiplier block is built by horizontal-then-vertical common
// subexpression elimination.
//
// y[n] = sum over k of COEF[k] * x[n-k], for k = 0 .. N-1. The input sample
// feeds mcm_block, which forms all tap products from shared subexpressions;
// tfir_chain delays and accumulates them. The coefficient table is an
// elaboration-time parameter; by default it is a random symmetric filter of
// N = 77 taps with B = 13-bit coefficients, the size of the smallest
// benchmark instance the method was evaluated on.
//
// Interface: when en is high at a rising clock edge, x is taken as the next
// sample and, on the same edge, y is updated to the output that sample
// completes (latency one clock, one sample per clock at most). y is the full
// precision result, WACC = WX + B + clog2(N) bits. rst_n is an active-low
// asynchronous reset that clears the filter state (all past samples zero).
module mcm_fir
  import mcm_pkg::*;
#(
  parameter int          N    = 77,
  parameter int          B    = 13,
  parameter int          WX   = 16,
  parameter int unsigned SEED = 32'd1,
  parameter coef_tab_t   COEF = random_coefs(SEED, N, B),
  localparam int         WP   = WX + B + 1 + $clog2(MAX_VH + 1),
  localparam int         WACC = WX + B + $clog2(N + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [WX-1:0]   x,
  output logic signed [WACC-1:0] y
);

  localparam plan_t PLAN = make_plan(COEF, N);

  logic signed [WP-1:0] prod [N];

  mcm_block #(.N(N), .B(B), .WX(WX), .COEF(COEF)) u_mcm (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .x    (x),
    .prod (prod)
  );

  tfir_chain #(
    .N   (N),
    .WP  (WP),
    .WACC(WACC),
    .PLAN(PLAN)
  ) u_chain (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .prod (prod),
    .y    (y)
  );

endmodule
