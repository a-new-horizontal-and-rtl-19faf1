// mcm_block: the multiple constant multiplier block of a transposed-form FIR
// filter. One input sample x is multiplied by all N fixed coefficients using
// only hard-wired shifts, adders/subtracters and a delay line of at most
// three samples.
//
// At elaboration mcm_pkg::make_plan reduces the coefficients by common
// subexpression elimination: horizontal patterns of span 3 to 5 digits
// first, then vertical pairs between taps 1 to 3 apart. The block then holds
//   - a horizontal bank: one cs_horizontal per pattern the plan uses,
//   - a vertical bank: one cs_vertical (x[n] +/- x[n-h], with a delay line
//     as long as the tallest pair) if the plan uses vertical pairs,
//   - one mcm_tap_product per distinct tap row; a tap whose row equals (or
//     is the negation of) an earlier one reuses that product.
//
// Interface: x is taken as sample x[n]; en advances the vertical delay
// line. prod[k] is combinational: for a tap that reuses a product it
// carries the shared product, and the tap is to be subtracted rather than
// added when mcm_pkg::row_src_neg(PLAN, k) is set (tfir_chain does this).
// A tap with a zero row reads zero. Products are WP = WX + B + 3 bits: a
// tap may carry digits of up to MAX_VH + 1 = 4 coefficients, each worth at
// most 2^B times the input in absolute value, and the product must not wrap
// before the chain sign-extends it.
// Because a vertical pair is moved wholly into the earlier tap, prod[k] is
// generally not COEF[k] * x[n]: only the filter output assembled by
// tfir_chain equals the convolution.
module mcm_block
  import mcm_pkg::*;
#(
  parameter int        N    = 77,
  parameter int        B    = 13,
  parameter int        WX   = 16,
  parameter coef_tab_t COEF = random_coefs(32'd1, 77, 13),
  localparam int       WP   = WX + B + 1 + $clog2(MAX_VH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [WX-1:0] x,
  output logic signed [WP-1:0] prod [N]
);

  localparam plan_t PLAN     = make_plan(COEF, N);
  localparam int    HV       = vmax_h(PLAN, N);

  if (N < 1 || N > MAX_TAPS) begin : g_bad_n
    $error("mcm_block: N must be 1 to %0d", MAX_TAPS);
  end
  if (B < 2 || B > MAX_DIG - 1) begin : g_bad_b
    $error("mcm_block: B must be 2 to %0d", MAX_DIG - 1);
  end

  logic signed [WP-1:0] xw;
  logic signed [WP-1:0] hterm [N_HPAT+1];
  logic signed [WP-1:0] vterm [N_VTERM];

  assign xw       = WP'(x);
  assign hterm[0] = '0;
  assign vterm[0] = '0;

  // Horizontal bank.
  for (genvar p = 1; p <= N_HPAT; p++) begin : g_hbank
    if (hpat_used(PLAN, N, p)) begin : g_used
      cs_horizontal #(.W(WP), .L(hpat_len(p)), .PLUS(hpat_plus(p))) u_cs (
        .x(xw),
        .y(hterm[p])
      );
    end else begin : g_unused
      assign hterm[p] = '0;
    end
  end

  // Vertical bank: a delay line of HV registers and the sums it needs.
  if (HV > 0) begin : g_vbank
    logic signed [WP-1:0] y_sum  [HV];
    logic signed [WP-1:0] y_diff [HV];
    cs_vertical #(.W(WP), .HMAX(HV)) u_cs (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .x     (xw),
      .y_sum (y_sum),
      .y_diff(y_diff)
    );
  end

  // Only the sums some row reads are kept by synthesis.
  for (genvar h = 1; h <= MAX_VH; h++) begin : g_vterm
    if (h <= HV) begin : g_built
      assign vterm[vidx(V_SUM, h)]  = g_vbank.y_sum[h-1];
      assign vterm[vidx(V_DIFF, h)] = g_vbank.y_diff[h-1];
    end else begin : g_none
      assign vterm[vidx(V_SUM, h)]  = '0;
      assign vterm[vidx(V_DIFF, h)] = '0;
    end
  end

  // One product per distinct row.
  for (genvar k = 0; k < N; k++) begin : g_tap
    localparam int SRC = row_src(PLAN, k);
    if (row_terms(PLAN[k]) == 0) begin : g_zero
      assign prod[k] = '0;
    end else if (SRC == k) begin : g_own
      mcm_tap_product #(.WX(WX), .WP(WP), .ROW(PLAN[k])) u_prod (
        .x    (x),
        .hterm(hterm),
        .vterm(vterm),
        .p    (prod[k])
      );
    end else begin : g_shared
      assign prod[k] = prod[SRC];
    end
  end

endmodule
