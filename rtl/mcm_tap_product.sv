// mcm_tap_product: the product of one tap of the multiplier block, formed
// from what common subexpression elimination left of its coefficient.
//
// ROW is the tap's row of the plan made by mcm_pkg::make_plan (by default,
// tap 0 of the default 77-tap filter). For each CSD
// column j it may hold a single digit (x shifted by j), a horizontal pattern
// anchored at j (the shared pattern output shifted by j) and a vertical pair
// anchored at j (the shared x[n] +/- x[n-h] shifted by j), each added or
// subtracted. The terms are summed in one chain from the least significant
// column up; a column with no term costs nothing, so a row with t terms costs
// t - 1 adders/subtracters (the first term is added to a constant zero).
//
// Interface: x is the signed input sample, hterm[p] the output of
// horizontal pattern p (index 0 unused), vterm[vidx(V_SUM, h)] and
// vterm[vidx(V_DIFF, h)] the vertical terms x[n] +/- x[n-h] (index 0
// unused), all WP bits. A row that does not use some of these inputs leaves
// them unread.
// p is the product modulo 2^WP. Purely combinational.
module mcm_tap_product
  import mcm_pkg::*;
#(
  parameter int   WX  = 16,
  parameter int   WP  = 30,
  parameter row_t ROW = plan_row(make_plan(random_coefs(32'd1, 77, 13), 77), 0)
) (
  input  logic signed [WX-1:0] x,
  input  logic signed [WP-1:0] hterm [N_HPAT+1],
  input  logic signed [WP-1:0] vterm [N_VTERM],
  output logic signed [WP-1:0] p
);

  logic signed [WP-1:0] xw;
  logic signed [WP-1:0] acc [MAX_DIG+1];

  assign xw     = WP'(x);
  assign acc[0] = '0;

  for (genvar j = 0; j < MAX_DIG; j++) begin : g_col
    localparam term_t T = ROW[j];
    logic signed [WP-1:0] a_s, a_h;

    if (T.s_nz) begin : g_s
      assign a_s = T.s_neg ? acc[j] - (xw <<< j) : acc[j] + (xw <<< j);
    end else begin : g_ns
      assign a_s = acc[j];
    end

    if (T.h_pat != 3'd0) begin : g_h
      assign a_h = T.h_neg ? a_s - (hterm[T.h_pat] <<< j) : a_s + (hterm[T.h_pat] <<< j);
    end else begin : g_nh
      assign a_h = a_s;
    end

    if (T.v_kind != V_NONE) begin : g_v
      localparam int VI = vidx(T.v_kind, int'(T.v_h));
      assign acc[j+1] = T.v_neg ? a_h - (vterm[VI] <<< j) : a_h + (vterm[VI] <<< j);
    end else begin : g_nv
      assign acc[j+1] = a_h;
    end
  end

  assign p = acc[MAX_DIG];

endmodule
