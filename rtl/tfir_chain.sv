// tfir_chain: the delay-and-add chain of a transposed-form FIR filter.
//
// With z[N] = 0, every tap k forms z[k] = z[k+1] delayed by one sample plus
// (or minus) its product prod[k]; the output is z[0]. Each of the N - 1
// links holds one register, and the output is registered too, so the filter
// output y appears one clock after the sample that completes it. PLAN is the
// plan of mcm_pkg::make_plan that the multiplier block was built from: a tap
// with an empty row (a zero coefficient, or one whose digits were all moved
// into the previous tap by vertical pairs) has no adder, only its register;
// a tap that reuses the negation of an earlier product subtracts it.
//
// Interface: prod[k] are the WP-bit tap products of the current sample,
// en marks a clock that takes a sample (all registers hold otherwise),
// y is the WACC-bit filter output, sign-extended and modulo 2^WACC.
// rst_n clears all registers asynchronously.
module tfir_chain
  import mcm_pkg::*;
#(
  parameter int                  N    = 77,
  parameter int                  WP   = 30,
  parameter int                  WACC = 37,
  parameter plan_t               PLAN = make_plan(random_coefs(32'd1, 77, 13), 77)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [WP-1:0]   prod [N],
  output logic signed [WACC-1:0] y
);

  logic signed [WACC-1:0] z [N+1];   // z[k]: combinational value at tap k
  logic signed [WACC-1:0] r [N+1];   // r[k]: register holding z[k] one sample late

  assign r[N] = '0;   // nothing beyond the last tap
  assign r[0] = '0;   // unused; the output register is y

  for (genvar k = 0; k < N; k++) begin : g_tap
    localparam bit USE = row_terms(PLAN[k]) != 0;
    localparam bit NEG = row_src_neg(PLAN, k);
    if (!USE) begin : g_zero
      assign z[k] = r[k+1];
    end else if (NEG) begin : g_sub
      assign z[k] = r[k+1] - WACC'(prod[k]);
    end else begin : g_add
      assign z[k] = r[k+1] + WACC'(prod[k]);
    end
    if (k > 0) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)  r[k] <= '0;
        else if (en) r[k] <= z[k];
      end
    end
  end
  assign z[N] = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= z[0];
  end

endmodule
