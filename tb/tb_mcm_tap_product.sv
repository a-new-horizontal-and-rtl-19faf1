// tb_mcm_tap_product: builds a tap from a hand-written row that uses every
// kind of term with both signs, drives random values on the input and on the
// horizontal and vertical term inputs, and checks the product against the
// sum written out by hand:
//   p = x<<0 - x<<9 - h5<<2 + h15<<6 + vsum1<<4 - vdiff3<<11
// where h5 and h15 are the inputs of patterns 1 (x*5) and 6 (x*15), vsum1
// the input for x[n]+x[n-1] and vdiff3 the one for x[n]-x[n-3]. The other
// inputs carry random values and must be ignored.
module tb_mcm_tap_product;
  import mcm_pkg::*;

  localparam int WX = 16;
  localparam int WP = 30;

  function automatic row_t make_row();
    row_t r = '0;
    r[0].s_nz   = 1'b1;
    r[9].s_nz   = 1'b1;
    r[9].s_neg  = 1'b1;
    r[2].h_pat  = 3'd1;
    r[2].h_neg  = 1'b1;
    r[6].h_pat  = 3'd6;
    r[4].v_kind = V_SUM;
    r[4].v_h    = 2'd1;
    r[11].v_kind = V_DIFF;
    r[11].v_h    = 2'd3;
    r[11].v_neg  = 1'b1;
    return r;
  endfunction

  logic signed [WX-1:0] x;
  logic signed [WP-1:0] hterm [N_HPAT+1];
  logic signed [WP-1:0] vterm [N_VTERM];
  logic signed [WP-1:0] p;

  mcm_tap_product #(.WX(WX), .WP(WP), .ROW(make_row())) u_dut (
    .x(x), .hterm(hterm), .vterm(vterm), .p(p));

  int checks = 0;
  int failures = 0;

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    longint xv, h1, h6, vs, vd, e;
    for (int t = 0; t < 2000; t++) begin
      xv = longint'($signed(16'($urandom)));
      h1 = longint'($signed(16'($urandom)));
      h6 = longint'($signed(16'($urandom)));
      vs = longint'($signed(16'($urandom)));
      vd = longint'($signed(16'($urandom)));
      x = WX'(xv);
      for (int i = 0; i <= N_HPAT; i++) hterm[i] = WP'($urandom);
      hterm[1] = WP'(h1);
      hterm[6] = WP'(h6);
      for (int i = 0; i < N_VTERM; i++) vterm[i] = WP'($urandom);
      vterm[vidx(V_SUM, 1)]  = WP'(vs);
      vterm[vidx(V_DIFF, 3)] = WP'(vd);
      #1;
      e = xv - xv * 512 - h1 * 4 + h6 * 64 + vs * 16 - vd * 2048;
      e = longint'($signed(WP'(e)));   // modulo 2^WP
      checks++;
      if (longint'(p) != e) begin
        failures++;
        if (failures < 10) $display("FAIL got %0d expected %0d", p, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
