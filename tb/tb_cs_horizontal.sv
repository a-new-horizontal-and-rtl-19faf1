// tb_cs_horizontal: checks all six horizontal subexpressions, x*(2^L+1) and
// x*(2^L-1) for L = 2, 3, 4 (the values 5, 3, 9, 7, 17, 15), on random and
// full-scale inputs against plain multiplication.
module tb_cs_horizontal;
  localparam int W = 30;

  logic signed [W-1:0] x;
  logic signed [W-1:0] y [6];

  localparam int VAL [6] = '{5, 3, 9, 7, 17, 15};

  for (genvar i = 0; i < 6; i++) begin : g_dut
    cs_horizontal #(.W(W), .L(2 + i / 2), .PLUS(i % 2 == 0)) u_dut (.x(x), .y(y[i]));
  end

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
    longint xv;
    for (int t = 0; t < 2000; t++) begin
      case (t)
        0: xv = 32767;
        1: xv = -32768;
        2: xv = 0;
        default: xv = longint'($signed(16'($urandom)));
      endcase
      x = W'(xv);
      #1;
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (longint'(y[i]) != xv * VAL[i]) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d pattern value %0d: got %0d", xv, VAL[i], y[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
