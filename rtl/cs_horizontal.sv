// cs_horizontal: one horizontal common subexpression of the multiplier
// block, y = x * (2^L + 1) or y = x * (2^L - 1).
//
// A horizontal subexpression is a pair of nonzero CSD digits L columns apart
// inside one coefficient: [101] and [10-1] for L = 2, [1001] and [100-1] for
// L = 3, [10001] and [1000-1] for L = 4. It costs one adder (PLUS = 1) or one
// subtracter (PLUS = 0); the shift is wiring. Its output is shared by every
// coefficient that contains the pair, each shifting it to its own column and
// adding or subtracting it (the negated patterns).
//
// Interface: x is the signed input sample, already sign-extended to W bits;
// y is x * (2^L +/- 1) modulo 2^W. Purely combinational.
module cs_horizontal #(
  parameter int W    = 30,   // datapath width
  parameter int L    = 2,    // distance between the two digits
  parameter bit PLUS = 1'b1  // 1: x*(2^L+1), 0: x*(2^L-1)
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  logic signed [W-1:0] x_shl;
  assign x_shl = x <<< L;

  always_comb begin
    if (PLUS) y = x_shl + x;
    else      y = x_shl - x;
  end

endmodule
