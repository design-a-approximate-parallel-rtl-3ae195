// roba_sign_set: applies the product's sign to its magnitude.
//
// When neg_i is 1 the magnitude is negated. With EXACT = 1 (S-RoBA) the
// negation is the true two's complement ~X + 1. With EXACT = 0 (AS-RoBA) the
// increment is skipped and the output is ~X, which is one less than the true
// negative value; the error shrinks relative to the product as the width grows.
// When neg_i is 0 the magnitude passes unchanged.
//
// Interface: mag_i (W bits), neg_i -> y_o (W bits, two's complement).
// Timing: purely combinational.
// Both negation forms are those of the RoBA scheme.
module roba_sign_set #(
  parameter int unsigned W     = 64,
  parameter bit          EXACT = 1'b1
) (
  input  logic [W-1:0] mag_i,
  input  logic         neg_i,
  output logic [W-1:0] y_o
);

  always_comb begin
    if (!neg_i)
      y_o = mag_i;
    else if (EXACT)
      y_o = ~mag_i + W'(1);
    else
      y_o = ~mag_i;
  end

endmodule
