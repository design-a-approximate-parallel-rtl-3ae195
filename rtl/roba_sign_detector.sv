// roba_sign_detector: front end of the signed RoBA multiplier.
//
// Takes two N-bit two's complement operands and produces their absolute values
// and the sign of their product (the XOR of the two sign bits). A negative
// operand is made positive with an exact two's complement negation (~X + 1).
// The absolute value stays N bits wide: for every operand except the most
// negative one, -2^(N-1), its top bit is zero; for that one the result is
// 2^(N-1), which is still correct read as an unsigned N-bit number.
//
// Interface: a_i, b_i (signed, N bits) -> abs_a_o, abs_b_o (unsigned, N bits),
//            neg_o (1 when exactly one operand is negative).
// Timing: purely combinational.
// The block's role and outputs follow the RoBA scheme; the exact negation used
// here and the treatment of -2^(N-1) are this design's own choices.
module roba_sign_detector #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a_i,
  input  logic [N-1:0] b_i,
  output logic [N-1:0] abs_a_o,
  output logic [N-1:0] abs_b_o,
  output logic         neg_o
);

  always_comb begin
    abs_a_o = a_i[N-1] ? (~a_i + N'(1)) : a_i;
    abs_b_o = b_i[N-1] ? (~b_i + N'(1)) : b_i;
    neg_o   = a_i[N-1] ^ b_i[N-1];
  end

endmodule
