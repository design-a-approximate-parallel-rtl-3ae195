// proposed_mul: clocked 32-bit RoBA multiplier, all three variants side by side.
//
// Two N-bit operands (32 by default) enter on a and b; every rising clock edge
// registers their approximate 2N-bit products computed by the three RoBA
// architectures:
//   c     S-RoBA  product, a and b read as two's complement numbers;
//   c_as  AS-RoBA product, same reading, negation without the +1;
//   c_u   U-RoBA  product, a and b read as unsigned numbers.
// Each is one roba_mul instance; see roba_mul for how the product is formed.
//
// Interface: clk, a[N-1:0], b[N-1:0] -> c, c_as, c_u [2N-1:0].
// Timing: latency of one clock; a new operand pair every cycle. There is no
// reset: the output registers are loaded on every edge, so they hold a valid
// product from the first edge after the operands are applied.
// The module name, the 32-bit operands, the 64-bit output c and the clock input
// follow the published top level. The output register, the extra outputs c_as
// and c_u that bring out the other two variants, and the absence of reset are
// this design's own choices.
module proposed_mul
  import roba_pkg::*;
#(
  parameter int unsigned N = ROBA_DEFAULT_N
) (
  input  logic           clk,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] c,
  output logic [2*N-1:0] c_as,
  output logic [2*N-1:0] c_u
);

  logic [2*N-1:0] p_s, p_as, p_u;

  roba_mul #(.N(N), .VARIANT(ROBA_SIGNED))        u_s_roba  (.a_i(a), .b_i(b), .p_o(p_s));
  roba_mul #(.N(N), .VARIANT(ROBA_SIGNED_APPROX)) u_as_roba (.a_i(a), .b_i(b), .p_o(p_as));
  roba_mul #(.N(N), .VARIANT(ROBA_UNSIGNED))      u_u_roba  (.a_i(a), .b_i(b), .p_o(p_u));

  always_ff @(posedge clk) begin
    c    <= p_s;
    c_as <= p_as;
    c_u  <= p_u;
  end

endmodule
