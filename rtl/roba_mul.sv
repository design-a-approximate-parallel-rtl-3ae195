// roba_mul: rounding-based approximate (RoBA) multiplier, combinational core.
//
// Main idea: with Ar and Br the operands rounded to their nearest powers of two,
//   A*B = (Ar-A)*(Br-B) + Ar*B + Br*A - Ar*Br.
// The first term is small, because each factor is at most a third of its
// operand, and it is the only one that needs a real multiplier. Dropping it
// leaves
//   A*B ~= Ar*B + Br*A - Ar*Br,
// which needs three shifts, one addition and one subtraction.
//
// Datapath (one instance of each block, three shifters):
//   sign detector -> rounding (x2) -> shifters: Ar*B, Br*A, Ar*Br
//   -> Kogge-Stone adder (Ar*B + Br*A) -> subtractor (- Ar*Br) -> sign set
// All 2N-bit arithmetic is modulo 2^(2N). The approximate product always lies
// in [0, 2^(2N)) for unsigned operands and within the signed 2N-bit range for
// signed ones, so intermediate wrap-around (U-RoBA with Ar = Br = 2^N, where
// Ar*Br = 2^(2N) wraps to zero) cancels out and the final value is exact mod
// 2^(2N).
//
// VARIANT selects the architecture (see roba_pkg):
//   ROBA_SIGNED         S-RoBA: signed operands, exact negation at the end.
//   ROBA_SIGNED_APPROX  AS-RoBA: signed operands, negation as ~X (the product
//                       comes out one below the S-RoBA value when negative).
//   ROBA_UNSIGNED       U-RoBA: unsigned operands, no sign detector or sign set,
//                       N+1-bit rounded values and shifter inputs.
//
// Interface: a_i, b_i (N bits) -> p_o (2N bits).
// Timing: purely combinational; a registered wrapper is proposed_mul.
// The equation, the block order, the Kogge-Stone adder, the 2N-bit shifter
// outputs and the three variants follow the published RoBA scheme; the internals
// of the blocks the scheme only names are documented in their own files.
module roba_mul
  import roba_pkg::*;
#(
  parameter int unsigned   N       = ROBA_DEFAULT_N,
  parameter roba_variant_e VARIANT = ROBA_SIGNED
) (
  input  logic [N-1:0]   a_i,
  input  logic [N-1:0]   b_i,
  output logic [2*N-1:0] p_o
);

  localparam bit          SIGNED_OPS = (VARIANT != ROBA_UNSIGNED);
  // Width of the rounded operands: N+1 for unsigned operands, N for signed ones.
  localparam int unsigned RW         = SIGNED_OPS ? N : N + 1;
  localparam int unsigned PW2        = 2 * N;

  logic [N-1:0]   abs_a, abs_b;
  logic [RW-1:0]  ar, br;
  logic [PW2-1:0] ar_b, br_a, ar_br;
  logic [PW2-1:0] sum, mag;

  // Sign handling. The signed variants put a sign detector in front of the
  // unsigned datapath and a sign set stage behind it; U-RoBA has neither.
  if (SIGNED_OPS) begin : g_signed
    logic neg;

    roba_sign_detector #(.N(N)) u_sign_det (
      .a_i    (a_i),
      .b_i    (b_i),
      .abs_a_o(abs_a),
      .abs_b_o(abs_b),
      .neg_o  (neg)
    );

    roba_sign_set #(.W(PW2), .EXACT(VARIANT == ROBA_SIGNED)) u_sign_set (
      .mag_i(mag),
      .neg_i(neg),
      .y_o  (p_o)
    );
  end else begin : g_unsigned
    assign abs_a = a_i;
    assign abs_b = b_i;
    assign p_o   = mag;
  end

  // Rounding to the nearest power of two.
  roba_rounding #(.N(N), .OW(RW)) u_round_a (.x_i(abs_a), .r_o(ar));
  roba_rounding #(.N(N), .OW(RW)) u_round_b (.x_i(abs_b), .r_o(br));

  // Three barrel shifters.
  roba_barrel_shifter #(.DW(N),  .PW(RW), .OW(PW2)) u_shift_arb  (.d_i(abs_b), .p_i(ar), .prod_o(ar_b));
  roba_barrel_shifter #(.DW(N),  .PW(RW), .OW(PW2)) u_shift_bra  (.d_i(abs_a), .p_i(br), .prod_o(br_a));
  roba_barrel_shifter #(.DW(RW), .PW(RW), .OW(PW2)) u_shift_arbr (.d_i(ar),    .p_i(br), .prod_o(ar_br));

  // Ar*B + Br*A on a 2N-bit Kogge-Stone adder.
  roba_ks_adder #(.W(PW2)) u_adder (
    .a_i   (ar_b),
    .b_i   (br_a),
    .cin_i (1'b0),
    .sum_o (sum),
    .cout_o()
  );

  // (Ar*B + Br*A) - Ar*Br.
  roba_subtractor #(.W(PW2)) u_sub (
    .a_i     (sum),
    .b_i     (ar_br),
    .diff_o  (mag),
    .borrow_o()
  );

endmodule
