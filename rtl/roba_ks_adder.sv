// roba_ks_adder: W-bit Kogge-Stone parallel prefix adder with carry in.
//
// Bitwise generate g = a & b and propagate p = a ^ b are combined in
// $clog2(W) prefix levels; at level l each position i >= 2^l merges its
// (G, P) pair with that of position i - 2^l:
//   G = G_hi | (P_hi & G_lo),  P = P_hi & P_lo.
// The carry in enters as the generate term of a virtual position below bit 0.
// After the last level G[i] is the carry out of bit i, and the sum bit i is
// p[i] ^ carry into bit i.
//
// Interface: a_i, b_i (W bits), cin_i -> sum_o (W bits), cout_o.
// Timing: purely combinational, $clog2(W) + 2 gate levels of logic.
// The adder type (Kogge-Stone, 2N bits wide) follows the RoBA scheme; the carry
// input, added so the same adder also serves as the subtractor, is this design's
// own.
module roba_ks_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic         cin_i,
  output logic [W-1:0] sum_o,
  output logic         cout_o
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] g0, p0;
  logic [W-1:0] gl [LEVELS+1];
  logic [W-1:0] pl [LEVELS+1];
  logic [W:0]   carry;

  always_comb begin
    g0 = a_i & b_i;
    p0 = a_i ^ b_i;
    // Fold the carry in into position 0.
    gl[0]    = g0;
    gl[0][0] = g0[0] | (p0[0] & cin_i);
    pl[0]    = p0;
    for (int l = 0; l < int'(LEVELS); l++) begin
      for (int i = 0; i < int'(W); i++) begin
        if (i >= (1 << l)) begin
          gl[l+1][i] = gl[l][i] | (pl[l][i] & gl[l][i-(1<<l)]);
          pl[l+1][i] = pl[l][i] & pl[l][i-(1<<l)];
        end else begin
          gl[l+1][i] = gl[l][i];
          pl[l+1][i] = pl[l][i];
        end
      end
    end
    carry[0] = cin_i;
    for (int i = 0; i < int'(W); i++)
      carry[i+1] = gl[LEVELS][i];
    sum_o  = p0 ^ carry[W-1:0];
    cout_o = carry[W];
  end

endmodule
