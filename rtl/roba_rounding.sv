// roba_rounding: rounds an unsigned operand to its nearest power of two.
//
// Let k be the position of the operand's leading one, so that
// 2^k <= x < 2^(k+1). The two candidates are 2^k and 2^(k+1), and 2^(k+1) is the
// nearer one exactly when x > 3*2^(k-1); at x = 3*2^(k-1) both are equally near.
// Such ties are rounded up, which makes the rule "round up when bit k-1 is one",
// with one exception: x = 3 (k = 1) rounds down to 2. Zero stays zero. The
// output is therefore one-hot (or zero), and bit i of it is set when
//   - bit i-1 is the leading one, bit i-2 is one and i-1 >= 2 (round up), or
//   - bit i is the leading one and not (bit i-1 is one and i >= 2) (round down).
// For i = N this reduces to r[N] = x[N-1] & x[N-2].
//
// OW selects the output width. For unsigned operands (U-RoBA) OW = N + 1, since
// 11x..x rounds to 2^N. For the absolute value of a signed N-bit operand,
// OW = N is enough: that value never exceeds 2^(N-1), so bits N-1 and N-2 are
// never both one and r[N] would always be zero.
//
// Interface: x_i (N bits) -> r_o (OW bits, one-hot or zero).
// Timing: purely combinational; a leading-one detector (prefix OR from the top)
// followed by one AND-OR per output bit.
// The rounding rule, the tie rule, the exception for 3 and the r[N] equation are
// those of the RoBA scheme; the leading-one circuit is this design's own.
module roba_rounding #(
  parameter int unsigned N  = 32,
  parameter int unsigned OW = N + 1
) (
  input  logic [N-1:0]  x_i,
  output logic [OW-1:0] r_o
);

  // lead[i]: bit i is the most significant one of x_i.
  logic [N-1:0] lead;
  // above[i]: some bit above position i is one.
  logic [N:0]   above;

  always_comb begin
    above[N] = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      lead[i]  = x_i[i] & ~above[i+1];
      above[i] = above[i+1] | x_i[i];
    end
  end

  always_comb begin
    for (int i = 0; i < int'(OW); i++) begin
      logic up, down;
      up   = 1'b0;
      down = 1'b0;
      if (i >= 3 && i - 1 < int'(N))
        up = lead[i-1] & x_i[i-2];
      if (i < int'(N)) begin
        if (i >= 2)
          down = lead[i] & ~x_i[i-1];
        else
          down = lead[i];
      end
      r_o[i] = up | down;
    end
  end

endmodule
