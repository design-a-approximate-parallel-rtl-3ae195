// roba_ref_pkg: reference model of RoBA multiplication for the testbenches.
//
// Written from the arithmetic definition, not from the RTL structure: the
// nearest power of two is found by comparing distances to the two candidates,
// and the product is evaluated with wide signed integer arithmetic.
// Operand widths up to 64 bits are supported.
package roba_ref_pkg;

  // Variant codes, independent of the RTL enum: 0 S-RoBA, 1 AS-RoBA, 2 U-RoBA.
  localparam int REF_S  = 0;
  localparam int REF_AS = 1;
  localparam int REF_U  = 2;

  // Nearest power of two; ties go up, except 3 which goes to 2; 0 stays 0.
  function automatic logic [64:0] ref_round(input logic [63:0] x);
    logic [64:0] lower, upper, dl, du;
    int p;
    if (x == 0) return '0;
    p = 0;
    for (int i = 0; i < 64; i++) if (x[i]) p = i;
    lower = 65'(1) << p;
    upper = lower << 1;
    dl = {1'b0, x} - lower;
    du = upper - {1'b0, x};
    if (dl < du) return lower;
    if (dl > du) return upper;
    return (x == 64'd3) ? lower : upper;
  endfunction

  // Approximate product of n-bit operands a, b, as a 2n-bit value in the low
  // bits of the result.
  function automatic logic [127:0] ref_roba(input logic [63:0] a, input logic [63:0] b,
                                           input int n, input int variant);
    logic signed [131:0] sa, sb, aa, ab, ar, br, m;
    logic [127:0] mask, r;
    logic neg;
    mask = (n == 64) ? '1 : ((128'(1) << (2 * n)) - 1);
    if (variant == REF_U) begin
      aa = 132'(a);
      ab = 132'(b);
      neg = 1'b0;
    end else begin
      sa = 132'(a);
      sb = 132'(b);
      if (a[n-1]) sa = sa - (132'(1) << n);
      if (b[n-1]) sb = sb - (132'(1) << n);
      aa = (sa < 0) ? -sa : sa;
      ab = (sb < 0) ? -sb : sb;
      neg = (sa < 0) != (sb < 0);
    end
    ar = 132'(ref_round(64'(aa)));
    br = 132'(ref_round(64'(ab)));
    m = ar * ab + br * aa - ar * br;
    if (neg) begin
      if (variant == REF_S) m = -m;
      else m = -m - 1;
    end
    r = 128'(m);
    return r & mask;
  endfunction

endpackage
