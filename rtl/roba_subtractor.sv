// roba_subtractor: W-bit subtractor computing a_i - b_i modulo 2^W.
//
// In the RoBA multiplier it subtracts Ar*Br from (Ar*B + Br*A); the difference
// is the magnitude of the approximate product. It is built as a_i + ~b_i + 1 on
// a Kogge-Stone adder. borrow_o is 1 when b_i > a_i as unsigned numbers.
//
// Interface: a_i, b_i (W bits) -> diff_o (W bits), borrow_o.
// Timing: purely combinational, one Kogge-Stone adder.
// The subtractor's place in the datapath follows the RoBA scheme; its
// two's-complement-add structure is this design's own choice.
module roba_subtractor #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic [W-1:0] diff_o,
  output logic         borrow_o
);

  logic cout;

  roba_ks_adder #(.W(W)) u_add (
    .a_i   (a_i),
    .b_i   (~b_i),
    .cin_i (1'b1),
    .sum_o (diff_o),
    .cout_o(cout)
  );

  assign borrow_o = ~cout;

endmodule
