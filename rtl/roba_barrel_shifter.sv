// roba_barrel_shifter: multiplies an operand by a power of two.
//
// In the RoBA multiplier every product that involves a rounded operand is a
// product with a power of two, so it is a left shift. This block takes the data
// word d_i and the rounded value p_i (one-hot, or zero) and returns
// d_i * p_i truncated to OW bits. The one-hot value is first encoded into a
// binary shift amount (bit j of the amount is the OR of all bits of p_i whose
// index has bit j set); a logarithmic barrel shifter then shifts by 1, 2, 4, ...
// positions in successive stages. When p_i is zero the output is forced to zero.
//
// Interface: d_i (DW bits), p_i (PW bits) -> prod_o (OW bits).
// Timing: purely combinational, $clog2(PW) mux stages.
// The use of barrel shifters with 2N-bit outputs follows the RoBA scheme; the
// one-hot encoder and the zero gating are this design's own.
module roba_barrel_shifter #(
  parameter int unsigned DW = 32,
  parameter int unsigned PW = 32,
  parameter int unsigned OW = 64
) (
  input  logic [DW-1:0] d_i,
  input  logic [PW-1:0] p_i,
  output logic [OW-1:0] prod_o
);

  localparam int unsigned SW = (PW > 1) ? $clog2(PW) : 1;

  logic [SW-1:0] shamt;
  logic          nonzero;

  // One-hot to binary encoder.
  always_comb begin
    shamt = '0;
    for (int i = 0; i < int'(PW); i++) begin
      for (int j = 0; j < int'(SW); j++) begin
        if (((i >> j) & 1) == 1)
          shamt[j] = shamt[j] | p_i[i];
      end
    end
    nonzero = |p_i;
  end

  // Logarithmic shifter: stage j shifts by 2^j when shamt[j] is set.
  always_comb begin
    logic [OW-1:0] stage;
    stage = OW'(d_i);
    for (int j = 0; j < int'(SW); j++) begin
      if (shamt[j])
        stage = stage << (1 << j);
    end
    prod_o = nonzero ? stage : '0;
  end

endmodule
