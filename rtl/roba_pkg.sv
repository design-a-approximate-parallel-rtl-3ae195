// roba_pkg: shared types for the rounding-based approximate (RoBA) multiplier.
//
// The multiplier exists in three variants that share one datapath:
//   ROBA_SIGNED         S-RoBA:  two's complement operands, the final negation is
//                       exact (~X + 1).
//   ROBA_SIGNED_APPROX  AS-RoBA: as S-RoBA, but the final negation skips the
//                       increment (~X), so a negative product is one below the
//                       S-RoBA value, in exchange for a shorter critical path.
//   ROBA_UNSIGNED       U-RoBA:  unsigned operands; there is no sign detector and
//                       no sign set stage, and the rounded value is one bit wider
//                       than the operand.
// The variant names and their definitions follow the published RoBA scheme; the
// enum encoding is this design's own choice.
package roba_pkg;

  typedef enum logic [1:0] {
    ROBA_SIGNED        = 2'd0,
    ROBA_SIGNED_APPROX = 2'd1,
    ROBA_UNSIGNED      = 2'd2
  } roba_variant_e;

  // Default operand width: 32-bit operands and a 64-bit product.
  localparam int unsigned ROBA_DEFAULT_N = 32;

endpackage
