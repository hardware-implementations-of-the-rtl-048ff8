// gf_sqr: squarer in GF(2^M), polynomial basis.
//
// Squaring is written as the classic multiplier (gf_mul) with both inputs tied
// to the same signal.  Synthesis collapses that multiplier to the small XOR
// network of a squarer (only the coefficients a_i*a_i of even degree survive
// and are then reduced), so no squaring equation has to be derived by hand for
// each field polynomial.  This is how the squarer of this cipher family is
// built; it keeps the whole design generic in M and POLY.
//
// Interface: i_a and o_z = i_a^2 are M-bit field elements.  Combinational.
module gf_sqr #(
  parameter int unsigned M    = 11,
  parameter logic [M:0]  POLY = 12'h805
) (
  input  logic [M-1:0] i_a,
  output logic [M-1:0] o_z
);

  gf_mul #(.M(M), .POLY(POLY)) u_mul (
    .i_a (i_a),
    .i_b (i_a),
    .o_z (o_z)
  );

endmodule
