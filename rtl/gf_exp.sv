// gf_exp: exponentiation by a fixed exponent, o_z = i_a^D in GF(2^M).
//
// The block is a chain of squarers and multipliers laid out while the design
// elaborates.  The exponent is decomposed from the top down (Algorithm 2,
// see wg_pkg::exp_walk_f), looking at the intermediate exponent T, starting
// with T = D:
//   * T = 2^(2n) - 1:  A^T = (A^(2^n-1))^(2^n) * A^(2^n-1), one multiplier and
//                      n squarers; continue with T = 2^n - 1
//   * T odd:           A^T = A * (A^((T-1)/2))^2, one multiplier, one squarer
//   * T even:          A^T = (A^(T/2))^2, one squarer
// until T = 1.  The hardware then applies those steps in reverse order to the
// input.  The first rule is what makes inversion (D = 2^M - 2) cheap: for
// GF(2^11) it needs 4 multipliers where plain square-and-multiply needs 9.
// For any other exponent it gives the same chain as square-and-multiply.
//
// Interface: i_a, o_z are M-bit field elements.  D >= 1.  Combinational.
// The decomposition rules follow the exponentiation block of this cipher
// family; the step encoding and the recursion-free generate structure are
// this design's own.
module gf_exp
  import wg_pkg::*;
#(
  parameter int unsigned M    = 11,
  parameter logic [M:0]  POLY = 12'h805,
  parameter int unsigned D    = 203
) (
  input  logic [M-1:0] i_a,
  output logic [M-1:0] o_z
);

  localparam int NSTEPS = exp_nsteps_f(longint'(D));

  // stage[0] = A, stage[j+1] = result of applying hardware step j.
  logic [M-1:0] stage [NSTEPS+1];

  assign stage[0] = i_a;

  for (genvar j = 0; j < NSTEPS; j++) begin : g_step
    // Hardware step j realises planner step NSTEPS-1-j.
    localparam int KIND = exp_kind_f(longint'(D), NSTEPS - 1 - j);
    localparam int KN   = exp_n_f(longint'(D), NSTEPS - 1 - j);

    if (KIND == int'(EXP_SQ)) begin : g_sq
      gf_sqr #(.M(M), .POLY(POLY)) u_sq (.i_a(stage[j]), .o_z(stage[j+1]));
    end else if (KIND == int'(EXP_MULA)) begin : g_mula
      logic [M-1:0] sq;
      gf_sqr #(.M(M), .POLY(POLY)) u_sq (.i_a(stage[j]), .o_z(sq));
      gf_mul #(.M(M), .POLY(POLY)) u_mul (.i_a(sq), .i_b(i_a), .o_z(stage[j+1]));
    end else begin : g_kar
      logic [M-1:0] sq;
      gf_sqr_chain #(.M(M), .POLY(POLY), .N(KN)) u_chain (.i_a(stage[j]), .o_z(sq));
      gf_mul #(.M(M), .POLY(POLY)) u_mul (.i_a(sq), .i_b(stage[j]), .o_z(stage[j+1]));
    end
  end

  assign o_z = stage[NSTEPS];

  initial begin
    assert (D >= 1) else $error("gf_exp: exponent must be at least 1");
  end

endmodule
