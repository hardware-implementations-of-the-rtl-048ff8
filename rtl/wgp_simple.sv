// wgp_simple: the power terms of the WG permutation polynomial h(A).
//
// With k such that 3k = 1 (mod M), h(A) = A + A^r1 + A^r2 + A^r3 + A^r4 is
// rewritten so that it needs only squarer chains, one inversion and four
// multipliers.  This block produces the terms that need no multiplier except
// the inversion:
//   o_a2k    = A^(2^k)              (k squarers)
//   o_a22k   = A^(2^(2k))           (k more squarers)
//   o_inv    = A^(-1) = A^(2^M - 2) (gf_exp, Algorithm 2; 0 maps to 0)
//   o_inv2k  = (A^(-1))^(2^k)       (k squarers)
// wgp_compose multiplies and adds them.  The split of the permutation into a
// "simple" and a "compose" part follows the structure of this cipher family;
// which terms land in which part is this design's reading of it.
// Combinational.
module wgp_simple
  import wg_pkg::*;
#(
  parameter int unsigned M    = 11,
  parameter logic [M:0]  POLY = 12'h805
) (
  input  logic [M-1:0] i_a,
  output logic [M-1:0] o_a2k,
  output logic [M-1:0] o_a22k,
  output logic [M-1:0] o_inv,
  output logic [M-1:0] o_inv2k
);

  localparam int unsigned K = wg_k_f(M);

  gf_sqr_chain #(.M(M), .POLY(POLY), .N(K)) u_a2k  (.i_a(i_a),   .o_z(o_a2k));
  gf_sqr_chain #(.M(M), .POLY(POLY), .N(K)) u_a22k (.i_a(o_a2k), .o_z(o_a22k));
  gf_exp       #(.M(M), .POLY(POLY), .D((1 << M) - 2)) u_inv (.i_a(i_a), .o_z(o_inv));
  gf_sqr_chain #(.M(M), .POLY(POLY), .N(K)) u_inv2k (.i_a(o_inv), .o_z(o_inv2k));

  initial begin
    assert (K != 0) else $error("wgp_simple: no k with 3k = 1 mod M (M divisible by 3)");
  end

endmodule
