// dwgp_comp: decimated WG permutation DWGP(A) = h(A^D + 1) + 1 in GF(2^M),
// built from discrete components.
//
// Data flow: decimation A^D (gf_exp, a wire when D = 1), add one (flip bit 0), the WG
// permutation h() split into wgp_simple (squarer chains and the inversion)
// and wgp_compose (four multipliers and the sums), add one again.  The result
// is a permutation of GF(2^M) whenever M is not a multiple of 3 and D is
// coprime to 2^M - 1.  The cipher needs this full M-bit value, not only its
// trace, because it is fed back into the LFSR during initialisation.
//
// Interface: i_x (M bits) in, o_wgp (M bits) out.  Combinational; its delay
// is the longest path of the whole cipher.
module dwgp_comp #(
  parameter int unsigned M    = 11,
  parameter logic [M:0]  POLY = 12'h805,
  parameter int unsigned D    = 203
) (
  input  logic [M-1:0] i_x,
  output logic [M-1:0] o_wgp
);

  logic [M-1:0] x_d, x_d1, a2k, a22k, inv, inv2k, h;

  gf_exp #(.M(M), .POLY(POLY), .D(D)) u_dec (.i_a(i_x), .o_z(x_d));
  // Adding 1 in a polynomial basis flips the coefficient of alpha^0.
  assign x_d1 = x_d ^ M'(1);

  wgp_simple #(.M(M), .POLY(POLY)) u_simple (
    .i_a     (x_d1),
    .o_a2k   (a2k),
    .o_a22k  (a22k),
    .o_inv   (inv),
    .o_inv2k (inv2k)
  );

  wgp_compose #(.M(M), .POLY(POLY)) u_compose (
    .i_a     (x_d1),
    .i_a2k   (a2k),
    .i_a22k  (a22k),
    .i_inv   (inv),
    .i_inv2k (inv2k),
    .o_h     (h)
  );

  assign o_wgp = h ^ M'(1);

endmodule
