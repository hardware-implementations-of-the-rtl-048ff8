// wgp_compose: combines the power terms from wgp_simple into h(A).
//
//   h(A) = A + A * ( A^(2^k) + A^(2^2k) * A^(2^k) + A^(2^2k) * (A^-1)^(2^k) )
//            + A^-1 * ( A^(2^2k) * A^(2^k) )
//
// which equals A + A^r1 + A^r2 + A^r3 + A^r4 with r1 = 2^k + 1,
// r2 = 2^2k + 2^k + 1, r3 = 2^2k - 2^k + 1, r4 = 2^2k + 2^k - 1 (for A = 0 both
// are 0).  The shared product A^(2^2k) * A^(2^k) is formed once, so the block
// has four multipliers.  Combinational.
module wgp_compose #(
  parameter int unsigned M    = 11,
  parameter logic [M:0]  POLY = 12'h805
) (
  input  logic [M-1:0] i_a,
  input  logic [M-1:0] i_a2k,
  input  logic [M-1:0] i_a22k,
  input  logic [M-1:0] i_inv,
  input  logic [M-1:0] i_inv2k,
  output logic [M-1:0] o_h
);

  logic [M-1:0] p_22k_2k;    // A^(2^2k + 2^k)
  logic [M-1:0] p_22k_i2k;   // A^(2^2k - 2^k)
  logic [M-1:0] p_a;         // A * ( ... )
  logic [M-1:0] p_inv;       // A^-1 * A^(2^2k + 2^k)

  gf_mul #(.M(M), .POLY(POLY)) u_m1 (.i_a(i_a22k), .i_b(i_a2k),   .o_z(p_22k_2k));
  gf_mul #(.M(M), .POLY(POLY)) u_m2 (.i_a(i_a22k), .i_b(i_inv2k), .o_z(p_22k_i2k));
  gf_mul #(.M(M), .POLY(POLY)) u_m3 (.i_a(i_a), .i_b(i_a2k ^ p_22k_2k ^ p_22k_i2k), .o_z(p_a));
  gf_mul #(.M(M), .POLY(POLY)) u_m4 (.i_a(i_inv), .i_b(p_22k_2k), .o_z(p_inv));

  assign o_h = i_a ^ p_a ^ p_inv;

endmodule
