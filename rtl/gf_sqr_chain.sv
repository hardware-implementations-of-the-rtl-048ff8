// gf_sqr_chain: N squarers in series, o_z = i_a^(2^N) in GF(2^M).
//
// Chains of squarers appear throughout the WG permutation (A^(2^k),
// A^(2^(2k))), in the exponentiation blocks and in the trace.  Each link is a
// gf_sqr; cancelling XOR terms along the chain are left to synthesis.  N = 0
// is a plain wire.  Combinational.
module gf_sqr_chain #(
  parameter int unsigned M    = 11,
  parameter logic [M:0]  POLY = 12'h805,
  parameter int unsigned N    = 1
) (
  input  logic [M-1:0] i_a,
  output logic [M-1:0] o_z
);

  logic [M-1:0] link [N+1];

  assign link[0] = i_a;

  for (genvar i = 0; i < N; i++) begin : g_sq
    gf_sqr #(.M(M), .POLY(POLY)) u_sq (.i_a(link[i]), .o_z(link[i+1]));
  end

  assign o_z = link[N];

endmodule
