// gf_trace: absolute trace Tr(A) = A + A^2 + A^4 + ... + A^(2^(M-1)),
// mapping an element of GF(2^M) to one bit.
//
// Two implementations, chosen by EQUATION:
//   EQUATION = 0: the definition in hardware, the sum of squarer chains of
//                 length 0 .. M-1.  The sum is 0 or 1, so its bit 0 is the
//                 trace and the other bits are zero.
//   EQUATION = 1: the trace is linear, Tr(A) = XOR of a_i * Tr(alpha^i), so it
//                 reduces to an XOR of the input bits selected by a mask.  The
//                 mask is computed from POLY while the design elaborates.
//                 This small form is what the larger fields (WG-13, -14, -16)
//                 use, where synthesis failed to simplify the squarer chains.
// Both give the same function.  Interface: i_a (M bits) in, o_z (1 bit) out.
// Combinational.
module gf_trace
  import wg_pkg::*;
#(
  parameter int unsigned M        = 11,
  parameter logic [M:0]  POLY     = 12'h805,
  parameter bit          EQUATION = 1'b0
) (
  input  logic [M-1:0] i_a,
  output logic         o_z
);

  // Tr(alpha^i) for every basis element: the mask of the linear equation.
  function automatic logic [M-1:0] trace_mask();
    logic [M-1:0] msk;
    for (int unsigned i = 0; i < M; i++)
      msk[i] = gf_trace_f(32'd1 << i, M, 32'(POLY));
    return msk;
  endfunction

  if (EQUATION) begin : g_eq
    localparam logic [M-1:0] MASK = trace_mask();

    assign o_z = ^(i_a & MASK);
  end else begin : g_chain
    logic [M-1:0] pw [M];     // pw[i] = A^(2^i)
    logic [M-1:0] sum;

    assign pw[0] = i_a;
    for (genvar i = 1; i < M; i++) begin : g_sq
      gf_sqr #(.M(M), .POLY(POLY)) u_sq (.i_a(pw[i-1]), .o_z(pw[i]));
    end

    always_comb begin
      sum = '0;
      for (int unsigned i = 0; i < M; i++) sum ^= pw[i];
    end

    assign o_z = sum[0];
  end

endmodule
