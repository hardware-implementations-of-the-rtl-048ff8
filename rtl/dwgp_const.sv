// dwgp_const: DWGP(A) = h(A^D + 1) + 1 as a constant array (lookup table).
//
// The table has 2^M entries of M bits.  Each entry is computed while the
// design elaborates from the definition of DWGP (wg_pkg::wg_dwgp_f: direct
// exponentiations A^d, A^r1 .. A^r4 by square-and-multiply), so the table is
// never stored as a data file.  Synthesis turns the array into logic; for
// small fields (WG-5 .. WG-10) that is smaller than the discrete components.
// Interface: i_x (M bits) in, o_wgp (M bits) out.  Combinational.
module dwgp_const
  import wg_pkg::*;
#(
  parameter int unsigned M    = 8,
  parameter logic [M:0]  POLY = 9'h165,   // x^8 + x^6 + x^5 + x^2 + 1
  parameter int unsigned D    = 19
) (
  input  logic [M-1:0] i_x,
  output logic [M-1:0] o_wgp
);

  logic [M-1:0] table_q [2**M];

  for (genvar v = 0; v < 2**M; v++) begin : g_entry
    localparam logic [M-1:0] VAL = M'(wg_dwgp_f(v, M, 32'(POLY), D));
    assign table_q[v] = VAL;
  end

  assign o_wgp = table_q[i_x];

endmodule
