// dwgt_const: DWGT(A) = Tr(DWGP(A)) as a constant array of 2^M single bits.
//
// Every entry is computed while the design elaborates from the definitions of
// DWGP and the absolute trace (wg_pkg::wg_dwgp_f, wg_pkg::gf_trace_f).  Used
// for the additional keystream outputs of a multi-bit-per-cycle cipher with
// normal initialisation, which never need the full DWGP value, and for the
// single output of the small fields.  Interface: i_x (M bits) in, o_wgt
// (1 bit) out.  Combinational.
module dwgt_const
  import wg_pkg::*;
#(
  parameter int unsigned M    = 11,
  parameter logic [M:0]  POLY = 12'h805,
  parameter int unsigned D    = 203
) (
  input  logic [M-1:0] i_x,
  output logic         o_wgt
);

  logic [2**M-1:0] table_q;

  for (genvar v = 0; v < 2**M; v++) begin : g_entry
    localparam logic VAL = gf_trace_f(wg_dwgp_f(v, M, 32'(POLY), D), M, 32'(POLY));
    assign table_q[v] = VAL;
  end

  assign o_wgt = table_q[i_x];

endmodule
