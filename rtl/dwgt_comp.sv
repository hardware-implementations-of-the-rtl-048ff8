// dwgt_comp: decimated WG transformation DWGT(A) = Tr(DWGP(A)), one keystream
// bit, built from discrete components: dwgp_comp followed by gf_trace.
//
// The intermediate DWGP value is brought out as well (o_wgp), because the
// cipher feeds it back into the LFSR during initialisation.  TRACE_EQ selects
// the trace form (0: squarer chains, 1: linear equation; same function).
// Interface: i_x (M bits) in; o_wgp (M bits), o_wgt (1 bit) out.
// Combinational.
module dwgt_comp #(
  parameter int unsigned M        = 11,
  parameter logic [M:0]  POLY     = 12'h805,
  parameter int unsigned D        = 203,
  parameter bit          TRACE_EQ = 1'b0
) (
  input  logic [M-1:0] i_x,
  output logic [M-1:0] o_wgp,
  output logic         o_wgt
);

  dwgp_comp #(.M(M), .POLY(POLY), .D(D)) u_dwgp (.i_x(i_x), .o_wgp(o_wgp));
  gf_trace  #(.M(M), .POLY(POLY), .EQUATION(TRACE_EQ)) u_tr (.i_a(o_wgp), .o_z(o_wgt));

endmodule
