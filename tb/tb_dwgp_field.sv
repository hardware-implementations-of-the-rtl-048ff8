// tb_dwgp_field: helper for tb_dwgp_fields.  Checks the WG permutation and
// transformation blocks of one field GF(2^M) against the reference model of
// tb_gf_pkg, for the field polynomials that gave the smallest area when the
// blocks were profiled over all primitive polynomials:
//   * discrete components (polynomial PC): dwgt_comp with d = 1 and d = DD,
//     checking both the DWGP value and its trace (squarer-chain trace);
//   * constant arrays (polynomial PK, only if CONST): dwgp_const, dwgt_const,
//     and dwgp_const followed by the equation-form trace, the three ways of
//     building a DWGT from tables, all with d = 1.
// Inputs are exhaustive when NSAMP >= 2^M, otherwise NSAMP random values
// (always including 0 and 1).  Purely combinational blocks: one input per
// time step.  Interface: outputs done, checks and failures for the parent.
module tb_dwgp_field
  import tb_gf_pkg::*;
#(
  parameter int unsigned M     = 5,
  parameter logic [M:0]  PC    = 6'h29,
  parameter logic [M:0]  PK    = 6'h3B,
  parameter int unsigned DD    = 11,
  parameter bit          CONST = 1'b1,
  parameter int unsigned NSAMP = 32,
  parameter string       NAME  = "WG-5"
) (
  output logic done,
  output int   checks,
  output int   failures
);

  logic [M-1:0] a;
  logic [M-1:0] p1, pd;
  logic         t1, td;

  dwgt_comp #(.M(M), .POLY(PC), .D(1))  u_c1 (.i_x(a), .o_wgp(p1), .o_wgt(t1));
  dwgt_comp #(.M(M), .POLY(PC), .D(DD)) u_cd (.i_x(a), .o_wgp(pd), .o_wgt(td));

  logic [M-1:0] kp;
  logic         kt, ke;

  if (CONST) begin : g_const
    dwgp_const #(.M(M), .POLY(PK), .D(1)) u_kp (.i_x(a), .o_wgp(kp));
    dwgt_const #(.M(M), .POLY(PK), .D(1)) u_kt (.i_x(a), .o_wgt(kt));
    gf_trace #(.M(M), .POLY(PK), .EQUATION(1'b1)) u_ke (.i_a(kp), .o_z(ke));
  end else begin : g_noconst
    assign kp = '0;
    assign kt = 1'b0;
    assign ke = 1'b0;
  end

  task automatic chk(int unsigned got, int unsigned exp, string what, int unsigned x);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s %s at %h: got %h expected %h", NAME, what, x, got, exp);
    end
  endtask

  initial begin
    int unsigned n, x;
    done = 0; checks = 0; failures = 0;
    n = (NSAMP >= 2**M) ? 2**M : NSAMP;
    for (int unsigned i = 0; i < n; i++) begin
      if (n == 2**M || i < 2) x = i;
      else x = $urandom() & ((1 << M) - 1);
      a = M'(x);
      #1;
      chk(p1, ref_dwgp(x, M, PC, 1), "comp DWGP d=1", x);
      chk(t1, ref_dwgt(x, M, PC, 1), "comp DWGT d=1", x);
      chk(pd, ref_dwgp(x, M, PC, DD), "comp DWGP d=D", x);
      chk(td, ref_dwgt(x, M, PC, DD), "comp DWGT d=D", x);
      if (CONST) begin
        chk(kp, ref_dwgp(x, M, PK, 1), "const DWGP", x);
        chk(kt, ref_dwgt(x, M, PK, 1), "const DWGT", x);
        chk(ke, ref_dwgt(x, M, PK, 1), "const DWGP + trace equation", x);
      end
    end
    $display("[%s] checks=%0d failures=%0d", NAME, checks, failures);
    done = 1;
  end
endmodule
