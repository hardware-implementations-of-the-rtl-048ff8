// tb_dwgt_comp: checks the discrete-components DWGT (DWGP + trace) for WG-11,
// d = 203, exhaustively, with both trace forms: the DWGP output against the
// definition and the keystream bit against Tr(DWGP(A)); and that the bit is
// balanced (1024 ones over the field).
module tb_dwgt_comp;
  import tb_gf_pkg::*;
  int checks = 0, failures = 0;

  task automatic chk(int unsigned got, int unsigned exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [10:0] a, p0, p1;
  logic        t0, t1;

  dwgt_comp                    u0 (.i_x(a), .o_wgp(p0), .o_wgt(t0));
  dwgt_comp #(.TRACE_EQ(1'b1)) u1 (.i_x(a), .o_wgp(p1), .o_wgt(t1));

  initial begin
    int ones;
    ones = 0;
    for (int i = 0; i < 2048; i++) begin
      a = 11'(i); #1;
      chk(p0, ref_dwgp(i, 11, 'h805, 203), "dwgp");
      chk(t0, ref_dwgt(i, 11, 'h805, 203), "dwgt chain trace");
      chk(t1, ref_dwgt(i, 11, 'h805, 203), "dwgt equation trace");
      chk(p1, p0, "dwgp equal");
      ones += t0;
    end
    chk(ones, 1024, "balance");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
