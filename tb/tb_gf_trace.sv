// tb_gf_trace: checks both forms of gf_trace (squarer chains and linear
// equation) exhaustively for the WG-11 and WG-13 fields, and that the trace is
// balanced (half of the elements have trace 1).
module tb_gf_trace;
  import tb_gf_pkg::*;

  int checks = 0, failures = 0;

  logic [10:0] a11;
  logic [12:0] a13;
  logic        t11c, t11e, t13c, t13e;

  gf_trace                                       uc11 (.i_a(a11), .o_z(t11c));
  gf_trace #(.EQUATION(1'b1))                    ue11 (.i_a(a11), .o_z(t11e));
  gf_trace #(.M(13), .POLY(14'h3A75))            uc13 (.i_a(a13), .o_z(t13c));
  gf_trace #(.M(13), .POLY(14'h3A75), .EQUATION(1'b1)) ue13 (.i_a(a13), .o_z(t13e));

  task automatic chk(int unsigned got, int unsigned exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones11, ones13;
    ones11 = 0; ones13 = 0;
    for (int i = 0; i < 2048; i++) begin
      a11 = 11'(i); #1;
      chk(t11c, ref_trace(i, 11, 'h805), "tr11 chain");
      chk(t11e, ref_trace(i, 11, 'h805), "tr11 equation");
      ones11 += t11c;
    end
    for (int i = 0; i < 8192; i++) begin
      a13 = 13'(i); #1;
      chk(t13c, ref_trace(i, 13, 'h3A75), "tr13 chain");
      chk(t13e, ref_trace(i, 13, 'h3A75), "tr13 equation");
      ones13 += t13e;
    end
    chk(ones11, 1024, "tr11 balance");
    chk(ones13, 4096, "tr13 balance");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
