// tb_dwgt_const: checks the constant-array DWGT exhaustively against
// Tr(DWGP(A)) for WG-11 (d = 203) and WG-8 (d = 19), and its balance.
module tb_dwgt_const;
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

  logic [10:0] a;
  logic [7:0]  b;
  logic        t11, t8;

  dwgt_const                                u11 (.i_x(a), .o_wgt(t11));
  dwgt_const #(.M(8), .POLY(9'h165), .D(19)) u8  (.i_x(b), .o_wgt(t8));

  initial begin
    int ones;
    ones = 0;
    for (int i = 0; i < 2048; i++) begin
      a = 11'(i); #1;
      chk(t11, ref_dwgt(i, 11, 'h805, 203), "dwgt11");
      ones += t11;
    end
    chk(ones, 1024, "balance WG-11");
    for (int i = 0; i < 256; i++) begin
      b = 8'(i); #1;
      chk(t8, ref_dwgt(i, 8, 'h165, 19), "dwgt8");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
