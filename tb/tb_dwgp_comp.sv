// tb_dwgp_comp: checks the discrete-components DWGP exhaustively against the
// definition h(A^d + 1) + 1: WG-11 (x^11+x^2+1) with d = 203 and d = 1, and
// WG-5 (x^5+x^4+x^3+x+1) with d = 11.  Also checks that each is a
// permutation of the field (every output value appears exactly once).
module tb_dwgp_comp;
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

  logic [10:0] a, z203, z1;
  logic [4:0]  b, z11;

  dwgp_comp                    u203 (.i_x(a), .o_wgp(z203));
  dwgp_comp #(.D(1))           u1   (.i_x(a), .o_wgp(z1));
  dwgp_comp #(.M(5), .POLY(6'h3B), .D(11)) u5 (.i_x(b), .o_wgp(z11));

  initial begin
    bit seen203 [2048];
    bit seen1   [2048];
    bit seen5   [32];
    int n203, n1, n5;
    n203 = 0; n1 = 0; n5 = 0;
    for (int i = 0; i < 2048; i++) begin seen203[i] = 0; seen1[i] = 0; end
    for (int i = 0; i < 32; i++) seen5[i] = 0;
    for (int i = 0; i < 2048; i++) begin
      a = 11'(i); #1;
      chk(z203, ref_dwgp(i, 11, 'h805, 203), "dwgp11 d=203");
      chk(z1, ref_dwgp(i, 11, 'h805, 1), "dwgp11 d=1");
      if (!seen203[z203]) n203++;
      if (!seen1[z1]) n1++;
      seen203[z203] = 1; seen1[z1] = 1;
    end
    for (int i = 0; i < 32; i++) begin
      b = 5'(i); #1;
      chk(z11, ref_dwgp(i, 5, 'h3B, 11), "dwgp5 d=11");
      if (!seen5[z11]) n5++;
      seen5[z11] = 1;
    end
    chk(n203, 2048, "permutation d=203");
    chk(n1, 2048, "permutation d=1");
    chk(n5, 32, "permutation WG-5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
