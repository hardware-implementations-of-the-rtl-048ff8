// tb_wgp_compose: feeds wgp_compose the power terms computed by the reference
// arithmetic and checks h(A) = A + A^r1 + A^r2 + A^r3 + A^r4 for every A of
// the WG-11 field and of the WG-7 field (x^7+x^6+x^5+x^3+x^2+x+1, k = 5).
module tb_wgp_compose;
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

  logic [10:0] a, a2k, a22k, inv, inv2k, h;
  logic [6:0]  b, b2k, b22k, binv, binv2k, h7;

  wgp_compose u11 (.i_a(a), .i_a2k(a2k), .i_a22k(a22k), .i_inv(inv), .i_inv2k(inv2k), .o_h(h));
  wgp_compose #(.M(7), .POLY(8'hEF)) u7 (.i_a(b), .i_a2k(b2k), .i_a22k(b22k), .i_inv(binv),
                                         .i_inv2k(binv2k), .o_h(h7));

  initial begin
    int unsigned k;
    for (int i = 0; i < 2048; i++) begin
      a     = 11'(i);
      a2k   = 11'(ref_pow(i, 16, 11, 'h805));
      a22k  = 11'(ref_pow(i, 256, 11, 'h805));
      inv   = 11'(ref_pow(i, 2046, 11, 'h805));
      inv2k = 11'(ref_pow(inv, 16, 11, 'h805));
      #1;
      chk(h, ref_h(i, 11, 'h805), "h11");
    end
    k = ref_k(7);
    chk(k, 5, "k for WG-7");
    for (int i = 0; i < 128; i++) begin
      b      = 7'(i);
      b2k    = 7'(ref_pow(i, 1 << k, 7, 'hEF));
      b22k   = 7'(ref_pow(i, 1 << (2 * k), 7, 'hEF));
      binv   = 7'(ref_pow(i, 126, 7, 'hEF));
      binv2k = 7'(ref_pow(binv, 1 << k, 7, 'hEF));
      #1;
      chk(h7, ref_h(i, 7, 'hEF), "h7");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
