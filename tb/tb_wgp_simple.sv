// tb_wgp_simple: checks the power terms of the WG permutation for WG-11
// (k = 4): A^(2^k), A^(2^2k), A^-1 and (A^-1)^(2^k), exhaustively.
module tb_wgp_simple;
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

  logic [10:0] a, a2k, a22k, inv, inv2k;

  wgp_simple u (.i_a(a), .o_a2k(a2k), .o_a22k(a22k), .o_inv(inv), .o_inv2k(inv2k));

  initial begin
    int unsigned r_inv;
    chk(ref_k(11), 4, "k for WG-11");
    for (int i = 0; i < 2048; i++) begin
      a = 11'(i); #1;
      r_inv = ref_pow(i, 2046, 11, 'h805);
      chk(a2k, ref_pow(i, 16, 11, 'h805), "A^(2^k)");
      chk(a22k, ref_pow(i, 256, 11, 'h805), "A^(2^2k)");
      chk(inv, r_inv, "A^-1");
      chk(inv2k, ref_pow(r_inv, 16, 11, 'h805), "(A^-1)^(2^k)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
