// tb_gf_mul: checks gf_mul against the reference multiplier of tb_gf_pkg.
// Three fields: GF(2^5) with f = x^5+x^2+1 (exhaustive; includes the
// reduction example x^8 = x^3 + x^2 + 1), the WG-11 field x^11+x^2+1
// (random pairs) and the WG-16 field (random pairs).
module tb_gf_mul;
  import tb_gf_pkg::*;

  int checks = 0, failures = 0;

  logic [4:0]  a5, b5, z5;
  logic [10:0] a11, b11, z11;
  logic [15:0] a16, b16, z16;

  gf_mul #(.M(5),  .POLY(6'h25))      u5  (.i_a(a5),  .i_b(b5),  .o_z(z5));
  gf_mul                              u11 (.i_a(a11), .i_b(b11), .o_z(z11));
  gf_mul #(.M(16), .POLY(17'h155F5))  u16 (.i_a(a16), .i_b(b16), .o_z(z16));

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
    // alpha^4 * alpha^4 = alpha^8 = alpha^3 + alpha^2 + 1
    a5 = 5'h10; b5 = 5'h10; #1;
    chk(z5, 5'h0D, "x^8 mod x^5+x^2+1");
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j); #1;
        chk(z5, ref_mul(i, j, 5, 'h25), "gf5");
      end
    for (int n = 0; n < 20000; n++) begin
      a11 = 11'($urandom); b11 = 11'($urandom); #1;
      chk(z11, ref_mul(a11, b11, 11, 'h805), "gf11");
    end
    for (int n = 0; n < 5000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); #1;
      chk(z16, ref_mul(a16, b16, 16, 'h155F5), "gf16");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
