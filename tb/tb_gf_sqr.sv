// tb_gf_sqr: checks gf_sqr (exhaustively for the WG-10 field
// x^10+x^5+x^3+x^2+1 and the WG-11 field) and gf_sqr_chain (chains of 3 and
// 7 squarers, A^(2^n)) against the reference arithmetic.  Also checks the
// squaring equation of GF(2^10), f = x^10 + x^3 + 1, coefficient by
// coefficient.
module tb_gf_sqr;
  import tb_gf_pkg::*;

  int checks = 0, failures = 0;

  logic [9:0]  a10, z10, ae, ze;
  logic [10:0] a11, z11, c3, c7;

  gf_sqr #(.M(10), .POLY(11'h42D)) u10 (.i_a(a10), .o_z(z10));
  gf_sqr #(.M(10), .POLY(11'h409)) ue  (.i_a(ae),  .o_z(ze));
  gf_sqr                           u11 (.i_a(a11), .o_z(z11));
  gf_sqr_chain #(.N(3)) uc3 (.i_a(a11), .o_z(c3));
  gf_sqr_chain #(.N(7)) uc7 (.i_a(a11), .o_z(c7));

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
    logic [9:0] e;
    for (int i = 0; i < 1024; i++) begin
      a10 = 10'(i); ae = 10'(i); #1;
      chk(z10, ref_mul(i, i, 10, 'h42D), "sqr10");
      // A^2 for f = x^10 + x^3 + 1, written out by hand
      e[9] = ae[8];
      e[8] = ae[9] ^ ae[4];
      e[7] = ae[7];
      e[6] = ae[8] ^ ae[3];
      e[5] = ae[6];
      e[4] = ae[9] ^ ae[7] ^ ae[2];
      e[3] = ae[5];
      e[2] = ae[6] ^ ae[1];
      e[1] = ae[9];
      e[0] = ae[5] ^ ae[0];
      chk(ze, e, "sqr10 equation");
    end
    for (int i = 0; i < 2048; i++) begin
      a11 = 11'(i); #1;
      chk(z11, ref_mul(i, i, 11, 'h805), "sqr11");
      chk(c3, ref_pow(i, 8, 11, 'h805), "chain3");
      chk(c7, ref_pow(i, 128, 11, 'h805), "chain7");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
