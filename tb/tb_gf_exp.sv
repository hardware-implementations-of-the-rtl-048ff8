// tb_gf_exp: checks gf_exp exhaustively over GF(2^11) (x^11+x^2+1) for the
// WG-11 decimation exponent 203, for inversion (2046, also A * A^-1 = 1) and
// for 1 and 2; and over the WG-8 field for exponent 19.  Also checks the
// number of multipliers the chain planner uses: 4 for 203 and 4 for 2046
// in GF(2^11).
module tb_gf_exp;
  import tb_gf_pkg::*;
  import wg_pkg::exp_nmul_f;

  int checks = 0, failures = 0;

  logic [10:0] a, z203, zinv, z1, z2;
  logic [7:0]  b, z19;

  gf_exp                     u203 (.i_a(a), .o_z(z203));
  gf_exp #(.D(2046))         uinv (.i_a(a), .o_z(zinv));
  gf_exp #(.D(1))            u1   (.i_a(a), .o_z(z1));
  gf_exp #(.D(2))            u2   (.i_a(a), .o_z(z2));
  gf_exp #(.M(8), .POLY(9'h165), .D(19)) u19 (.i_a(b), .o_z(z19));

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
    chk(exp_nmul_f(203), 4, "multipliers for 203");
    chk(exp_nmul_f(2046), 4, "multipliers for 2046");
    for (int i = 0; i < 2048; i++) begin
      a = 11'(i); #1;
      chk(z203, ref_pow(i, 203, 11, 'h805), "a^203");
      chk(zinv, ref_pow(i, 2046, 11, 'h805), "a^-1");
      if (i != 0) chk(ref_mul(i, zinv, 11, 'h805), 1, "a*a^-1");
      chk(z1, i, "a^1");
      chk(z2, ref_mul(i, i, 11, 'h805), "a^2");
    end
    for (int i = 0; i < 256; i++) begin
      b = 8'(i); #1;
      chk(z19, ref_pow(i, 19, 8, 'h165), "a^19");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
