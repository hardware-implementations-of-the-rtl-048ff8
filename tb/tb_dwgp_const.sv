// tb_dwgp_const: checks the constant-array DWGP exhaustively against the
// definition for WG-8 (x^8+x^6+x^5+x^2+1, d = 19) and WG-5 (d = 11), and that
// both tables are permutations.
module tb_dwgp_const;
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

  logic [7:0] a, z8;
  logic [4:0] b, z5;

  dwgp_const                               u8 (.i_x(a), .o_wgp(z8));
  dwgp_const #(.M(5), .POLY(6'h3B), .D(11)) u5 (.i_x(b), .o_wgp(z5));

  initial begin
    bit seen8 [256];
    bit seen5 [32];
    int n8, n5;
    n8 = 0; n5 = 0;
    for (int i = 0; i < 256; i++) seen8[i] = 0;
    for (int i = 0; i < 32; i++) seen5[i] = 0;
    for (int i = 0; i < 256; i++) begin
      a = 8'(i); #1;
      chk(z8, ref_dwgp(i, 8, 'h165, 19), "dwgp8");
      if (!seen8[z8]) n8++;
      seen8[z8] = 1;
    end
    for (int i = 0; i < 32; i++) begin
      b = 5'(i); #1;
      chk(z5, ref_dwgp(i, 5, 'h3B, 11), "dwgp5");
      if (!seen5[z5]) n5++;
      seen5[z5] = 1;
    end
    chk(n8, 256, "permutation WG-8");
    chk(n5, 32, "permutation WG-5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
