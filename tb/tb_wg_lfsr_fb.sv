// tb_wg_lfsr_fb: checks one feedback copy for the WG-11 LFSR
// (l(x) = x^15 + x^9 + x^6 + x^5 + x^4 + x^2 + omega) on random windows:
// next = omega * s[0] + s[2] + s[4] + s[5] + s[6] + s[9], plus the
// non-linear term when enabled; and a WG-5 copy (32 stages).
module tb_wg_lfsr_fb;
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

  logic [14:0][10:0] win;
  logic              en;
  logic [10:0]       nl, nxt;
  logic [31:0][4:0]  win5;
  logic [4:0]        nxt5;

  wg_lfsr_fb u (.i_win(win), .i_nl_en(en), .i_nl(nl), .o_next(nxt));
  wg_lfsr_fb #(.M(5), .POLY(6'h3B), .L(32), .TAPS(32'h0000_6F7E), .GAMMA(5'h02)) u5 (
    .i_win(win5), .i_nl_en(1'b0), .i_nl(5'h0), .o_next(nxt5));

  initial begin
    int unsigned e;
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 15; i++) win[i] = 11'($urandom);
      for (int i = 0; i < 32; i++) win5[i] = 5'($urandom);
      en = 1'($urandom);
      nl = 11'($urandom);
      #1;
      e = ref_mul(win[0], 2, 11, 'h805) ^ win[2] ^ win[4] ^ win[5] ^ win[6] ^ win[9];
      if (en) e ^= nl;
      chk(nxt, e, "fb11");
      // x^14 + x^13 + x^11 + x^10 + x^9 + x^8 + x^6 + x^5 + x^4 + x^3 + x^2 + x
      e = ref_mul(win5[0], 2, 5, 'h3B);
      e ^= win5[14] ^ win5[13] ^ win5[11] ^ win5[10] ^ win5[9] ^ win5[8]
         ^ win5[6] ^ win5[5] ^ win5[4] ^ win5[3] ^ win5[2] ^ win5[1];
      chk(nxt5, e, "fb5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
