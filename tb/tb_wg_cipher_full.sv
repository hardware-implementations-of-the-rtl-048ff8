// tb_wg_cipher_full: one complete operation of wg_cipher at its default
// parameters (WG-11, d = 203, 15-stage LFSR, 1 bit per cycle): load an 80-bit
// key and an 80-bit IV, run the 30 initialisation rounds and generate 1024
// keystream bits, checked bit by bit against a software model.
//
// Key/IV format used here: the 160 bits {IV, key} (key in the low bits),
// zero-padded to 165 bits, are cut into fifteen 11-bit words, the least
// significant word first.  Also checks the cycle counts: 15 load cycles,
// 30 initialisation cycles, then one ciphertext bit in every valid cycle.
module tb_wg_cipher_full;
  import wg_pkg::*;
  import tb_gf_pkg::*;

  localparam int unsigned M = 11, L = 15, D = 203, POLY = 'h805, TAPS = 'h0274;
  localparam int NBITS = 1024;

  int checks = 0, failures = 0;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        reset, valid;
  logic [10:0] kiv;
  logic        ptext, ctext, ovalid;
  logic [1:0]  phase;

  wg_cipher dut (
    .clk, .reset, .i_valid(valid), .i_key_iv(kiv), .i_text(ptext), .o_text(ctext),
    .o_valid(ovalid), .o_phase(phase)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned s [L];

  function automatic int unsigned model_fb();
    int unsigned f;
    f = ref_mul(s[0], 2, M, POLY);
    for (int i = 1; i < int'(L); i++) if ((TAPS >> i) & 1) f ^= s[i];
    return f;
  endfunction

  function automatic void model_shift(int unsigned w);
    for (int i = 0; i < int'(L) - 1; i++) s[i] = s[i+1];
    s[L-1] = w;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [79:0]  key, iv;
    logic [164:0] packed_kiv;
    int cyc, ones;
    key = {$urandom, $urandom, 16'($urandom)};
    iv  = {$urandom, $urandom, 16'($urandom)};
    packed_kiv = {5'b0, iv, key};
    reset = 1; valid = 0; kiv = '0; ptext = 0;
    @(posedge clk); #1;
    reset = 0;
    for (int w = 0; w < int'(L); w++) begin
      valid = 1;
      kiv = packed_kiv[11*w +: 11];
      s[w] = kiv;
      chk(phase == 2'(PH_LOAD), "loading");
      @(posedge clk); #1;
    end
    valid = 0;
    cyc = 0;
    while (phase != 2'(PH_RUN) && cyc < 1000) begin
      @(posedge clk); #1;
      cyc++;
    end
    chk(cyc == 30, $sformatf("initialisation took %0d cycles", cyc));
    for (int r = 0; r < 30; r++) model_shift(model_fb() ^ ref_dwgp(s[L-1], M, POLY, D));
    ones = 0;
    for (int b = 0; b < NBITS; b++) begin
      valid = 1;
      ptext = 1'($urandom);
      #1;
      chk(ovalid, "valid every cycle");
      chk(ctext === (ptext ^ ref_dwgt(s[L-1], M, POLY, D)), $sformatf("bit %0d", b));
      ones += ctext ^ ptext;
      model_shift(model_fb());
      @(posedge clk); #1;
    end
    $display("1024 keystream bits, %0d ones", ones);
    // a keystream that is all zeros or all ones means a dead filter
    chk(ones > 400 && ones < 624, "keystream roughly balanced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
