// tb_wg_run: runs one wg_cipher configuration end to end against a software
// model of the cipher and reports the result through its ports.
//
// Sequence, repeated for NKEYS key/IV pairs (reset between them, the second
// reset while the cipher is running): reset; load L random key/IV words with
// random idle cycles in between; wait for the running phase, counting the
// initialisation cycles (expected INIT_ROUNDS, or INIT_ROUNDS / P with fast
// initialisation); then encrypt NBITS bits in groups of P with random stall
// cycles (i_valid low), checking every ciphertext bit against
// plaintext ^ keystream of the model.  The model applies the cipher one round
// at a time, INIT_ROUNDS rounds with DWGP feedback, then one keystream bit
// Tr(DWGP(s[L-1])) per round, so it is the same for every P and INIT_MODE.
// Counts of the mechanisms seen are returned: load gaps, initialisation
// cycles, running stalls, multi-bit steps.
module tb_wg_run
  import wg_pkg::*;
  import tb_gf_pkg::*;
#(
  parameter int unsigned  M         = 11,
  parameter logic [M:0]   POLY      = 12'h805,
  parameter int unsigned  L         = 15,
  parameter logic [L-1:0] TAPS      = 15'h0274,
  parameter int unsigned  D         = 203,
  parameter int unsigned  P         = 1,
  parameter wg_init_e     INIT_MODE = INIT_NORMAL,
  parameter wg_impl_e     DWGP_IMPL = IMPL_COMP,
  parameter wg_impl_e     DWGT_IMPL = IMPL_CONST,
  parameter bit           TRACE_EQ  = 1'b0,
  parameter int unsigned  INIT_ROUNDS = 2 * L,
  parameter int           NBITS     = 200,
  parameter int           NKEYS     = 2,
  parameter string        NAME      = "cfg"
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_load_gaps,
  output int   n_init_cycles,
  output int   n_stalls,
  output int   n_multi_steps
);

  localparam int unsigned ROUNDS   = INIT_ROUNDS;
  localparam int unsigned EXP_INIT = (INIT_MODE == INIT_FAST && P > 1) ? ROUNDS / P : ROUNDS;

  logic         reset, valid;
  logic [M-1:0] kiv;
  logic [P-1:0] ptext, ctext;
  logic         ovalid;
  logic [1:0]   phase;

  wg_cipher #(
    .M(M), .POLY(POLY), .L(L), .TAPS(TAPS), .GAMMA(M'(2)), .D(D), .P(P),
    .INIT_MODE(INIT_MODE), .DWGP_IMPL(DWGP_IMPL), .DWGT_IMPL(DWGT_IMPL),
    .TRACE_EQ(TRACE_EQ), .INIT_ROUNDS(INIT_ROUNDS)
  ) dut (
    .clk, .reset, .i_valid(valid), .i_key_iv(kiv), .i_text(ptext), .o_text(ctext),
    .o_valid(ovalid), .o_phase(phase)
  );

  int unsigned s [L];

  function automatic int unsigned model_fb();
    int unsigned f;
    f = ref_mul(s[0], 2, M, 32'(POLY));
    for (int i = 1; i < int'(L); i++) if (TAPS[i]) f ^= s[i];
    return f;
  endfunction

  function automatic void model_shift(int unsigned w);
    for (int i = 0; i < int'(L) - 1; i++) s[i] = s[i+1];
    s[L-1] = w;
  endfunction

  task automatic fail(string what);
    failures++;
    if (failures < 10) $display("FAIL [%s] %s", NAME, what);
  endtask

  initial begin
    int cyc;
    bit exp_bit;
    done = 0; checks = 0; failures = 0;
    n_load_gaps = 0; n_init_cycles = 0; n_stalls = 0; n_multi_steps = 0;
    reset = 1; valid = 0; kiv = '0; ptext = '0;
    for (int key = 0; key < NKEYS; key++) begin
      reset = 1; valid = 0;
      @(posedge clk); #1;
      reset = 0;
      // ---- load ----
      for (int w = 0; w < int'(L); w++) begin
        while ($urandom_range(0, 3) == 0) begin
          valid = 0; n_load_gaps++;
          @(posedge clk); #1;
        end
        valid = 1;
        kiv = M'($urandom);
        checks++;
        if (phase !== 2'(PH_LOAD)) fail("not loading");
        s[w] = kiv;
        @(posedge clk); #1;
      end
      // ---- initialisation: count its cycles, i_valid random ----
      cyc = 0;
      while (phase != 2'(PH_RUN) && cyc < 10000) begin
        valid = 1'($urandom);
        #1;
        checks++;
        if (ovalid) fail("output valid during initialisation");
        @(posedge clk); #1;
        cyc++;
        n_init_cycles++;
      end
      checks++;
      if (cyc != int'(EXP_INIT)) fail($sformatf("init took %0d cycles, expected %0d", cyc, EXP_INIT));
      for (int r = 0; r < int'(ROUNDS); r++)
        model_shift(model_fb() ^ ref_dwgp(s[L-1], M, 32'(POLY), D));
      // ---- running ----
      for (int b = 0; b < NBITS; b += int'(P)) begin
        while ($urandom_range(0, 4) == 0) begin
          valid = 0; n_stalls++;
          ptext = P'($urandom);
          #1;
          checks++;
          if (ovalid) fail("output valid while stalled");
          @(posedge clk); #1;
        end
        valid = 1;
        ptext = P'($urandom);
        #1;
        checks++;
        if (!ovalid) fail("output not valid");
        for (int j = 0; j < int'(P); j++) begin
          exp_bit = ptext[j] ^ ref_dwgt(s[L-1], M, 32'(POLY), D);
          model_shift(model_fb());
          checks++;
          if (ctext[j] !== exp_bit) fail($sformatf("key %0d bit %0d", key, b + j));
        end
        if (P > 1) n_multi_steps++;
        @(posedge clk); #1;
      end
      valid = 0;
      // the next pass starts with reset while the cipher is running
    end
    $display("[%s] checks=%0d failures=%0d load_gaps=%0d init_cycles=%0d stalls=%0d multi_steps=%0d",
             NAME, checks, failures, n_load_gaps, n_init_cycles, n_stalls, n_multi_steps);
    done = 1;
  end

endmodule
