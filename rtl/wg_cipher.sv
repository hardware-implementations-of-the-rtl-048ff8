// wg_cipher: complete Welch-Gong (WG) stream cipher over GF(2^M), polynomial
// basis, producing P keystream bits per clock cycle.
//
// Structure: an L-word LFSR (wg_lfsr) whose feedback (wg_lfsr_fb) is
// gamma * s[0] + taps; a decimated WG permutation DWGP on the newest word
// s[L-1]; the absolute trace of the DWGP output is the keystream bit, which is
// XORed with the plaintext.  Three phases, set by wg_fsm:
//   load : L key/IV words enter one per valid cycle through i_key_iv;
//   init : INIT_ROUNDS rounds in which DWGP(s[L-1]) is added to the feedback;
//   run  : P keystream bits per valid cycle, o_text = i_text ^ keystream.
// For P > 1 the LFSR computes P future words per cycle with P chained
// feedback copies ("lanes"); lane j filters word s[L-1+j] and gives keystream
// bit j (bit 0 is the earliest in stream order).  INIT_MODE selects how
// initialisation advances:
//   INIT_NORMAL: one round per cycle (INIT_ROUNDS cycles); only lane 0 needs
//                the full DWGP, the other lanes use a DWGT block (DWGT_IMPL).
//   INIT_FAST  : P rounds per cycle (INIT_ROUNDS / P cycles); every lane has a
//                DWGP whose output feeds the next lane's feedback, so P DWGPs
//                lie in series on the critical path.
// DWGP_IMPL selects discrete components (dwgp_comp) or a constant array
// (dwgp_const) for the DWGP blocks; TRACE_EQ the form of the trace.
//
// Defaults are the WG-11 instance: f(x) = x^11 + x^2 + 1, l(x) = x^15 + x^9 +
// x^6 + x^5 + x^4 + x^2 + omega, decimation 203, 15 stages (165-bit state for
// an 80-bit key and an 80-bit IV), DWGP from discrete components, 1 bit per
// cycle.  The key/IV word format, the 2*L initialisation rounds, the i_valid
// handshake and the synchronous reset are this design's choices.
//
// Timing: o_text and o_valid are combinational from the state and i_text /
// i_valid of the same cycle; the LFSR moves on the clock edge that ends a
// valid cycle.  Latency from reset to the first keystream bit: L load cycles
// plus the initialisation cycles.
module wg_cipher
  import wg_pkg::*;
#(
  parameter int unsigned  M           = 11,
  parameter logic [M:0]   POLY        = 12'h805,
  parameter int unsigned  L           = 15,
  parameter logic [L-1:0] TAPS        = 15'h0274,
  parameter logic [M-1:0] GAMMA       = 11'h002,
  parameter int unsigned  D           = 203,
  parameter int unsigned  P           = 1,
  parameter wg_init_e     INIT_MODE   = INIT_NORMAL,
  parameter wg_impl_e     DWGP_IMPL   = IMPL_COMP,
  parameter wg_impl_e     DWGT_IMPL   = IMPL_CONST,
  parameter bit           TRACE_EQ    = 1'b0,
  parameter int unsigned  INIT_ROUNDS = 2 * L
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         i_valid,
  input  logic [M-1:0] i_key_iv,
  input  logic [P-1:0] i_text,
  output logic [P-1:0] o_text,
  output logic         o_valid,
  output logic [1:0]   o_phase
);

  localparam bit FAST = (INIT_MODE == INIT_FAST) && (P > 1);
  localparam int unsigned INIT_CYCLES = FAST ? INIT_ROUNDS / P : INIT_ROUNDS;

  wg_phase_e            phase;
  logic                 load, init, advance;
  logic [L-1:0][M-1:0]  state;
  logic [P-1:0][M-1:0]  fut;
  logic [P-1:0]         ks;

  wg_fsm #(.L(L), .INIT_CYCLES(INIT_CYCLES)) u_fsm (
    .clk       (clk),
    .reset     (reset),
    .i_valid   (i_valid),
    .o_phase   (phase),
    .o_load    (load),
    .o_init    (init),
    .o_advance (advance)
  );

  wg_lfsr #(.M(M), .L(L), .P(P)) u_lfsr (
    .clk      (clk),
    .reset    (reset),
    .i_load   (load),
    .i_step1  (init && !FAST),
    .i_stepp  (advance || (init && FAST)),
    .i_key_iv (i_key_iv),
    .i_fut    (fut),
    .o_state  (state)
  );

  // Lane j: feedback copy producing s[L+j] and filter on s[L-1+j].
  for (genvar j = 0; j < P; j++) begin : g_lane
    logic [L-1:0][M-1:0] win;     // s[j] .. s[j+L-1]
    logic [M-1:0]        x;       // s[L-1+j], the word this lane filters
    logic [M-1:0]        wgp;     // DWGP(x), when the lane has a DWGP
    logic                bit_ks;
    logic [M-1:0]        nxt;

    for (genvar i = 0; i < L; i++) begin : g_win
      if (j + i < L) begin : g_st
        assign win[i] = state[j+i];
      end else begin : g_fu
        assign win[i] = g_lane[j+i-L].nxt;
      end
    end

    assign x = win[L-1];

    if (j == 0 || FAST) begin : g_wgp
      if (DWGP_IMPL == IMPL_COMP) begin : g_comp
        dwgp_comp #(.M(M), .POLY(POLY), .D(D)) u_dwgp (.i_x(x), .o_wgp(wgp));
      end else begin : g_const
        dwgp_const #(.M(M), .POLY(POLY), .D(D)) u_dwgp (.i_x(x), .o_wgp(wgp));
      end
      gf_trace #(.M(M), .POLY(POLY), .EQUATION(TRACE_EQ)) u_tr (.i_a(wgp), .o_z(bit_ks));
    end else begin : g_wgt
      assign wgp = '0;      // not used: no non-linear feedback in this lane
      if (DWGT_IMPL == IMPL_CONST) begin : g_const
        dwgt_const #(.M(M), .POLY(POLY), .D(D)) u_dwgt (.i_x(x), .o_wgt(bit_ks));
      end else begin : g_comp
        logic [M-1:0] unused_wgp;
        dwgt_comp #(.M(M), .POLY(POLY), .D(D), .TRACE_EQ(TRACE_EQ)) u_dwgt (
          .i_x(x), .o_wgp(unused_wgp), .o_wgt(bit_ks));
      end
    end

    wg_lfsr_fb #(.M(M), .POLY(POLY), .L(L), .TAPS(TAPS), .GAMMA(GAMMA)) u_fb (
      .i_win   (win),
      .i_nl_en (init && (j == 0 || FAST)),
      .i_nl    (wgp),
      .o_next  (nxt)
    );

    assign fut[j] = nxt;
    assign ks[j]  = bit_ks;
  end

  assign o_text  = i_text ^ ks;
  assign o_valid = advance;
  assign o_phase = phase;

  initial begin
    assert (!FAST || (INIT_ROUNDS % P == 0))
      else $error("wg_cipher: with fast initialisation INIT_ROUNDS must be a multiple of P");
    assert (M % 3 != 0) else $error("wg_cipher: M must not be a multiple of 3");
  end

endmodule
