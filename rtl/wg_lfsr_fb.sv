// wg_lfsr_fb: one copy of the WG LFSR feedback over GF(2^M).
//
// For a window s[0..L-1] of consecutive LFSR words (s[0] the oldest) the
// feedback polynomial l(x) = x^L + sum_{i in TAPS} x^i + gamma gives the next
// word
//     s[L] = gamma * s[0] + sum_{i in TAPS} s[i]
// and during initialisation the DWGP output of the newest word is added to it
// (i_nl_en = 1, i_nl = DWGP(s[L-1])), which makes the feedback non-linear.
// gamma is a constant multiplier (a gf_mul with one input fixed, which
// synthesis reduces to an XOR network).  TAPS bit i (1 <= i <= L-1) marks a
// term x^i of l(x); bit 0 is ignored, the constant term being gamma.
// A cipher producing several words per cycle uses one copy per word, each
// window one word further on.  Combinational.
module wg_lfsr_fb #(
  parameter int unsigned M     = 11,
  parameter logic [M:0]  POLY  = 12'h805,
  parameter int unsigned L     = 15,
  parameter logic [L-1:0] TAPS = 15'h0274,      // x^9 + x^6 + x^5 + x^4 + x^2
  parameter logic [M-1:0] GAMMA = 11'h002       // omega
) (
  input  logic [L-1:0][M-1:0] i_win,
  input  logic                i_nl_en,
  input  logic [M-1:0]        i_nl,
  output logic [M-1:0]        o_next
);

  logic [M-1:0] g_s0;
  logic [M-1:0] lin;

  gf_mul #(.M(M), .POLY(POLY)) u_gamma (.i_a(i_win[0]), .i_b(GAMMA), .o_z(g_s0));

  always_comb begin
    lin = g_s0;
    for (int unsigned i = 1; i < L; i++)
      if (TAPS[i]) lin ^= i_win[i];
  end

  assign o_next = i_nl_en ? (lin ^ i_nl) : lin;

endmodule
