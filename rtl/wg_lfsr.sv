// wg_lfsr: state register of the WG LFSR, L words of M bits, with the input
// multiplexer that selects how it moves in each cycle.
//
//   i_load  : shift by one word, the new word i_key_iv entering at the top
//             (key/IV loading; after L loads the first word sits in s[0]).
//   i_step1 : shift by one word, i_fut[0] entering (one round per cycle; used
//             in initialisation when only one round is taken per cycle).
//   i_stepp : shift by P words, i_fut[0] .. i_fut[P-1] entering in order
//             (running phase, and initialisation with P rounds per cycle).
//   none    : hold.
// i_fut[j] is the "future" word s[L+j], computed outside by the feedback
// copies; the select inputs are one-hot or all zero (asserted).
// s[L-1] is the newest word, s[0] the oldest.  Synchronous active-high
// reset clears the state.  The state is brought out whole (o_state) for the
// feedback copies and the filter functions.
module wg_lfsr #(
  parameter int unsigned M = 11,
  parameter int unsigned L = 15,
  parameter int unsigned P = 1
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                i_load,
  input  logic                i_step1,
  input  logic                i_stepp,
  input  logic [M-1:0]        i_key_iv,
  input  logic [P-1:0][M-1:0] i_fut,
  output logic [L-1:0][M-1:0] o_state
);

  logic [L-1:0][M-1:0] state_q, state_d;
  // Words s[1] .. s[L-1] followed by the future words s[L] .. s[L+P-1]; the
  // oldest word s[0] always leaves the register when it shifts.
  logic [L+P-2:0][M-1:0] ext;

  assign ext = {i_fut, state_q[L-1:1]};

  always_comb begin
    state_d = state_q;
    if (i_load)
      state_d = {i_key_iv, state_q[L-1:1]};
    else if (i_step1)
      state_d = ext[L-1:0];
    else if (i_stepp)
      state_d = ext[L+P-2:P-1];
  end

  always_ff @(posedge clk) begin
    if (reset) state_q <= '0;
    else       state_q <= state_d;
  end

  assign o_state = state_q;

  always_ff @(posedge clk) begin
    if (!reset)
      assert ($onehot0({i_load, i_step1, i_stepp}))
        else $error("wg_lfsr: more than one shift mode selected");
  end

  initial begin
    assert (P >= 1 && P <= L) else $error("wg_lfsr: 1 <= P <= L required");
  end

endmodule
