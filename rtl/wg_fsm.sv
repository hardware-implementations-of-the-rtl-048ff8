// wg_fsm: phase controller of the WG cipher.
//
// After reset the cipher is in PH_LOAD and takes one key/IV word per cycle in
// which i_valid is high; after L words it enters PH_INIT, which lasts
// INIT_CYCLES cycles regardless of i_valid, and then PH_RUN, where each cycle
// with i_valid high consumes P plaintext bits and produces P ciphertext bits
// (o_advance).  PH_RUN is left only by reset.
// Outputs: o_phase, o_load (shift a key/IV word in), o_init (one init step),
// o_advance (one running step).  Synchronous active-high reset.
module wg_fsm
  import wg_pkg::*;
#(
  parameter int unsigned L           = 15,
  parameter int unsigned INIT_CYCLES = 30
) (
  input  logic      clk,
  input  logic      reset,
  input  logic      i_valid,
  output wg_phase_e o_phase,
  output logic      o_load,
  output logic      o_init,
  output logic      o_advance
);

  localparam int unsigned CW = $clog2((L > INIT_CYCLES ? L : INIT_CYCLES) + 1);

  wg_phase_e      phase_q;
  logic [CW-1:0]  cnt_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      phase_q <= PH_LOAD;
      cnt_q   <= '0;
    end else begin
      unique case (phase_q)
        PH_LOAD: if (i_valid) begin
          if (cnt_q == CW'(L - 1)) begin
            cnt_q   <= '0;
            phase_q <= (INIT_CYCLES == 0) ? PH_RUN : PH_INIT;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        PH_INIT: begin
          if (cnt_q == CW'(INIT_CYCLES - 1)) begin
            cnt_q   <= '0;
            phase_q <= PH_RUN;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  assign o_phase   = phase_q;
  assign o_load    = (phase_q == PH_LOAD) && i_valid;
  assign o_init    = (phase_q == PH_INIT);
  assign o_advance = (phase_q == PH_RUN) && i_valid;

endmodule
