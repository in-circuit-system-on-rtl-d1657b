// psa_sequencer: detects a programmed sequence of pattern matches.
//
// The reference sequence is cfg.len steps (1..SEQ_STEPS); step i waits for
// pattern match cfg.sel[i]. A state register holds how many steps have been
// seen. On each sample whose expected pattern matches, the state advances by
// one step; when the last step is seen, seq_match goes high and stays high
// until clear. Samples that match other patterns do not reset the state, so
// the steps need not be consecutive samples ("A, later B, later C").
//
// Timing: like psa_timer, seq_match is combinational for the sample given by
// pat_match/pat_valid (it goes high on the sample that completes the
// sequence) and the state advances at the end of each pat_valid cycle.
//
// A state machine that records the sequence of earlier pattern matches and
// raises "sequencer match" follows the published PSA; the number of steps,
// the one-step-per-sample rule and the no-reset rule are this design's
// choices.
module psa_sequencer
  import psa_pkg::*;
#(
  parameter int unsigned N_PAT = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             pat_valid,
  input  logic [N_PAT-1:0] pat_match,
  input  seq_cfg_t         cfg,
  output logic             seq_match,
  output logic [2:0]       state
);

  logic       done;
  logic [2:0] last_step;
  logic [2:0] want;
  logic       step_hit;

  assign last_step = (cfg.len == '0) ? 3'd0
                   : (int'(cfg.len) > SEQ_STEPS) ? 3'(SEQ_STEPS - 1) : cfg.len - 3'd1;
  assign want      = cfg.sel[state[1:0]];
  assign step_hit  = pat_valid && !done && (int'(want) < N_PAT) && pat_match[want];
  assign seq_match = done || (step_hit && state == last_step);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
      done  <= 1'b0;
    end else if (clear) begin
      state <= '0;
      done  <= 1'b0;
    end else if (step_hit) begin
      if (state == last_step) done  <= 1'b1;
      else                    state <= state + 3'd1;
    end
  end

endmodule
