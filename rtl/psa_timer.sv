// psa_timer: measures the number of samples elapsed since a pattern match.
//
// The timer waits for the pattern match chosen by cfg.start_sel. The sample
// on which that match is seen is elapsed time 0; every later sample adds one.
// timer_match is high for the current sample once the elapsed count has
// reached cfg.ref_cnt, and stays high until clear (the counter saturates at
// the reference). Only the first start match counts; later ones are ignored.
//
// Timing: pat_match/pat_valid come from the pattern checkers (one cycle
// after the sample). timer_match is combinational from them and from the
// timer's state, so it belongs to the same sample as pat_match; the state is
// updated at the end of each pat_valid cycle.
//
// The counter started by a pattern match and compared with a reference value
// follows the published PSA; counting in samples, the saturating compare
// and the single start are this design's choices.
module psa_timer
  import psa_pkg::*;
#(
  parameter int unsigned N_PAT = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             pat_valid,
  input  logic [N_PAT-1:0] pat_match,
  input  timer_cfg_t       cfg,
  output logic             timer_match,
  output logic             running
);

  logic [TIMER_W-1:0] elapsed;   // elapsed count of the last sample seen
  logic               start_now;
  logic [TIMER_W:0]   elapsed_now;

  assign start_now   = !running && (int'(cfg.start_sel) < N_PAT) && pat_match[cfg.start_sel];
  assign elapsed_now = running ? ({1'b0, elapsed} + 1'b1) : '0;

  always_comb begin
    timer_match = 1'b0;
    if (running)        timer_match = elapsed_now >= {1'b0, cfg.ref_cnt};
    else if (start_now) timer_match = cfg.ref_cnt == '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      elapsed <= '0;
    end else if (clear) begin
      running <= 1'b0;
      elapsed <= '0;
    end else if (pat_valid) begin
      if (start_now) begin
        running <= 1'b1;
        elapsed <= '0;
      end else if (running && elapsed != cfg.ref_cnt) begin
        elapsed <= elapsed_now[TIMER_W-1:0];
      end
    end
  end

endmodule
