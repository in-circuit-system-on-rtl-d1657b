// psa_trigger_checker: decides when the PSA has triggered.
//
// Six pattern checkers compare every sample with their reference patterns
// or edges. A timer, started by one of the pattern matches, and a sequencer,
// which follows a programmed order of pattern matches, add two more match
// signals. Three two-input AND/OR gates join pattern matches 0/1, 2/3 and
// 4/5, a fourth joins the timer match and the sequencer match. Each gate
// output passes an on/off/inv stage and a last AND/OR gate joins the four
// results. That result, the external trigger gated by its enable, and the
// force trigger are ORed into the trigger.
//
// Inputs a gate does not use are switched off by cfg.in_en: an AND gate
// ignores them, an OR gate sees them as 0, and a gate with no input enabled
// gives 0. Terms set to off are likewise left out of the last gate; with
// every term off the pattern path never triggers. So a single pattern match,
// any pair, or any mix of the eight signals can be chosen.
//
// Timing: the sample is evaluated in the cycle sample_valid is high; the
// pattern path gives trig_hit one cycle later (a one-cycle pulse). External
// and force trigger reach trig_hit in the cycle they are seen. trig_hit
// fires at most once while armed; trigger_done then stays high until clear.
//
// The structure (pattern checkers, timer, sequencer, AND/OR gates,
// on/off/inv stages, external trigger AND enable, final OR with force
// trigger) follows the published PSA. The input enables and the neutral
// treatment of switched-off terms are this design's choices.
module psa_trigger_checker
  import psa_pkg::*;
#(
  parameter int unsigned N_SIG = 384,
  parameter int unsigned N_PAT = 6
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,         // re-arm: clears all state
  input  logic                        armed,         // capture running
  input  logic                        sample_valid,
  input  logic [N_SIG-1:0]            sample,
  input  logic [N_PAT-1:0][N_SIG-1:0] pat_value,
  input  logic [N_PAT-1:0][N_SIG-1:0] pat_mask,
  input  pat_mode_e [N_PAT-1:0]       pat_mode,
  input  timer_cfg_t                  timer_cfg,
  input  seq_cfg_t                    seq_cfg,
  input  trig_comb_t                  comb_cfg,
  input  logic                        ext_trigger,
  input  logic                        ext_trig_en,
  input  logic                        force_trigger,
  output logic                        trig_hit,
  output logic                        trigger_done,
  output logic [N_PAT-1:0]            pat_match,     // for observation
  output logic                        pat_valid,
  output logic                        timer_match,
  output logic                        seq_match
);

  // The combination network is drawn for six pattern checkers.
  if (N_PAT != 6) begin : g_bad_npat
    $error("psa_trigger_checker: N_PAT must be 6");
  end

  logic [N_PAT-1:0] pv;

  for (genvar p = 0; p < N_PAT; p++) begin : g_pat
    psa_pattern_checker #(.N_SIG(N_SIG)) u_pat (
      .clk         (clk),
      .rst_n       (rst_n),
      .clear       (clear),
      .sample_valid(sample_valid),
      .sample      (sample),
      .pat_value   (pat_value[p]),
      .pat_mask    (pat_mask[p]),
      .pat_mode    (pat_mode[p]),
      .match       (pat_match[p]),
      .match_valid (pv[p])
    );
  end

  assign pat_valid = &pv;   // all checkers see the same samples

  psa_timer #(.N_PAT(N_PAT)) u_timer (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (clear),
    .pat_valid  (pat_valid),
    .pat_match  (pat_match),
    .cfg        (timer_cfg),
    .timer_match(timer_match),
    .running    ()
  );

  psa_sequencer #(.N_PAT(N_PAT)) u_seq (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (clear),
    .pat_valid(pat_valid),
    .pat_match(pat_match),
    .cfg      (seq_cfg),
    .seq_match(seq_match),
    .state    ()
  );

  // Two-input AND/OR gate with per-input enables.
  function automatic logic gate2(input logic a, input logic b,
                                 input logic ea, input logic eb,
                                 input logic is_and);
    if (is_and) return (ea || eb) && (!ea || a) && (!eb || b);
    else        return (ea && a) || (eb && b);
  endfunction

  logic [7:0] sig;
  logic [3:0] g;
  logic [3:0] t_val;
  logic [3:0] t_use;
  logic       pattern_trig;
  logic       ext_trig;

  assign sig = {seq_match, timer_match, pat_match};

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      g[i] = gate2(sig[2*i], sig[2*i+1], comb_cfg.in_en[2*i], comb_cfg.in_en[2*i+1],
                   comb_cfg.pair_and[i]);
      t_use[i] = (comb_cfg.term[i] == TERM_ON) || (comb_cfg.term[i] == TERM_INV);
      t_val[i] = (comb_cfg.term[i] == TERM_INV) ? !g[i] : g[i];
    end
    if (comb_cfg.final_and) pattern_trig = (t_use != '0) && ((t_val | ~t_use) == '1);
    else                    pattern_trig = (t_val & t_use) != '0;
  end

  assign ext_trig = ext_trigger && ext_trig_en;
  assign trig_hit = armed && !trigger_done &&
                    ((pat_valid && pattern_trig) || ext_trig || force_trigger);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        trigger_done <= 1'b0;
    else if (clear)    trigger_done <= 1'b0;
    else if (trig_hit) trigger_done <= 1'b1;
  end

endmodule
