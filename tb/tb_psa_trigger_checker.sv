// tb_psa_trigger_checker: checks the whole trigger condition checker
// against a reference model written here. Each run programs random
// patterns, masks and modes for the six pattern checkers, a random timer
// and sequencer setting and a random combination (gate types, input
// enables, on/off/inv, last gate), clears the checker and feeds random
// samples that often hit the patterns. Samples come every other cycle; in
// the cycle between, where the pattern result of the previous sample is due,
// trig_hit is compared with the model, and the external trigger (with its
// enable) or the force trigger is sometimes applied. trig_hit must fire
// once per run and trigger_done must hold afterwards.
module tb_psa_trigger_checker;
  import psa_pkg::*;
  localparam int N = 16;

  logic clk = 0, rst_n = 0, clear = 0, armed = 0, sample_valid = 0;
  logic [N-1:0] sample = '0;
  logic [5:0][N-1:0] pat_value = '0, pat_mask = '0;
  pat_mode_e [5:0] pat_mode;
  timer_cfg_t timer_cfg = '0;
  seq_cfg_t seq_cfg = '0;
  trig_comb_t comb_cfg = '0;
  logic ext_trigger = 0, ext_trig_en = 0, force_trigger = 0;
  logic trig_hit, trigger_done, pat_valid, timer_match, seq_match;
  logic [5:0] pat_match;
  int checks = 0, failures = 0;
  int n_pat_trig = 0, n_ext_trig = 0, n_force_trig = 0, n_ext_blocked = 0;

  psa_trigger_checker #(.N_SIG(N), .N_PAT(6)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  logic [5:0] m_prev, m_have;
  int m_t_started, m_t_el, m_s_step;
  logic m_s_done, m_done;

  function automatic logic g2(logic a, logic b, logic ea, logic eb, logic is_and);
    logic r;
    if (is_and) begin
      r = ea || eb;
      if (ea && !a) r = 0;
      if (eb && !b) r = 0;
    end else begin
      r = (ea && a) || (eb && b);
    end
    return r;
  endfunction

  // evaluates one sample, updates the model, returns the pattern-path result
  function automatic logic model_sample(logic [N-1:0] s);
    logic [5:0] pm;
    logic tm, sm;
    logic [7:0] sig;
    logic [3:0] g;
    logic acc;
    int used;
    for (int p = 0; p < 6; p++) begin
      logic h;
      h = ((s ^ pat_value[p]) & pat_mask[p]) == 0;
      case (pat_mode[p])
        PM_LEVEL: pm[p] = h;
        PM_RISE:  pm[p] = m_have[p] && h && !m_prev[p];
        PM_FALL:  pm[p] = m_have[p] && !h && m_prev[p];
        default:  pm[p] = m_have[p] && (h != m_prev[p]);
      endcase
      m_prev[p] = h; m_have[p] = 1;
    end
    // timer
    if (m_t_started != 0) m_t_el++;
    else if (pm[timer_cfg.start_sel]) begin m_t_started = 1; m_t_el = 0; end
    tm = (m_t_started != 0) && (m_t_el >= int'(timer_cfg.ref_cnt));
    // sequencer
    sm = m_s_done;
    if (!m_s_done && pm[seq_cfg.sel[m_s_step]]) begin
      if (m_s_step == int'(seq_cfg.len) - 1) begin m_s_done = 1; sm = 1; end
      else m_s_step++;
    end
    sig = {sm, tm, pm};
    for (int i = 0; i < 4; i++)
      g[i] = g2(sig[2*i], sig[2*i+1], comb_cfg.in_en[2*i], comb_cfg.in_en[2*i+1], comb_cfg.pair_and[i]);
    used = 0;
    acc = comb_cfg.final_and;
    for (int i = 0; i < 4; i++) begin
      logic v;
      if (comb_cfg.term[i] == TERM_ON || comb_cfg.term[i] == TERM_INV) begin
        v = (comb_cfg.term[i] == TERM_INV) ? !g[i] : g[i];
        used++;
        if (comb_cfg.final_and) acc = acc && v;
        else acc = acc || v;
      end
    end
    return (used > 0) && acc;
  endfunction

  initial begin
    logic ptrig, exp, ext_now, frc_now;
    int fired;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 600; run++) begin
      @(negedge clk);
      for (int p = 0; p < 6; p++) begin
        pat_value[p] = N'($urandom);
        pat_mask[p]  = N'($urandom) & N'($urandom) & N'($urandom);
        pat_mode[p]  = pat_mode_e'($urandom % 4);
      end
      timer_cfg.start_sel = 3'($urandom % 6);
      timer_cfg.ref_cnt   = 32'($urandom % 8);
      seq_cfg.len = 3'(1 + $urandom % 4);
      for (int i = 0; i < 4; i++) seq_cfg.sel[i] = 3'($urandom % 6);
      comb_cfg.pair_and  = 4'($urandom);
      comb_cfg.in_en     = 8'($urandom);
      for (int i = 0; i < 4; i++) comb_cfg.term[i] = term_ctl_e'($urandom % 3);
      comb_cfg.final_and = 1'($urandom);
      ext_trig_en = ($urandom % 2 == 0);
      clear = 1;
      @(negedge clk);
      clear = 0;
      armed = 1;
      m_prev = '0; m_have = '0; m_t_started = 0; m_t_el = 0; m_s_step = 0; m_s_done = 0; m_done = 0;
      fired = 0;
      for (int s = 0; s < 30; s++) begin
        int k;
        k = $urandom % 6;
        sample = ($urandom % 3 == 0) ? N'($urandom) : pat_value[k] ^ N'($urandom % 2 << ($urandom % N));
        sample_valid = 1;
        ptrig = model_sample(sample);
        @(negedge clk);
        sample_valid = 0;
        sample = N'($urandom);
        ext_now = ($urandom % 40 == 0);
        frc_now = ($urandom % 60 == 0);
        ext_trigger = ext_now;
        force_trigger = frc_now;
        exp = !m_done && (ptrig || (ext_now && ext_trig_en) || frc_now);
        #1;
        checks++;
        if (trig_hit !== exp) begin
          failures++;
          $display("run %0d sample %0d: trig_hit=%b expected %b", run, s, trig_hit, exp);
        end
        if (exp) begin
          fired++;
          if (ptrig) n_pat_trig++;
          else if (frc_now) n_force_trig++;
          else n_ext_trig++;
        end
        if (!m_done && ext_now && !ext_trig_en && !ptrig && !frc_now) n_ext_blocked++;
        if (exp) m_done = 1;
        @(negedge clk);
        ext_trigger = 0; force_trigger = 0;
        checks++;
        if (trigger_done !== m_done) begin
          failures++;
          $display("run %0d: trigger_done=%b expected %b", run, trigger_done, m_done);
        end
      end
      checks++;
      if (fired > 1) begin failures++; $display("run %0d fired %0d times", run, fired); end
      armed = 0;
    end
    checks++;
    if (n_pat_trig < 50 || n_ext_trig < 3 || n_force_trig < 3 || n_ext_blocked < 3) begin
      failures++;
    end
    $display("pattern %0d, external %0d, force %0d, external while disabled %0d",
             n_pat_trig, n_ext_trig, n_force_trig, n_ext_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
