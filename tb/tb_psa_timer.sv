// tb_psa_timer: checks the timer against a reference model written here.
// For random start selections and reference counts, random pattern-match
// streams are applied; the timer must raise timer_match exactly on the
// sample ref_cnt samples after the first start match and hold it until
// clear. The latency (in samples) is checked on every sample.
module tb_psa_timer;
  import psa_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, pat_valid = 0;
  logic [5:0] pat_match = '0;
  timer_cfg_t cfg = '0;
  logic timer_match, running;
  int checks = 0, failures = 0, n_hit = 0;

  psa_timer #(.N_PAT(6)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int started, el, first_hit;
    logic exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 200; run++) begin
      @(negedge clk);
      cfg.start_sel = 3'($urandom % 6);
      cfg.ref_cnt   = 32'($urandom % 12);
      clear = 1;
      @(negedge clk);
      clear = 0;
      started = 0; el = 0; first_hit = -1;
      for (int s = 0; s < 30; s++) begin
        pat_match = 6'($urandom) & 6'($urandom);
        if (s < 3) pat_match[cfg.start_sel] = 1'b0;
        pat_valid = 1;
        // model: elapsed samples since the first start match
        if (started) el++;
        else if (pat_match[cfg.start_sel]) begin started = 1; el = 0; end
        exp = started && (el >= int'(cfg.ref_cnt));
        #1;
        checks++;
        if (timer_match !== exp) begin
          failures++;
          $display("run %0d sample %0d ref %0d: timer_match=%b expected %b", run, s, cfg.ref_cnt, timer_match, exp);
        end
        if (exp && first_hit < 0) begin first_hit = s; n_hit++; end
        @(negedge clk);
        pat_valid = 0;
        pat_match = 6'($urandom);   // ignored without pat_valid
        if ($urandom % 3 == 0) @(negedge clk);
      end
    end
    checks++;
    if (n_hit < 50) begin failures++; $display("timer rarely matched: %0d", n_hit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
