// tb_psa_sequencer: checks the sequencer against a reference model written
// here. Random sequences of one to four steps over the six pattern matches
// are programmed and random pattern-match streams applied; seq_match must
// go high exactly on the sample that completes the sequence (one step per
// sample, other matches ignored) and stay high until clear.
module tb_psa_sequencer;
  import psa_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, pat_valid = 0;
  logic [5:0] pat_match = '0;
  seq_cfg_t cfg = '0;
  logic seq_match;
  logic [2:0] state;
  int checks = 0, failures = 0, n_hit = 0;

  psa_sequencer #(.N_PAT(6)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int step, len;
    logic done, exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 300; run++) begin
      @(negedge clk);
      len = 1 + ($urandom % 4);
      cfg.len = 3'(len);
      for (int i = 0; i < 4; i++) cfg.sel[i] = 3'($urandom % 6);
      clear = 1;
      @(negedge clk);
      clear = 0;
      step = 0; done = 0;
      for (int s = 0; s < 25; s++) begin
        pat_match = 6'(1 << ($urandom % 6));
        if ($urandom % 3 == 0) pat_match |= 6'(1 << ($urandom % 6));
        pat_valid = 1;
        exp = done;
        if (!done && pat_match[cfg.sel[step]]) begin
          if (step == len - 1) begin done = 1; exp = 1; end
          else step++;
        end
        #1;
        checks++;
        if (seq_match !== exp) begin
          failures++;
          $display("run %0d sample %0d len %0d: seq_match=%b expected %b", run, s, len, seq_match, exp);
        end
        if (exp && s == 24) n_hit++;
        @(negedge clk);
        pat_valid = 0;
        pat_match = 6'($urandom);
      end
    end
    checks++;
    if (n_hit < 50) begin failures++; $display("sequence rarely completed: %0d", n_hit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
