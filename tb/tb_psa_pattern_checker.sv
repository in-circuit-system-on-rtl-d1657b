// tb_psa_pattern_checker: checks the pattern checker in all four modes
// against a reference model written here: random samples are compared with
// a random value under a random mask; level, rising, falling and change
// matches are predicted from the current and previous hit and checked on
// the cycle match_valid comes, one cycle after the sample. clear must drop
// the history so no edge matches on the first sample after it.
module tb_psa_pattern_checker;
  import psa_pkg::*;
  localparam int N = 16;

  logic clk = 0, rst_n = 0, clear = 0, sample_valid = 0;
  logic [N-1:0] sample = '0, pat_value = '0, pat_mask = '0;
  pat_mode_e pat_mode = PM_LEVEL;
  logic match, match_valid;
  int checks = 0, failures = 0;
  int n_match = 0;

  psa_pattern_checker #(.N_SIG(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic hits(logic [N-1:0] s, logic [N-1:0] v, logic [N-1:0] m);
    for (int i = 0; i < N; i++)
      if (m[i] && s[i] != v[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    logic prev, have, h, exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int md = 0; md < 4; md++) begin
      for (int run = 0; run < 20; run++) begin
        @(negedge clk);
        pat_mode  = pat_mode_e'(md);
        pat_value = N'($urandom);
        pat_mask  = N'($urandom) & N'($urandom);   // few compared bits
        clear = 1;
        @(negedge clk);
        clear = 0;
        have = 0; prev = 0;
        for (int s = 0; s < 40; s++) begin
          // mostly samples close to the pattern so both hits and misses occur
          sample = ($urandom % 2) ? pat_value ^ (N'(1) << ($urandom % N)) : pat_value;
          if ($urandom % 4 == 0) sample = N'($urandom);
          sample_valid = 1;
          h = hits(sample, pat_value, pat_mask);
          case (md)
            0: exp = h;
            1: exp = have && h && !prev;
            2: exp = have && !h && prev;
            default: exp = have && (h != prev);
          endcase
          @(negedge clk);
          sample_valid = ($urandom % 2 == 0);   // idle cycles in between
          checks++;
          if (!match_valid || match !== exp) begin
            failures++;
            $display("mode %0d sample %0d: match=%b valid=%b expected %b", md, s, match, match_valid, exp);
          end
          if (exp) n_match++;
          prev = h; have = 1;
          if (sample_valid) begin
            sample_valid = 0;
            @(negedge clk);
            checks++;
            if (match_valid) begin failures++; $display("valid without sample"); end
          end
        end
      end
    end
    checks++;
    if (n_match < 100) begin failures++; $display("too few matches %0d", n_match); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
