// tb_psa_sampler: checks the sampler for several sampling rates. The pins
// carry a free-running cycle count, so every sample tells at which clock it
// was taken. The test checks that samples come exactly rate+1 cycles apart
// (at least two in the 384-signal mode), that each holds the pins of its
// tick, that sample_valid only comes while enabled, and that the
// synchronization counter steps by one per tick, capture or not.
module tb_psa_sampler;
  import psa_pkg::*;
  localparam int N = 24;

  logic clk = 0, rst_n = 0, restart = 0, enable = 0, wide_mode = 0;
  logic [31:0] rate = '0;
  logic [N-1:0] pins;
  logic [N-1:0] sample;
  logic sample_valid;
  logic [STAMP_W-1:0] sample_stamp, sync_count;
  int checks = 0, failures = 0;
  int cyc = 0;

  psa_sampler #(.N_SIG(N), .RATE_W(32)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign pins = N'(cyc);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_t, period, nsamp;
    logic [STAMP_W-1:0] last_stamp, sc0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cfg = 0; cfg < 10; cfg++) begin
      @(negedge clk);
      rate = (cfg < 8) ? 32'(cfg % 5) : 32'(0);
      wide_mode = (cfg >= 7);
      period = int'(rate) + 1;
      if (wide_mode && period < 2) period = 2;
      restart = 1; enable = 1;
      @(negedge clk);
      restart = 0;
      last_t = -1; nsamp = 0;
      for (int c = 0; c < 60; c++) begin
        @(posedge clk); #1;
        if (sample_valid) begin
          checks++;
          // the pins were copied at the previous edge: cycle count cyc-1
          if (sample !== N'(cyc - 1)) begin
            failures++; $display("rate %0d: sample %0d at cycle %0d", rate, sample, cyc);
          end
          if (last_t >= 0) begin
            checks++;
            if (cyc - last_t != period) begin
              failures++; $display("rate %0d: spacing %0d expected %0d", rate, cyc - last_t, period);
            end
            checks++;
            if (sample_stamp !== last_stamp + 1) begin
              failures++; $display("stamp did not advance by one");
            end
          end
          last_t = cyc; last_stamp = sample_stamp; nsamp++;
        end
      end
      checks++;
      if (nsamp < 60 / period - 1) begin failures++; $display("too few samples %0d", nsamp); end
    end
    // disabled: no sample_valid, but the synchronization counter runs on
    @(negedge clk);
    enable = 0; rate = 32'd3;
    @(posedge clk); #1;
    sc0 = sync_count;
    for (int c = 0; c < 40; c++) begin
      @(posedge clk); #1;
      checks++;
      if (sample_valid) begin failures++; $display("sample_valid while disabled"); end
    end
    checks++;
    if (sync_count - sc0 != 10) begin
      failures++; $display("sync counter advanced %0d in 40 cycles at rate 3", sync_count - sc0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
