// tb_psa_sram_if: checks the SRAM interface with a small memory (two 8-bit
// chips of 16 words: 32 x 8, 16 x 16 or 8 x 32 samples) and behavioural
// SRAM models. For every operating mode and trigger position, and for
// triggers before and after the memory has wrapped, it writes numbered
// samples, raises the trigger one cycle after sample T (as the trigger
// checker does), keeps sampling until done and then checks: the number of
// samples stored after the trigger, trig_idx, trig_stamp, last_idx, wrapped,
// and every memory entry read back through the readback port against the
// newest sample that should occupy it. One run samples every cycle with the
// trigger and a sample in the same cycle, and one run is ended with stop.
module tb_psa_sram_if;
  import psa_pkg::*;
  localparam int NS = 2, SW = 8, AW = 4;
  localparam int MEMW = NS * SW, NSIG = 2 * MEMW, IDXW = AW + 1;

  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  psa_mode_e mode = MODE_192;
  trig_pos_e tpos = TPOS_MIDDLE;
  logic sample_valid = 0, trig_hit = 0;
  logic [NSIG-1:0] sample = '0;
  logic [STAMP_W-1:0] sample_stamp = '0;
  psa_mode_e cur_mode;
  logic capturing, triggered, done, wrapped;
  logic [IDXW-1:0] last_idx, trig_idx;
  logic [STAMP_W-1:0] trig_stamp;
  logic rd_req = 0;
  logic [IDXW-1:0] rd_idx = '0;
  logic [NSIG-1:0] rd_data;
  logic rd_valid, rd_busy;
  logic [AW-1:0] sram_addr;
  logic [NS-1:0] sram_we;
  logic [MEMW-1:0] sram_wdata, sram_rdata;
  int checks = 0, failures = 0;

  psa_sram_if #(.N_SRAM(NS), .SRAM_W(SW), .SRAM_AW(AW)) dut (.*);

  for (genvar c = 0; c < NS; c++) begin : g_mem
    sram_model #(.AW(AW), .W(SW)) u_mem (
      .clk(clk), .addr(sram_addr), .we(sram_we[c]),
      .wdata(sram_wdata[c*SW +: SW]), .rdata(sram_rdata[c*SW +: SW]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int width_of(psa_mode_e m);
    return (m == MODE_96) ? MEMW / 2 : (m == MODE_384) ? NSIG : MEMW;
  endfunction
  function automatic int depth_of(psa_mode_e m);
    return (m == MODE_96) ? 2 ** (AW + 1) : (m == MODE_384) ? 2 ** (AW - 1) : 2 ** AW;
  endfunction
  function automatic logic [NSIG-1:0] value_of(int n, psa_mode_e m);
    logic [NSIG-1:0] v;
    v = NSIG'(n * 32'h9E3779B1 + 32'h1234);
    v = v ^ (v << 13);
    return v & ((NSIG'(1) << width_of(m)) - 1) | ((width_of(m) == NSIG) ? v : '0);
  endfunction

  task automatic run(psa_mode_e m, trig_pos_e tp, int trig_at, int gap, logic use_stop);
    int depth, post, n, wr_total, rd_n;
    logic [NSIG-1:0] got;
    depth = depth_of(m);
    post = (tp == TPOS_START) ? depth - 1 : (tp == TPOS_MIDDLE) ? depth / 2 : 0;
    @(negedge clk);
    mode = m; tpos = tp; start = 1;
    @(negedge clk);
    start = 0;
    n = 0;
    while (capturing && n < 400) begin
      sample = value_of(n, m);
      sample_stamp = STAMP_W'(1000 + n);
      sample_valid = 1;
      trig_hit = (n == trig_at + 1) && !use_stop;   // checker result for sample trig_at
      if (use_stop && n == trig_at) stop = 1;
      @(negedge clk);
      n++;
      sample_valid = 0; trig_hit = 0; stop = 0;
      if (gap > 1) begin
        // trigger result of the last sample comes between samples
        if (n == trig_at + 1 && !use_stop) begin
          trig_hit = 1;
          @(negedge clk);
          trig_hit = 0;
          for (int g = 2; g < gap; g++) @(negedge clk);
        end else begin
          for (int g = 1; g < gap; g++) @(negedge clk);
        end
      end
    end
    repeat (3) @(negedge clk);
    // how many samples went in: last_idx tells with the wrap count
    checks++;
    if (cur_mode !== m) begin failures++; $display("cur_mode %0d expected %0d", cur_mode, m); end
    checks++;
    if (!done || capturing) begin failures++; $display("mode %0d: capture did not end", m); end
    if (use_stop) begin
      wr_total = trig_at;   // stop wins over the sample of the same cycle
      checks++;
      if (triggered) begin failures++; $display("stop: triggered set"); end
    end else begin
      wr_total = trig_at + 1 + post;
      checks++;
      if (!triggered || trig_idx !== IDXW'(trig_at % depth) || trig_stamp !== STAMP_W'(1000 + trig_at)) begin
        failures++;
        $display("mode %0d pos %0d T %0d: triggered=%b trig_idx=%0d stamp=%0d", m, tp, trig_at, triggered, trig_idx, trig_stamp);
      end
    end
    checks++;
    if (last_idx !== IDXW'((wr_total - 1) % depth) || wrapped !== (wr_total > depth)) begin
      failures++;
      $display("mode %0d pos %0d T %0d: last_idx=%0d wrapped=%b expected %0d %b",
               m, tp, trig_at, last_idx, wrapped, (wr_total - 1) % depth, wr_total > depth);
    end
    // read back every entry
    for (int i = 0; i < depth; i++) begin
      rd_n = -1;
      for (int k = 0; k < wr_total; k++) if (k % depth == i) rd_n = k;
      if (rd_n < 0) continue;
      @(negedge clk);
      rd_idx = IDXW'(i); rd_req = 1;
      @(negedge clk);
      rd_req = 0;
      while (!rd_valid) @(negedge clk);
      got = rd_data;
      checks++;
      if (got !== value_of(rd_n, m)) begin
        failures++;
        $display("mode %0d pos %0d idx %0d: read %h expected %h (sample %0d)", m, tp, i, got, value_of(rd_n, m), rd_n);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++)
      for (int tp = 0; tp < 3; tp++) begin
        run(psa_mode_e'(m), trig_pos_e'(tp), 5, 2, 0);            // before wrapping
        run(psa_mode_e'(m), trig_pos_e'(tp), 45, 2, 0);           // after wrapping
      end
    run(MODE_192, TPOS_MIDDLE, 20, 1, 0);   // one sample per cycle
    run(MODE_96, TPOS_END, 30, 1, 0);
    run(MODE_192, TPOS_START, 11, 2, 1);    // ended by stop
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
