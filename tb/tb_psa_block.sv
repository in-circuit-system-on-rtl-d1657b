// tb_psa_block: end-to-end test of the Pin Signal Analyzer, driven only
// through its register port, with a small acquisition memory (two 16-bit
// SRAM chips of 32 words: 64 x 16, 32 x 32 or 16 x 64 samples).
//
// The observed pins carry the clock-cycle count in the low 32 bits and its
// complement in the high 32 bits, so every stored sample tells when it was
// taken. Each capture is programmed, started, left to trigger and finish,
// and then checked from the header registers and from samples read back:
// the trigger sample must satisfy the trigger condition, consecutive
// samples must be one sampling period apart, exactly the number of samples
// the trigger position asks for must follow the trigger sample, and the
// interrupt must be raised. The captures cover a level pattern, an edge, the
// timer, the sequencer, the external trigger (disabled and enabled), the
// force trigger, stop, all three modes, all three trigger positions,
// sampling rates above one sample per clock and wrapping of the memory.
// Each of these is counted and one that never happened is a failure.
module tb_psa_block;
  import psa_pkg::*;
  localparam int NS = 2, SW = 16, AW = 5;
  localparam int MEMW = NS * SW, NSIG = 2 * MEMW;

  logic clk = 0, rst_n = 0;
  logic [NSIG-1:0] pins;
  logic ext_trigger = 0;
  logic reg_req = 0, reg_we = 0;
  logic [11:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic irq;
  logic [AW-1:0] sram_addr;
  logic [NS-1:0] sram_we;
  logic [MEMW-1:0] sram_wdata, sram_rdata;
  int checks = 0, failures = 0;
  logic [31:0] cyc = 0;

  psa_block #(.N_SRAM(NS), .SRAM_W(SW), .SRAM_AW(AW), .N_PAT(6)) dut (.*);

  for (genvar c = 0; c < NS; c++) begin : g_mem
    sram_model #(.AW(AW), .W(SW)) u_mem (
      .clk(clk), .addr(sram_addr), .we(sram_we[c]),
      .wdata(sram_wdata[c*SW +: SW]), .rdata(sram_rdata[c*SW +: SW]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign pins = {~cyc, cyc};

  // mechanism counters
  int n_level, n_edge, n_timer, n_seq, n_ext, n_ext_blocked, n_force, n_stop;
  int n_mode[3], n_tpos[3], n_wrap, n_rate, n_irq, n_readback;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [11:0] a, logic [31:0] d);
    @(negedge clk);
    reg_req = 1; reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_req = 0; reg_we = 0;
  endtask

  task automatic rd(logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    reg_req = 1; reg_we = 0; reg_addr = a;
    @(negedge clk);
    reg_req = 0;
    d = reg_rdata;
  endtask

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // read one sample back; returns its low word (the cycle count) and high word
  task automatic read_sample(int idx, output logic [31:0] lo, output logic [31:0] hi);
    logic [31:0] st;
    wr(REG_RD_IDX, 32'(idx));
    do rd(REG_STATUS, st); while (st[5]);
    rd(REG_RD_DATA, lo);
    rd(REG_RD_DATA + 12'd1, hi);
    n_readback++;
  endtask

  function automatic int depth_of(psa_mode_e m);
    return (m == MODE_96) ? 2 ** (AW + 1) : (m == MODE_384) ? 2 ** (AW - 1) : 2 ** AW;
  endfunction

  task automatic set_pattern(int p, logic [63:0] value, logic [63:0] mask, pat_mode_e md);
    wr(REG_PAT_BASE + 12'(64 * p) + 12'(PAT_VALUE_OFS), value[31:0]);
    wr(REG_PAT_BASE + 12'(64 * p) + 12'(PAT_VALUE_OFS) + 12'd1, value[63:32]);
    wr(REG_PAT_BASE + 12'(64 * p) + 12'(PAT_MASK_OFS), mask[31:0]);
    wr(REG_PAT_BASE + 12'(64 * p) + 12'(PAT_MASK_OFS) + 12'd1, mask[63:32]);
    wr(REG_PAT_BASE + 12'(64 * p) + 12'(PAT_MODE_OFS), 32'(md));
  endtask

  function automatic logic [31:0] comb_word(logic [7:0] in_en, logic [3:0] pair_and,
                                            term_ctl_e t0, term_ctl_e t1, term_ctl_e t2,
                                            term_ctl_e t3, logic final_and);
    trig_comb_t c;
    c.in_en = in_en; c.pair_and = pair_and; c.final_and = final_and;
    c.term[0] = t0; c.term[1] = t1; c.term[2] = t2; c.term[3] = t3;
    return 32'(c);
  endfunction

  // program mode/position/rate, start, wait for the end, check the window.
  // Returns the trigger sample's cycle count and the start cycle.
  task automatic capture(psa_mode_e m, trig_pos_e tp, int rate, logic ext_en,
                         output logic [31:0] tval, output logic [31:0] t_start,
                         output int trig_i);
    logic [31:0] st, li, ti, lo, hi, prev_lo, prev_hi, ts_lo;
    int depth, post, period, n;
    depth = depth_of(m);
    post = (tp == TPOS_START) ? depth - 1 : (tp == TPOS_MIDDLE) ? depth / 2 : 0;
    period = rate + 1;
    if (m == MODE_384 && period < 2) period = 2;
    wr(REG_CONFIG, {26'b0, 1'b1, ext_en, 2'(tp), 2'(m)});
    wr(REG_RATE, 32'(rate));
    t_start = cyc;
    wr(REG_CTRL, 32'h1);
    n = 0;
    do begin
      repeat (20) @(negedge clk);
      rd(REG_STATUS, st);
      n++;
    end while (!st[2] && n < 2000);
    check("capture ended", st[2] == 1'b1);
    check("capture triggered", st[1] == 1'b1);
    check("irq raised", irq == 1'b1);
    if (irq) n_irq++;
    wr(REG_CTRL, 32'h8);
    check("irq cleared", irq == 1'b0);
    rd(REG_LAST_IDX, li);
    rd(REG_TRIG_IDX, ti);
    trig_i = int'(ti);
    check("samples after the trigger", int'((li - ti + 32'(depth)) % 32'(depth)) == post);
    if (st[3]) n_wrap++;
    read_sample(int'(ti), tval, hi);
    // the trigger stamp is the synchronization count of the trigger sample
    rd(REG_TSTAMP_LO, ts_lo);
    // samples are one period apart: check last vs trigger sample
    read_sample(int'(li), lo, hi);
    check("period between trigger and last sample", lo - tval == 32'(post * period));
    if (m == MODE_96) check("96-signal sample holds 16 signals", hi == 0 && lo[31:16] == 0);
    else if (m == MODE_384) check("384-signal sample holds the high half", hi == ~lo);
    else check("192-signal sample holds 32 signals", hi == 0);
    if ((st[3] || int'(ti) > 0) && tp != TPOS_START) begin
      read_sample((int'(ti) + depth - 1) % depth, prev_lo, prev_hi);
      if (m != MODE_96) check("previous sample one period earlier", tval - prev_lo == 32'(period));
      else check("previous sample one period earlier", 16'(tval - prev_lo) == 16'(period));
    end
    n_mode[int'(m)]++;
    n_tpos[int'(tp)]++;
    if (period > 1) n_rate++;
  endtask

  initial begin
    logic [31:0] tv, t0, st, k, lo, hi;
    int ti;
    n_level = 0; n_edge = 0; n_timer = 0; n_seq = 0; n_ext = 0; n_ext_blocked = 0;
    n_force = 0; n_stop = 0; n_wrap = 0; n_rate = 0; n_irq = 0; n_readback = 0;
    for (int i = 0; i < 3; i++) begin n_mode[i] = 0; n_tpos[i] = 0; end
    repeat (4) @(posedge clk);
    rst_n = 1;

    // 1. level pattern on pattern 0, 192 signals, middle, one sample per clock
    k = cyc + 32'd300;
    set_pattern(0, {32'h0, k}, 64'h0000_0000_0000_FFFF, PM_LEVEL);
    wr(REG_COMB, comb_word(8'h01, 4'h0, TERM_ON, TERM_OFF, TERM_OFF, TERM_OFF, 1'b0));
    capture(MODE_192, TPOS_MIDDLE, 0, 1'b0, tv, t0, ti);
    check("level trigger sample", tv[15:0] == k[15:0]);
    if (tv[15:0] == k[15:0]) n_level++;

    // 2. rising edge of bit 6 on pattern 3, 96 signals, trigger at start, rate 2
    set_pattern(3, 64'h40, 64'h40, PM_RISE);
    wr(REG_COMB, comb_word(8'h08, 4'h0, TERM_OFF, TERM_ON, TERM_OFF, TERM_OFF, 1'b0));
    capture(MODE_96, TPOS_START, 2, 1'b0, tv, t0, ti);
    check("edge trigger sample has bit 6 set", tv[6] == 1'b1);
    check("edge trigger sample follows one without it", ((tv - 32'd3) & 32'h40) == 0);
    if (tv[6] && ((tv - 32'd3) & 32'h40) == 0) n_edge++;

    // 3. timer: 7 samples after pattern 4 (low byte 0x80), 384 signals, end
    set_pattern(4, 64'h80, 64'hFF, PM_LEVEL);
    wr(REG_TIMER_SEL, 32'd4);
    wr(REG_TIMER_REF, 32'd7);
    wr(REG_COMB, comb_word(8'h40, 4'h0, TERM_OFF, TERM_OFF, TERM_OFF, TERM_ON, 1'b0));
    capture(MODE_384, TPOS_END, 0, 1'b0, tv, t0, ti);
    // sampling every 2 cycles: the sample matching 0x80 is even or odd
    check("timer trigger 7 samples after the start pattern",
          tv[7:0] == 8'h8E || tv[7:0] == 8'h8F);
    if (tv[7:0] == 8'h8E || tv[7:0] == 8'h8F) n_timer++;

    // 4. sequencer: pattern 1 (low byte 0x10) then pattern 2 (low byte 0x20)
    //    but combined with "pattern 5 inverted" (bit 12 clear) by AND
    set_pattern(1, 64'h10, 64'hFF, PM_LEVEL);
    set_pattern(2, 64'h20, 64'hFF, PM_LEVEL);
    set_pattern(5, 64'h1000, 64'h1000, PM_LEVEL);
    wr(REG_SEQ, 32'({9'b0, 3'd2, 3'd1, 3'd2}));   // len 2: step0 = 1, step1 = 2
    wr(REG_COMB, comb_word(8'hA0, 4'h0, TERM_OFF, TERM_OFF, TERM_INV, TERM_ON, 1'b1));
    capture(MODE_192, TPOS_START, 0, 1'b0, tv, t0, ti);
    check("sequencer trigger on 0x20", tv[7:0] == 8'h20);
    check("sequencer trigger with bit 12 clear", tv[12] == 1'b0);
    check("sequencer trigger after a 0x10 sample", tv - 32'd16 >= t0);
    if (tv[7:0] == 8'h20 && !tv[12]) n_seq++;

    // 5. external trigger, disabled first, then enabled; no pattern term
    wr(REG_COMB, 32'h0);
    wr(REG_CONFIG, {26'b0, 1'b1, 1'b0, 2'(TPOS_MIDDLE), 2'(MODE_192)});
    wr(REG_CTRL, 32'h1);
    repeat (100) @(negedge clk);
    ext_trigger = 1; @(negedge clk); ext_trigger = 0;
    repeat (10) @(negedge clk);
    rd(REG_STATUS, st);
    check("disabled external trigger ignored", st[1] == 1'b0 && st[0] == 1'b1);
    if (st[1] == 1'b0) n_ext_blocked++;
    // stop it
    wr(REG_CTRL, 32'h4);
    rd(REG_STATUS, st);
    check("stop ends the capture untriggered", st[2:0] == 3'b100);
    if (st[2:0] == 3'b100) n_stop++;
    fork
      capture(MODE_192, TPOS_MIDDLE, 1, 1'b1, tv, t0, ti);
      begin
        repeat (150) @(negedge clk);
        k = cyc;
        ext_trigger = 1; @(negedge clk); ext_trigger = 0;
      end
    join
    check("external trigger sample taken just before the pulse",
          k - tv <= 32'd3 && k >= tv);
    if (k - tv <= 32'd3) n_ext++;

    // 6. force trigger from the host, 96 signals, end position
    fork
      capture(MODE_96, TPOS_END, 0, 1'b0, tv, t0, ti);
      begin
        repeat (200) @(negedge clk);
        k = cyc;
        reg_req = 1; reg_we = 1; reg_addr = REG_CTRL; reg_wdata = 32'h2;
        @(negedge clk);
        reg_req = 0; reg_we = 0;
      end
    join
    check("force trigger sample taken at the command", 16'(k - tv) <= 16'd4);
    if (16'(k - tv) <= 16'd4) n_force++;

    // 7. 384 signals, middle, rate 3, level on pattern 0
    k = cyc + 32'd400;
    set_pattern(0, {32'h0, k & 32'hFFFF_FFFC}, 64'h0000_0000_0000_FFFC, PM_LEVEL);
    wr(REG_COMB, comb_word(8'h01, 4'h0, TERM_ON, TERM_OFF, TERM_OFF, TERM_OFF, 1'b0));
    capture(MODE_384, TPOS_MIDDLE, 3, 1'b0, tv, t0, ti);
    check("384 level trigger", tv[15:2] == k[15:2]);

    // 8. 192 signals, end position
    k = cyc + 32'd200;
    set_pattern(0, {32'h0, k}, 64'h0000_0000_0000_FFFF, PM_LEVEL);
    capture(MODE_192, TPOS_END, 0, 1'b0, tv, t0, ti);
    check("192 end trigger", tv[15:0] == k[15:0]);

    // 9. synchronization counter keeps running and reads consistently
    rd(REG_SYNC_LO, lo);
    rd(REG_SYNC_HI, hi);
    check("sync counter high word", hi == 0);
    check("sync counter running", lo > 32'd100);

    check("level pattern trigger seen", n_level > 0);
    check("edge trigger seen", n_edge > 0);
    check("timer trigger seen", n_timer > 0);
    check("sequencer trigger seen", n_seq > 0);
    check("external trigger seen", n_ext > 0);
    check("disabled external trigger seen", n_ext_blocked > 0);
    check("force trigger seen", n_force > 0);
    check("stop seen", n_stop > 0);
    for (int i = 0; i < 3; i++) check("every mode used", n_mode[i] > 0);
    for (int i = 0; i < 3; i++) check("every trigger position used", n_tpos[i] > 0);
    check("wrap seen", n_wrap > 0);
    check("slow sampling seen", n_rate > 0);
    check("irq seen", n_irq > 0);
    $display("level %0d edge %0d timer %0d seq %0d ext %0d ext_blocked %0d force %0d stop %0d wrap %0d rate %0d irq %0d readback %0d",
             n_level, n_edge, n_timer, n_seq, n_ext, n_ext_blocked, n_force, n_stop, n_wrap, n_rate, n_irq, n_readback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
