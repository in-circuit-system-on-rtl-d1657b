// tb_psa_controller: checks the register block. It writes and reads back
// every read/write register and every pattern value, mask and mode word,
// checks that the configuration outputs carry what was written, that the
// CTRL bits give one-cycle start/force/stop pulses, that status and header
// inputs read back at their addresses, that SYNC_LO latches the high word,
// that a read-back sample lands in the RD_DATA words, and that irq follows
// trig_hit, its enable and its clear.
module tb_psa_controller;
  import psa_pkg::*;
  localparam int N = 64, NP = 6, IW = 7;

  logic clk = 0, rst_n = 0;
  logic reg_req = 0, reg_we = 0;
  logic [11:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic irq, start, stop, force_trigger, ext_trig_en, rd_req;
  psa_mode_e mode;
  trig_pos_e tpos;
  logic [31:0] rate;
  logic [NP-1:0][N-1:0] pat_value, pat_mask;
  pat_mode_e [NP-1:0] pat_mode;
  trig_comb_t comb_cfg;
  timer_cfg_t timer_cfg;
  seq_cfg_t seq_cfg;
  logic [IW-1:0] rd_idx;
  logic trig_hit = 0, capturing = 0, triggered = 0, done = 0, wrapped = 0;
  logic [IW-1:0] last_idx = '0, trig_idx = '0;
  logic [STAMP_W-1:0] trig_stamp = '0, sync_count = '0;
  logic [N-1:0] rd_data = '0;
  logic rd_valid = 0, rd_busy = 0;
  int checks = 0, failures = 0;

  psa_controller #(.N_SIG(N), .N_PAT(NP), .IDXW(IW), .RATE_W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] d, w;
    logic [N-1:0] v [NP], mk [NP];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // configuration registers
    wr(REG_CONFIG, 32'h0000_0036);   // mode 2, tpos 1, ext en, irq en
    rd(REG_CONFIG, d);
    expect_eq("CONFIG", d, 32'h36);
    expect_eq("mode", mode, MODE_384);
    expect_eq("tpos", tpos, TPOS_MIDDLE);
    expect_eq("ext_trig_en", ext_trig_en, 1);
    wr(REG_RATE, 32'd1234);
    rd(REG_RATE, d);
    expect_eq("RATE", d, 1234);
    expect_eq("rate out", rate, 1234);
    w = 32'h001A_5A5A;
    wr(REG_COMB, w);
    rd(REG_COMB, d);
    expect_eq("COMB", d, w & ((1 << $bits(trig_comb_t)) - 1));
    expect_eq("comb out", comb_cfg, w[$bits(trig_comb_t)-1:0]);
    wr(REG_TIMER_SEL, 32'd4);
    wr(REG_TIMER_REF, 32'hDEAD_BEEF);
    rd(REG_TIMER_REF, d);
    expect_eq("TIMER_REF", d, 32'hDEAD_BEEF);
    expect_eq("timer cfg", timer_cfg, {3'd4, 32'hDEAD_BEEF});
    wr(REG_SEQ, 32'h0000_4A53);
    rd(REG_SEQ, d);
    expect_eq("SEQ", d, 32'h4A53 & ((1 << $bits(seq_cfg_t)) - 1));
    // pattern registers
    for (int p = 0; p < NP; p++) begin
      v[p] = {$urandom, $urandom};
      mk[p] = {$urandom, $urandom};
      for (int k = 0; k < N / 32; k++) begin
        wr(REG_PAT_BASE + 12'(64 * p) + 12'(PAT_VALUE_OFS) + 12'(k), v[p][32*k +: 32]);
        wr(REG_PAT_BASE + 12'(64 * p) + 12'(PAT_MASK_OFS) + 12'(k), mk[p][32*k +: 32]);
      end
      wr(REG_PAT_BASE + 12'(64 * p) + 12'(PAT_MODE_OFS), 32'(p % 4));
    end
    for (int p = 0; p < NP; p++) begin
      expect_eq("pat value", pat_value[p], v[p]);
      expect_eq("pat mask", pat_mask[p], mk[p]);
      expect_eq("pat mode", pat_mode[p], 64'(p % 4));
      rd(REG_PAT_BASE + 12'(64 * p) + 12'(PAT_MASK_OFS) + 12'd1, d);
      expect_eq("pat mask read", d, mk[p][63:32]);
    end
    // pulses
    @(negedge clk);
    reg_req = 1; reg_we = 1; reg_addr = REG_CTRL; reg_wdata = 32'h7;
    @(negedge clk);
    reg_req = 0; reg_we = 0;
    expect_eq("pulses", {start, force_trigger, stop}, 3'b111);
    @(negedge clk);
    expect_eq("pulses gone", {start, force_trigger, stop}, 3'b000);
    // status and header
    capturing = 1; triggered = 0; done = 1; wrapped = 1; rd_busy = 1;
    last_idx = 7'd99; trig_idx = 7'd42; trig_stamp = 64'h0123_4567_89AB_CDEF;
    rd(REG_STATUS, d);
    expect_eq("STATUS", d, 32'b10_1101);
    rd(REG_LAST_IDX, d);  expect_eq("LAST_IDX", d, 99);
    rd(REG_TRIG_IDX, d);  expect_eq("TRIG_IDX", d, 42);
    rd(REG_TSTAMP_LO, d); expect_eq("TSTAMP_LO", d, 32'h89AB_CDEF);
    rd(REG_TSTAMP_HI, d); expect_eq("TSTAMP_HI", d, 32'h0123_4567);
    sync_count = 64'h0000_0005_FFFF_FFF0;
    rd(REG_SYNC_LO, d);   expect_eq("SYNC_LO", d, 32'hFFFF_FFF0);
    sync_count = 64'h0000_0006_0000_0003;   // high word changed after the low read
    rd(REG_SYNC_HI, d);   expect_eq("SYNC_HI latched", d, 32'h5);
    // readback
    wr(REG_RD_IDX, 32'd17);
    expect_eq("rd_idx", rd_idx, 17);
    @(negedge clk);
    rd_data = 64'hCAFE_F00D_1234_5678; rd_valid = 1;
    @(negedge clk);
    rd_valid = 0; rd_data = '0;
    rd(REG_RD_DATA, d);        expect_eq("RD_DATA0", d, 32'h1234_5678);
    rd(REG_RD_DATA + 12'd1, d); expect_eq("RD_DATA1", d, 32'hCAFE_F00D);
    // interrupt
    expect_eq("irq idle", irq, 0);
    @(negedge clk); trig_hit = 1; @(negedge clk); trig_hit = 0;
    expect_eq("irq set", irq, 1);
    wr(REG_CTRL, 32'h8);
    expect_eq("irq cleared", irq, 0);
    wr(REG_CONFIG, 32'h0);
    @(negedge clk); trig_hit = 1; @(negedge clk); trig_hit = 0;
    expect_eq("irq masked", irq, 0);
    rd(REG_STATUS, d);
    expect_eq("irq pending bit", d[4], 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
