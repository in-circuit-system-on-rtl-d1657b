// tb_psa_full: one complete capture with the analyzer at its full size:
// 384 observed pins and six 32-bit x 256k SRAM chips. The pins carry the
// cycle count plus the word number in each 32-bit word. The analyzer
// samples every clock in the 192-signal mode with the trigger in the middle
// and a level pattern that first matches after the 256k-sample memory has
// wrapped once. The test checks that the capture ends with 128k samples
// after the trigger sample, the header registers, the trigger sample and
// its neighbours read back, and that only 192 signals were stored.
module tb_psa_full;
  import psa_pkg::*;
  localparam int NS = 6, SW = 32, AW = 18;
  localparam int MEMW = NS * SW, NSIG = 2 * MEMW, DEPTH = 2 ** AW;

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

  psa_block dut (.*);

  for (genvar c = 0; c < NS; c++) begin : g_mem
    sram_model #(.AW(AW), .W(SW)) u_mem (
      .clk(clk), .addr(sram_addr), .we(sram_we[c]),
      .wdata(sram_wdata[c*SW +: SW]), .rdata(sram_rdata[c*SW +: SW]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  for (genvar w = 0; w < NSIG / 32; w++) begin : g_pins
    assign pins[32*w +: 32] = cyc + 32'(w);
  end

  initial begin
    repeat (1000000) @(posedge clk);
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

  task automatic read_sample(int idx, output logic [NSIG-1:0] s);
    logic [31:0] st, d;
    wr(REG_RD_IDX, 32'(idx));
    do rd(REG_STATUS, st); while (st[5]);
    for (int w = 0; w < NSIG / 32; w++) begin
      rd(REG_RD_DATA + 12'(w), d);
      s[32*w +: 32] = d;
    end
  endtask

  initial begin
    logic [31:0] k, st, li, ti, ts;
    logic [NSIG-1:0] s, sp;
    int n;
    repeat (4) @(posedge clk);
    rst_n = 1;
    k = cyc + 32'd300000;   // past one full pass over the memory
    wr(REG_PAT_BASE + 12'(PAT_VALUE_OFS), k);
    wr(REG_PAT_BASE + 12'(PAT_MASK_OFS), 32'hFFFF_FFFF);
    wr(REG_PAT_BASE + 12'(PAT_MODE_OFS), 32'(PM_LEVEL));
    wr(REG_COMB, 32'({1'b0, TERM_OFF, TERM_OFF, TERM_OFF, TERM_ON, 8'h01, 4'h0}));
    wr(REG_CONFIG, {26'b0, 1'b1, 1'b0, 2'(TPOS_MIDDLE), 2'(MODE_192)});
    wr(REG_RATE, 32'd0);
    wr(REG_CTRL, 32'h1);
    n = 0;
    do begin
      repeat (1000) @(negedge clk);
      rd(REG_STATUS, st);
      n++;
    end while (!st[2] && n < 900);
    check("capture ended", st[2]);
    check("capture triggered", st[1]);
    check("memory wrapped", st[3]);
    check("irq raised", irq);
    rd(REG_LAST_IDX, li);
    rd(REG_TRIG_IDX, ti);
    rd(REG_TSTAMP_LO, ts);
    check("128k samples after the trigger", ((li - ti) & 32'(DEPTH - 1)) == 32'(DEPTH / 2));
    read_sample(int'(ti), s);
    check("trigger sample matches", s[31:0] == k);
    for (int w = 0; w < MEMW / 32; w++) check("stored signal word", s[32*w +: 32] == k + 32'(w));
    check("signals above 192 not stored", s[NSIG-1:MEMW] == '0);
    read_sample((int'(ti) + DEPTH - 1) % DEPTH, sp);
    check("sample before the trigger", sp[31:0] == k - 1);
    read_sample((int'(ti) + DEPTH / 2 + 1) % DEPTH, sp);
    check("oldest sample kept is 128k-1 before the trigger", sp[31:0] == k - 32'(DEPTH / 2 - 1));
    read_sample(int'(li), sp);
    check("last sample 128k after the trigger", sp[31:0] == k + 32'(DEPTH / 2));
    $display("trigger index %0d, last index %0d, trigger stamp %0d", ti, li, ts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
