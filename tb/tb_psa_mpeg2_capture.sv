// tb_psa_mpeg2_capture: captures the pin count of an MPEG-2 decoder example
// (111 observed I/O signals) with the analyzer at its full size, in the
// 192-signal mode (256k samples), one sample every second clock, trigger at
// the start of the window. The 111 pins carry words derived from the cycle
// count; the remaining pins are held at zero. The trigger is the rising edge
// of pin 100 combined (AND) with a level pattern on pins 7:5. After the
// capture the test checks the header, that 256k-1 samples follow the
// trigger sample, and that read-back samples hold exactly the 111 signals
// of their clock cycle.
module tb_psa_mpeg2_capture;
  import psa_pkg::*;
  localparam int NS = 6, SW = 32, AW = 18;
  localparam int MEMW = NS * SW, NSIG = 2 * MEMW, DEPTH = 2 ** AW;
  localparam int N_IO = 111;

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

  // the 111 observed signals as a function of the cycle count
  function automatic logic [NSIG-1:0] io_of(logic [31:0] c);
    logic [127:0] w;
    w = {c ^ 32'hA5A5_0F0F, c * 32'd3, ~c, c};
    return NSIG'(w[N_IO-1:0]);
  endfunction
  assign pins = io_of(cyc);

  initial begin
    repeat (2000000) @(posedge clk);
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
    logic [31:0] st, li, ti;
    logic [NSIG-1:0] s;
    logic [31:0] c;
    int n;
    repeat (4) @(posedge clk);
    rst_n = 1;
    // pattern 0: rising edge of pin 100; pattern 1: pins 7:5 == 3'b001
    wr(REG_PAT_BASE + 12'(PAT_VALUE_OFS) + 12'd3, 32'h10);
    wr(REG_PAT_BASE + 12'(PAT_MASK_OFS) + 12'd3, 32'h10);
    wr(REG_PAT_BASE + 12'(PAT_MODE_OFS), 32'(PM_RISE));
    wr(REG_PAT_BASE + 12'h40 + 12'(PAT_VALUE_OFS), 32'h20);
    wr(REG_PAT_BASE + 12'h40 + 12'(PAT_MASK_OFS), 32'hE0);
    wr(REG_PAT_BASE + 12'h40 + 12'(PAT_MODE_OFS), 32'(PM_LEVEL));
    wr(REG_COMB, 32'({1'b0, TERM_OFF, TERM_OFF, TERM_OFF, TERM_ON, 8'h03, 4'h1}));
    wr(REG_CONFIG, {26'b0, 1'b1, 1'b0, 2'(TPOS_START), 2'(MODE_192)});
    wr(REG_RATE, 32'd1);
    wr(REG_CTRL, 32'h1);
    n = 0;
    do begin
      repeat (2000) @(negedge clk);
      rd(REG_STATUS, st);
      n++;
    end while (!st[2] && n < 900);
    check("capture ended", st[2]);
    check("capture triggered", st[1]);
    check("irq raised", irq);
    rd(REG_LAST_IDX, li);
    rd(REG_TRIG_IDX, ti);
    check("256k-1 samples after the trigger", ((li - ti) & 32'(DEPTH - 1)) == 32'(DEPTH - 1));
    read_sample(int'(ti), s);
    c = s[31:0];
    check("trigger sample holds the 111 signals of its cycle", s == io_of(c));
    check("trigger sample has pin 100 high and pins 7:5 = 001", s[100] && s[7:5] == 3'b001);
    check("pin 100 was low one sample earlier", !io_of(c - 32'd2)[100]);
    for (int i = 1; i < 6; i++) begin
      read_sample((int'(ti) + i * 40000) % DEPTH, s);
      check("later sample holds its 111 signals", s == io_of(c + 32'(2 * i * 40000)));
    end
    read_sample(int'(li), s);
    check("last sample 2*(256k-1) clocks after the trigger", s == io_of(c + 32'(2 * (DEPTH - 1))));
    $display("trigger sample at cycle %0d, trigger index %0d, last index %0d", c, ti, li);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
