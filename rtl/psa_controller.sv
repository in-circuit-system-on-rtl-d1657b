// psa_controller: control and status registers of the Pin Signal Analyzer.
//
// The host (through the transactor) reaches the PSA through a simple
// register port: reg_req with reg_we writes reg_wdata at word address
// reg_addr; reg_req without reg_we reads, and reg_rdata holds the word in
// the next cycle. The map is in psa_pkg (REG_*):
//   CTRL        write-only pulses: bit0 start a capture, bit1 force the
//               trigger (the command the software analyzer sends), bit2 stop,
//               bit3 clear the interrupt
//   CONFIG      operating mode, trigger position, external trigger enable,
//               interrupt enable
//   RATE        sampling rate: one sample every RATE+1 clocks
//   COMB, TIMER_SEL, TIMER_REF, SEQ, pattern value/mask/mode registers:
//               the triggering condition
//   STATUS, LAST_IDX, TRIG_IDX, TSTAMP_*: header information of a capture
//   SYNC_LO/HI  synchronization counter; reading SYNC_LO latches the high
//               word so the pair is read consistently (time t0)
//   RD_IDX, RD_DATA+k: write a sample index to read that sample back from
//               the acquisition memory, wait until STATUS.rd_busy is clear,
//               then read its N_SIG bits as 32-bit words
// irq goes high when the capture triggers (if enabled) and stays high until
// cleared: this is how the PSA tells the software side it has triggered.
//
// Registers for triggering condition, trigger position, sampling rate and
// external trigger enable, header information (last write address, trigger
// point, operating mode, sampling rate) and the force-trigger/interrupt link
// follow the published PSA. The bus, the map and the bit layout are this
// design's choices.
module psa_controller
  import psa_pkg::*;
#(
  parameter int unsigned N_SIG   = 384,
  parameter int unsigned N_PAT   = 6,
  parameter int unsigned IDXW    = 19,
  parameter int unsigned RATE_W  = 32,
  localparam int unsigned N_WORDS = (N_SIG + 31) / 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // host register port
  input  logic                        reg_req,
  input  logic                        reg_we,
  input  logic [11:0]                 reg_addr,
  input  logic [31:0]                 reg_wdata,
  output logic [31:0]                 reg_rdata,
  output logic                        irq,
  // control to the PSA sub-blocks
  output logic                        start,
  output logic                        stop,
  output logic                        force_trigger,
  output psa_mode_e                   mode,
  output trig_pos_e                   tpos,
  output logic                        ext_trig_en,
  output logic [RATE_W-1:0]           rate,
  output logic [N_PAT-1:0][N_SIG-1:0] pat_value,
  output logic [N_PAT-1:0][N_SIG-1:0] pat_mask,
  output pat_mode_e [N_PAT-1:0]       pat_mode,
  output trig_comb_t                  comb_cfg,
  output timer_cfg_t                  timer_cfg,
  output seq_cfg_t                    seq_cfg,
  output logic                        rd_req,
  output logic [IDXW-1:0]             rd_idx,
  // status from the PSA sub-blocks
  input  logic                        trig_hit,
  input  logic                        capturing,
  input  logic                        triggered,
  input  logic                        done,
  input  logic                        wrapped,
  input  logic [IDXW-1:0]             last_idx,
  input  logic [IDXW-1:0]             trig_idx,
  input  logic [STAMP_W-1:0]          trig_stamp,
  input  logic [STAMP_W-1:0]          sync_count,
  input  logic [N_SIG-1:0]            rd_data,
  input  logic                        rd_valid,
  input  logic                        rd_busy
);

  logic                      irq_en;
  logic                      irq_pend;
  logic [31:0]               sync_hi_q;
  logic [N_WORDS*32-1:0]     rd_buf;
  logic [N_WORDS*32-1:0]     pv_pad [N_PAT];
  logic [N_WORDS*32-1:0]     pm_pad [N_PAT];

  logic       wr, rd;
  logic       pat_sel;
  int unsigned pat_p;
  logic [5:0] pat_ofs;

  assign wr      = reg_req && reg_we;
  assign rd      = reg_req && !reg_we;
  assign pat_sel = reg_addr >= REG_PAT_BASE &&
                   reg_addr < REG_PAT_BASE + 12'(64 * N_PAT);
  assign pat_p   = int'(6'(reg_addr[11:6] - REG_PAT_BASE[11:6]));
  assign pat_ofs = reg_addr[5:0];

  for (genvar p = 0; p < N_PAT; p++) begin : g_pat_out
    assign pat_value[p] = pv_pad[p][N_SIG-1:0];
    assign pat_mask[p]  = pm_pad[p][N_SIG-1:0];
  end

  assign irq = irq_en && irq_pend;

  // ------------------------------------------------------------- writes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start         <= 1'b0;
      stop          <= 1'b0;
      force_trigger <= 1'b0;
      mode          <= MODE_192;
      tpos          <= TPOS_MIDDLE;
      ext_trig_en   <= 1'b0;
      irq_en        <= 1'b0;
      irq_pend      <= 1'b0;
      rate          <= '0;
      comb_cfg      <= '0;
      timer_cfg     <= '0;
      seq_cfg       <= '0;
      rd_req        <= 1'b0;
      rd_idx        <= '0;
      rd_buf        <= '0;
      for (int p = 0; p < N_PAT; p++) begin
        pv_pad[p]   <= '0;
        pm_pad[p]   <= '0;
        pat_mode[p] <= PM_LEVEL;
      end
    end else begin
      start         <= 1'b0;
      stop          <= 1'b0;
      force_trigger <= 1'b0;
      rd_req        <= 1'b0;
      if (trig_hit) irq_pend <= 1'b1;
      if (rd_valid) rd_buf <= (N_WORDS*32)'(rd_data);
      if (wr) begin
        if (pat_sel) begin
          if (pat_ofs < 6'(PAT_VALUE_OFS + N_WORDS))
            pv_pad[pat_p][32*(pat_ofs - PAT_VALUE_OFS) +: 32] <= reg_wdata;
          else if (pat_ofs >= PAT_MASK_OFS && pat_ofs < 6'(PAT_MASK_OFS + N_WORDS))
            pm_pad[pat_p][32*(pat_ofs - PAT_MASK_OFS) +: 32] <= reg_wdata;
          else if (pat_ofs == PAT_MODE_OFS)
            pat_mode[pat_p] <= pat_mode_e'(reg_wdata[1:0]);
        end else begin
          unique case (reg_addr)
            REG_CTRL: begin
              start         <= reg_wdata[0];
              force_trigger <= reg_wdata[1];
              stop          <= reg_wdata[2];
              if (reg_wdata[3]) irq_pend <= 1'b0;
              if (reg_wdata[0]) irq_pend <= 1'b0;
            end
            REG_CONFIG: begin
              mode        <= psa_mode_e'(reg_wdata[1:0]);
              tpos        <= trig_pos_e'(reg_wdata[3:2]);
              ext_trig_en <= reg_wdata[4];
              irq_en      <= reg_wdata[5];
            end
            REG_RATE:      rate      <= reg_wdata[RATE_W-1:0];
            REG_COMB:      comb_cfg  <= reg_wdata[$bits(trig_comb_t)-1:0];
            REG_TIMER_SEL: timer_cfg.start_sel <= reg_wdata[2:0];
            REG_TIMER_REF: timer_cfg.ref_cnt   <= reg_wdata[TIMER_W-1:0];
            REG_SEQ:       seq_cfg   <= reg_wdata[$bits(seq_cfg_t)-1:0];
            REG_RD_IDX: begin
              rd_idx <= reg_wdata[IDXW-1:0];
              rd_req <= 1'b1;
            end
            default: ;
          endcase
        end
      end
    end
  end

  // -------------------------------------------------------------- reads
  logic [31:0] rdata_d;
  always_comb begin
    rdata_d = '0;
    if (pat_sel) begin
      if (pat_ofs < 6'(PAT_VALUE_OFS + N_WORDS))
        rdata_d = pv_pad[pat_p][32*(pat_ofs - PAT_VALUE_OFS) +: 32];
      else if (pat_ofs >= PAT_MASK_OFS && pat_ofs < 6'(PAT_MASK_OFS + N_WORDS))
        rdata_d = pm_pad[pat_p][32*(pat_ofs - PAT_MASK_OFS) +: 32];
      else if (pat_ofs == PAT_MODE_OFS)
        rdata_d = 32'(pat_mode[pat_p]);
    end else if (reg_addr >= REG_RD_DATA && reg_addr < REG_RD_DATA + 12'(N_WORDS)) begin
      rdata_d = rd_buf[32*(reg_addr - REG_RD_DATA) +: 32];
    end else begin
      unique case (reg_addr)
        REG_CONFIG:    rdata_d = {26'b0, irq_en, ext_trig_en, tpos, mode};
        REG_RATE:      rdata_d = 32'(rate);
        REG_STATUS:    rdata_d = {26'b0, rd_busy || rd_req, irq_pend, wrapped, done, triggered, capturing};
        REG_LAST_IDX:  rdata_d = 32'(last_idx);
        REG_TRIG_IDX:  rdata_d = 32'(trig_idx);
        REG_SYNC_LO:   rdata_d = sync_count[31:0];
        REG_SYNC_HI:   rdata_d = sync_hi_q;
        REG_TSTAMP_LO: rdata_d = trig_stamp[31:0];
        REG_TSTAMP_HI: rdata_d = trig_stamp[63:32];
        REG_COMB:      rdata_d = 32'(comb_cfg);
        REG_TIMER_SEL: rdata_d = 32'(timer_cfg.start_sel);
        REG_TIMER_REF: rdata_d = 32'(timer_cfg.ref_cnt);
        REG_SEQ:       rdata_d = 32'(seq_cfg);
        REG_RD_IDX:    rdata_d = 32'(rd_idx);
        default:       rdata_d = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_rdata <= '0;
      sync_hi_q <= '0;
    end else if (rd) begin
      reg_rdata <= rdata_d;
      if (reg_addr == REG_SYNC_LO) sync_hi_q <= sync_count[63:32];
    end
  end

endmodule
