// psa_block: the Pin Signal Analyzer, a logic analyzer built into the FPGA
// next to the hardware design under emulation.
//
// It watches N_SIG pins of the design, samples them at a programmable rate
// and writes the samples round-robin into an external acquisition memory
// (N_SRAM chips of SRAM_W x 2**SRAM_AW). A trigger condition checker looks
// at the same samples; when its condition holds (or the external trigger,
// if enabled, or a forced trigger from the host arrives) the capture goes on
// for as many samples as the trigger position asks and then stops, so the
// memory holds a window of samples around the trigger. The host then reads
// the header registers and the samples back and turns them into a waveform;
// the synchronization counter lets it place those samples on the same time
// axis as software events.
//
// Sub-blocks: psa_controller (registers), psa_sampler (sampling, sync
// counter), psa_sram_if (memory writes, trigger-position stop, readback) and
// psa_trigger_checker (pattern checkers, timer, sequencer, combination).
// The SRAM chips are outside; their shared address, per-chip write enables,
// write data and read data are ports of this block.
//
// Interface: reg_* is the host register port described in psa_controller
// (read data one cycle after the request); irq tells the host that the
// capture has triggered. Timing: a sample reaches the SRAM bus in the cycle
// after the pins are sampled and the pattern path triggers one cycle later.
//
// The five-part structure and the sizes (six 32-bit x 256k SRAMs, 96/192/384
// signals, six pattern checkers) follow the published PSA; the register
// port, the memory timing and all encodings are this design's choices.
module psa_block
  import psa_pkg::*;
#(
  parameter int unsigned N_SRAM  = 6,
  parameter int unsigned SRAM_W  = 32,
  parameter int unsigned SRAM_AW = 18,
  parameter int unsigned N_PAT   = 6,
  localparam int unsigned MEMW   = N_SRAM * SRAM_W,
  localparam int unsigned N_SIG  = 2 * MEMW,
  localparam int unsigned IDXW   = SRAM_AW + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_SIG-1:0]   pins,
  input  logic               ext_trigger,
  input  logic               reg_req,
  input  logic               reg_we,
  input  logic [11:0]        reg_addr,
  input  logic [31:0]        reg_wdata,
  output logic [31:0]        reg_rdata,
  output logic               irq,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [N_SRAM-1:0]  sram_we,
  output logic [MEMW-1:0]    sram_wdata,
  input  logic [MEMW-1:0]    sram_rdata
);

  localparam int unsigned RATE_W = 32;

  logic                        start, stop, force_trigger;
  psa_mode_e                   mode;
  trig_pos_e                   tpos;
  logic                        ext_trig_en;
  logic [RATE_W-1:0]           rate;
  logic [N_PAT-1:0][N_SIG-1:0] pat_value, pat_mask;
  pat_mode_e [N_PAT-1:0]       pat_mode;
  trig_comb_t                  comb_cfg;
  timer_cfg_t                  timer_cfg;
  seq_cfg_t                    seq_cfg;
  logic                        rd_req, rd_valid, rd_busy;
  logic [IDXW-1:0]             rd_idx;
  logic [N_SIG-1:0]            rd_data;

  logic                        capturing, triggered, done, wrapped;
  psa_mode_e                   cur_mode;
  logic [IDXW-1:0]             last_idx, trig_idx;
  logic [STAMP_W-1:0]          trig_stamp, sync_count, sample_stamp;
  logic [N_SIG-1:0]            sample;
  logic                        sample_valid;
  logic                        trig_hit;

  psa_controller #(
    .N_SIG (N_SIG),
    .N_PAT (N_PAT),
    .IDXW  (IDXW),
    .RATE_W(RATE_W)
  ) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .reg_req      (reg_req),
    .reg_we       (reg_we),
    .reg_addr     (reg_addr),
    .reg_wdata    (reg_wdata),
    .reg_rdata    (reg_rdata),
    .irq          (irq),
    .start        (start),
    .stop         (stop),
    .force_trigger(force_trigger),
    .mode         (mode),
    .tpos         (tpos),
    .ext_trig_en  (ext_trig_en),
    .rate         (rate),
    .pat_value    (pat_value),
    .pat_mask     (pat_mask),
    .pat_mode     (pat_mode),
    .comb_cfg     (comb_cfg),
    .timer_cfg    (timer_cfg),
    .seq_cfg      (seq_cfg),
    .rd_req       (rd_req),
    .rd_idx       (rd_idx),
    .trig_hit     (trig_hit),
    .capturing    (capturing),
    .triggered    (triggered),
    .done         (done),
    .wrapped      (wrapped),
    .last_idx     (last_idx),
    .trig_idx     (trig_idx),
    .trig_stamp   (trig_stamp),
    .sync_count   (sync_count),
    .rd_data      (rd_data),
    .rd_valid     (rd_valid),
    .rd_busy      (rd_busy)
  );

  psa_sampler #(
    .N_SIG (N_SIG),
    .RATE_W(RATE_W)
  ) u_sampler (
    .clk         (clk),
    .rst_n       (rst_n),
    .restart     (start),
    .enable      (capturing),
    .rate        (rate),
    .wide_mode   (cur_mode == MODE_384),
    .pins        (pins),
    .sample      (sample),
    .sample_valid(sample_valid),
    .sample_stamp(sample_stamp),
    .sync_count  (sync_count)
  );

  psa_trigger_checker #(
    .N_SIG(N_SIG),
    .N_PAT(N_PAT)
  ) u_trig (
    .clk          (clk),
    .rst_n        (rst_n),
    .clear        (start),
    .armed        (capturing),
    .sample_valid (sample_valid),
    .sample       (sample),
    .pat_value    (pat_value),
    .pat_mask     (pat_mask),
    .pat_mode     (pat_mode),
    .timer_cfg    (timer_cfg),
    .seq_cfg      (seq_cfg),
    .comb_cfg     (comb_cfg),
    .ext_trigger  (ext_trigger),
    .ext_trig_en  (ext_trig_en),
    .force_trigger(force_trigger),
    .trig_hit     (trig_hit),
    .trigger_done (),
    .pat_match    (),
    .pat_valid    (),
    .timer_match  (),
    .seq_match    ()
  );

  psa_sram_if #(
    .N_SRAM (N_SRAM),
    .SRAM_W (SRAM_W),
    .SRAM_AW(SRAM_AW)
  ) u_sram_if (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .stop        (stop),
    .mode        (mode),
    .tpos        (tpos),
    .sample_valid(sample_valid),
    .sample      (sample),
    .sample_stamp(sample_stamp),
    .trig_hit    (trig_hit),
    .cur_mode    (cur_mode),
    .capturing   (capturing),
    .triggered   (triggered),
    .done        (done),
    .wrapped     (wrapped),
    .last_idx    (last_idx),
    .trig_idx    (trig_idx),
    .trig_stamp  (trig_stamp),
    .rd_req      (rd_req),
    .rd_idx      (rd_idx),
    .rd_data     (rd_data),
    .rd_valid    (rd_valid),
    .rd_busy     (rd_busy),
    .sram_addr   (sram_addr),
    .sram_we     (sram_we),
    .sram_wdata  (sram_wdata),
    .sram_rdata  (sram_rdata)
  );

endmodule
