// psa_sram_if: stores samples in the external acquisition memory and reads
// them back.
//
// The acquisition memory is N_SRAM chips of SRAM_W bits x 2**SRAM_AW words
// that share one address bus; together they hold MEMW = N_SRAM*SRAM_W bits
// per address. Three operating modes trade signals for depth:
//   MODE_96  : MEMW/2 signals, two samples per address (low chips take
//              even samples, high chips odd ones): 2*2**SRAM_AW samples
//   MODE_192 : MEMW signals, one sample per address: 2**SRAM_AW samples
//   MODE_384 : 2*MEMW signals, one sample in two consecutive addresses
//              (low half first): 2**SRAM_AW/2 samples
// With the defaults (six 32-bit x 256k chips) that is 512k x 96, 256k x 192
// or 128k x 384.
//
// start latches mode and tpos (cur_mode reports the latched mode), clears
// the state and begins a capture at sample index 0. Every
// sample is written at the next index; after the last index the write
// pointer returns to 0 (wrapped is then set) and older samples are
// overwritten. The first trig_hit during the capture marks the last
// written sample as the trigger sample (trig_idx, trig_stamp) and the
// capture then stores a number of further samples given by the trigger
// position (depth-1, depth/2 or none) and stops with done set. stop ends a
// capture at once. last_idx is the index of the newest sample.
//
// After the capture, rd_req reads the sample at rd_idx; rd_data is valid
// with rd_valid two cycles later (three in MODE_384). Requests during a
// capture are ignored.
//
// Timing: the SRAM bus is driven combinationally from this block's state
// and sample_valid; the chips are taken as synchronous SRAMs that write at
// the clock edge and return read data one cycle after the address. In
// MODE_384 the second half of a sample is written in the cycle after the
// first, so samples must be at least two cycles apart (the sampler makes
// sure of this).
//
// Circular writing from address 0, stopping a trigger-position-dependent
// time after the trigger, the six 32-bit x 256k SRAMs and the three modes
// follow the published PSA. The packing of samples into addresses, the
// readback path, and the SRAM timing are this design's choices.
module psa_sram_if
  import psa_pkg::*;
#(
  parameter int unsigned N_SRAM  = 6,
  parameter int unsigned SRAM_W  = 32,
  parameter int unsigned SRAM_AW = 18,
  localparam int unsigned MEMW   = N_SRAM * SRAM_W,
  localparam int unsigned N_SIG  = 2 * MEMW,
  localparam int unsigned IDXW   = SRAM_AW + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // control
  input  logic                start,
  input  logic                stop,
  input  psa_mode_e           mode,
  input  trig_pos_e           tpos,
  // samples and trigger
  input  logic                sample_valid,
  input  logic [N_SIG-1:0]    sample,
  input  logic [STAMP_W-1:0]  sample_stamp,
  input  logic                trig_hit,
  // status (header information)
  output psa_mode_e           cur_mode,      // mode of the current capture
  output logic                capturing,
  output logic                triggered,
  output logic                done,
  output logic                wrapped,
  output logic [IDXW-1:0]     last_idx,
  output logic [IDXW-1:0]     trig_idx,
  output logic [STAMP_W-1:0]  trig_stamp,
  // readback
  input  logic                rd_req,
  input  logic [IDXW-1:0]     rd_idx,
  output logic [N_SIG-1:0]    rd_data,
  output logic                rd_valid,
  output logic                rd_busy,
  // external acquisition memory
  output logic [SRAM_AW-1:0]  sram_addr,
  output logic [N_SRAM-1:0]   sram_we,
  output logic [MEMW-1:0]     sram_wdata,
  input  logic [MEMW-1:0]     sram_rdata
);

  if (N_SRAM % 2 != 0) begin : g_bad_nsram
    $error("psa_sram_if: N_SRAM must be even");
  end

  localparam int unsigned HALF = MEMW / 2;

  psa_mode_e          mode_q;
  trig_pos_e          tpos_q;
  logic [IDXW-1:0]    wr_idx;
  logic [STAMP_W-1:0] last_stamp;
  logic [IDXW:0]      post_left;
  logic               hi_pend;
  logic [SRAM_AW-1:0] hi_addr;
  logic [MEMW-1:0]    hi_data;

  assign cur_mode = mode_q;

  // depth of the memory in samples, for the mode of the running capture
  logic [IDXW:0] depth;
  always_comb begin
    unique case (mode_q)
      MODE_96:  depth = (IDXW+1)'(1) << (SRAM_AW + 1);
      MODE_384: depth = (IDXW+1)'(1) << (SRAM_AW - 1);
      default:  depth = (IDXW+1)'(1) << SRAM_AW;
    endcase
  end

  // ---------------------------------------------------------------- capture
  logic          trig_ev;
  logic [IDXW:0] post_init;
  logic [IDXW:0] left_now;
  logic          limited;
  logic          do_write;
  logic          wrap_now;

  always_comb begin
    unique case (tpos_q)
      TPOS_START:  post_init = depth - 1'b1;
      TPOS_MIDDLE: post_init = depth >> 1;
      default:     post_init = '0;
    endcase
    trig_ev  = capturing && trig_hit && !triggered;
    limited  = trig_ev || triggered;
    left_now = trig_ev ? post_init : post_left;
    do_write = capturing && sample_valid && !(limited && left_now == '0);
    wrap_now = ({1'b0, wr_idx} == depth - 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q      <= MODE_192;
      tpos_q      <= TPOS_MIDDLE;
      capturing   <= 1'b0;
      triggered   <= 1'b0;
      done        <= 1'b0;
      wrapped     <= 1'b0;
      wr_idx      <= '0;
      last_idx    <= '0;
      trig_idx    <= '0;
      trig_stamp  <= '0;
      last_stamp  <= '0;
      post_left   <= '0;
    end else if (start) begin
      mode_q      <= mode;
      tpos_q      <= tpos;
      capturing   <= 1'b1;
      triggered   <= 1'b0;
      done        <= 1'b0;
      wrapped     <= 1'b0;
      wr_idx      <= '0;
      last_idx    <= '0;
      trig_idx    <= '0;
      trig_stamp  <= '0;
      post_left   <= '0;
    end else if (stop && capturing) begin
      capturing <= 1'b0;
      done      <= 1'b1;
    end else begin
      if (trig_ev) begin
        triggered  <= 1'b1;
        trig_idx   <= last_idx;
        trig_stamp <= last_stamp;
      end
      if (limited) begin
        post_left <= do_write ? left_now - 1'b1 : left_now;
        if (left_now == '0 || (do_write && left_now == (IDXW+1)'(1))) begin
          capturing <= 1'b0;
          done      <= 1'b1;
        end
      end
      if (do_write) begin
        last_idx    <= wr_idx;
        last_stamp  <= sample_stamp;
        wr_idx      <= wrap_now ? '0 : wr_idx + 1'b1;
        if (wrap_now) wrapped <= 1'b1;
      end
    end
  end

  // second half of a 384-signal sample goes out in the next cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi_pend <= 1'b0;
      hi_addr <= '0;
      hi_data <= '0;
    end else begin
      hi_pend <= do_write && (mode_q == MODE_384);
      if (do_write) begin
        hi_addr <= {wr_idx[SRAM_AW-2:0], 1'b1};
        hi_data <= sample[N_SIG-1:MEMW];
      end
    end
  end

  // --------------------------------------------------------------- readback
  typedef enum logic [1:0] {RD_IDLE, RD_A0, RD_A1, RD_HI} rd_state_e;
  rd_state_e          rd_st;
  logic [IDXW-1:0]    rd_idx_q;
  logic [SRAM_AW-1:0] rd_addr;
  logic [MEMW-1:0]    rd_lo;

  assign rd_busy = (rd_st != RD_IDLE);

  always_comb begin
    unique case (mode_q)
      MODE_96:  rd_addr = rd_idx_q[SRAM_AW:1];
      MODE_384: rd_addr = {rd_idx_q[SRAM_AW-2:0], (rd_st == RD_A1)};
      default:  rd_addr = rd_idx_q[SRAM_AW-1:0];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_st    <= RD_IDLE;
      rd_idx_q <= '0;
      rd_lo    <= '0;
      rd_data  <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      unique case (rd_st)
        RD_IDLE: if (rd_req && !capturing && !start) begin
          rd_idx_q <= rd_idx;
          rd_st    <= RD_A0;
        end
        RD_A0:   rd_st <= (mode_q == MODE_384) ? RD_A1 : RD_HI;
        RD_A1: begin
          rd_lo <= sram_rdata;
          rd_st <= RD_HI;
        end
        RD_HI: begin
          rd_st    <= RD_IDLE;
          rd_valid <= 1'b1;
          unique case (mode_q)
            MODE_96:  rd_data <= N_SIG'(rd_idx_q[0] ? sram_rdata[MEMW-1:HALF] : sram_rdata[HALF-1:0]);
            MODE_384: rd_data <= {sram_rdata, rd_lo};
            default:  rd_data <= N_SIG'(sram_rdata);
          endcase
        end
      endcase
    end
  end

  // ------------------------------------------------------------- SRAM bus
  always_comb begin
    sram_addr  = '0;
    sram_we    = '0;
    sram_wdata = sample[MEMW-1:0];
    if (hi_pend) begin
      sram_addr  = hi_addr;
      sram_we    = '1;
      sram_wdata = hi_data;
    end else if (do_write) begin
      unique case (mode_q)
        MODE_96: begin
          sram_addr  = wr_idx[SRAM_AW:1];
          sram_we    = wr_idx[0] ? {{(N_SRAM/2){1'b1}}, {(N_SRAM/2){1'b0}}}
                                 : {{(N_SRAM/2){1'b0}}, {(N_SRAM/2){1'b1}}};
          sram_wdata = {2{sample[HALF-1:0]}};
        end
        MODE_384: begin
          sram_addr  = {wr_idx[SRAM_AW-2:0], 1'b0};
          sram_we    = '1;
        end
        default: begin
          sram_addr  = wr_idx[SRAM_AW-1:0];
          sram_we    = '1;
        end
      endcase
    end else if (rd_st == RD_A0 || rd_st == RD_A1) begin
      sram_addr = rd_addr;
    end
  end

  // A 384-signal sample needs two bus cycles.
  a_wide_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    !(hi_pend && do_write));

endmodule
