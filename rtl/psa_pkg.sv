// psa_pkg: types and constants shared by the Pin Signal Analyzer (PSA).
//
// The PSA records the pins of a hardware design running in an FPGA into
// external SRAM around a trigger event. This package holds the operating
// modes of the acquisition memory, the trigger-position choices, the pattern
// checker match modes, the configuration records of the trigger condition
// checker and the host register map of the controller.
//
// The three operating modes (96, 192 or 384 signals per sample) and the
// building blocks of the trigger checker (six pattern checkers, a timer, a
// sequencer, AND/OR gates, on/off/inv stages, external and force trigger)
// follow the published PSA. Encodings, field layouts, the number of
// sequencer steps and the register addresses are this design's own choices.
package psa_pkg;

  // Acquisition memory organisation: how many signals one sample holds.
  // With six 32-bit SRAMs (192 bits per address) a 96-signal sample takes
  // half an address, a 192-signal sample one address, a 384-signal sample
  // two consecutive addresses.
  typedef enum logic [1:0] {
    MODE_192 = 2'd0,
    MODE_96  = 2'd1,
    MODE_384 = 2'd2
  } psa_mode_e;

  // Where the trigger sample ends up in the stored window.
  //   TPOS_START  : the trigger sample and depth-1 samples after it
  //   TPOS_MIDDLE : depth/2 samples after the trigger sample
  //   TPOS_END    : recording stops right after the trigger sample
  typedef enum logic [1:0] {
    TPOS_START  = 2'd0,
    TPOS_MIDDLE = 2'd1,
    TPOS_END    = 2'd2
  } trig_pos_e;

  // Pattern checker: "hit" means every unmasked bit equals the reference.
  //   PM_LEVEL  : match while the sample hits
  //   PM_RISE   : match on the first sample that hits after one that did not
  //   PM_FALL   : match on the first sample that misses after one that hit
  //   PM_CHANGE : match on either of the two above
  typedef enum logic [1:0] {
    PM_LEVEL  = 2'd0,
    PM_RISE   = 2'd1,
    PM_FALL   = 2'd2,
    PM_CHANGE = 2'd3
  } pat_mode_e;

  // The on/off/inv stage after each first-level gate.
  typedef enum logic [1:0] {
    TERM_OFF = 2'd0,
    TERM_ON  = 2'd1,
    TERM_INV = 2'd2
  } term_ctl_e;

  localparam int unsigned SEQ_STEPS = 4;   // steps in the sequencer reference
  localparam int unsigned TIMER_W   = 32;  // timer counter and reference width
  localparam int unsigned STAMP_W   = 64;  // synchronization counter width

  // Trigger combination. Gate g (0..2) joins pattern matches 2g and 2g+1,
  // gate 3 joins the timer match and the sequencer match. in_en bits:
  // 0..5 pattern matches, 6 timer match, 7 sequencer match.
  typedef struct packed {
    logic            final_and;  // 1: last gate is AND, 0: OR
    term_ctl_e [3:0] term;       // on/off/inv for each first-level gate
    logic [7:0]      in_en;      // which inputs take part
    logic [3:0]      pair_and;   // 1: first-level gate is AND, 0: OR
  } trig_comb_t;

  typedef struct packed {
    logic [2:0]         start_sel;  // pattern match that starts the timer
    logic [TIMER_W-1:0] ref_cnt;    // samples to elapse after the start
  } timer_cfg_t;

  typedef struct packed {
    logic [SEQ_STEPS-1:0][2:0] sel;  // pattern match expected at each step
    logic [2:0]                len;  // number of steps used, 1..SEQ_STEPS
  } seq_cfg_t;

  // Host register map (word addresses).
  localparam logic [11:0] REG_CTRL      = 12'h000;  // W: 0 start, 1 force, 2 stop, 3 irq clear
  localparam logic [11:0] REG_CONFIG    = 12'h001;  // RW: [1:0] mode, [3:2] trig pos, [4] ext en, [5] irq en
  localparam logic [11:0] REG_RATE      = 12'h002;  // RW: one sample every RATE+1 clocks
  localparam logic [11:0] REG_STATUS    = 12'h003;  // R: capturing, triggered, done, wrapped, irq, rd busy
  localparam logic [11:0] REG_LAST_IDX  = 12'h004;  // R: last written sample index
  localparam logic [11:0] REG_TRIG_IDX  = 12'h005;  // R: index of the trigger sample
  localparam logic [11:0] REG_SYNC_LO   = 12'h006;  // R: sync counter, low word (latches high word)
  localparam logic [11:0] REG_SYNC_HI   = 12'h007;  // R: sync counter, high word latched by SYNC_LO
  localparam logic [11:0] REG_TSTAMP_LO = 12'h008;  // R: sync counter of the trigger sample
  localparam logic [11:0] REG_TSTAMP_HI = 12'h009;
  localparam logic [11:0] REG_COMB      = 12'h00A;  // RW: trig_comb_t
  localparam logic [11:0] REG_TIMER_SEL = 12'h00B;  // RW: timer start pattern
  localparam logic [11:0] REG_TIMER_REF = 12'h00C;  // RW: timer reference count
  localparam logic [11:0] REG_SEQ       = 12'h00D;  // RW: seq_cfg_t
  localparam logic [11:0] REG_RD_IDX    = 12'h00E;  // W: read sample back; R: its index
  localparam logic [11:0] REG_RD_DATA   = 12'h010;  // R: 0x010.. readback words
  localparam logic [11:0] REG_PAT_BASE  = 12'h100;  // pattern p: base + 0x40*p
  localparam logic [5:0]  PAT_VALUE_OFS = 6'h00;    //   + k : reference value word k
  localparam logic [5:0]  PAT_MASK_OFS  = 6'h10;    //   + k : mask word k (1 = compare)
  localparam logic [5:0]  PAT_MODE_OFS  = 6'h20;    //   pat_mode_e

endpackage
