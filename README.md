# Pin Signal Analyzer: a logic analyzer built into an FPGA emulation

When a system-on-chip is emulated with its software compiled natively on a
host PC and its hardware mapped into an FPGA that drives the real target
board, a simulator's waveform viewer is no longer available. The Pin Signal
Analyzer (PSA) restores that view. It is synthesized into the FPGA next to
the user's hardware and works like a bench logic analyzer:

- it samples a chosen set of pins at a programmable rate;
- it writes the samples round-robin into an external SRAM bank;
- it watches the samples for a trigger condition;
- when the trigger fires, it keeps recording for a set time and then stops.

The memory then holds a window of cycle-accurate history around the event.
The host reads the samples back, together with a few header registers, and
turns them into a waveform. A synchronization counter places the hardware
samples on the same time axis as trace records written by the host software.

This repository holds synthesizable SystemVerilog for the PSA and
self-checking testbenches for each part. The PSA structure comes from a
published description of an in-circuit SoC verification environment. That
description gives the PSA's sub-blocks, the memory organisation, the
structure of the trigger logic and the trigger-position behaviour. It leaves
out the register interface, the encodings and most widths. Those are this
design's own choices, and they are pointed out below where they matter.

## Structure

```
                 reg port / irq (to the host, through a transactor)
                          |
                 +--------+---------+
                 |  psa_controller  |  registers, header, readback buffer
                 +--+-----+------+--+
      rate,mode     |     | tpos | trigger configuration
   pins  +----------+--+  |  +---+-----------------+
  ------>| psa_sampler |--+->| psa_trigger_checker |<-- ext_trigger
         +------+------+  |  +----------+----------+
                | sample  |             | trig_hit
                v         v             v
              +-------------------------------+
              |          psa_sram_if          |
              +---------------+---------------+
                              | addr, we[5:0], wdata[191:0], rdata[191:0]
                   six external 32-bit x 256k SRAM chips
```

`psa_block` is the top level. The SRAM chips are not part of the RTL. Their
bus is brought out as ports: one shared 18-bit address, one write enable per
chip, 192-bit write data and 192-bit read data. The testbenches connect
`tb/sram_model.sv` there.

## Capture: circular memory, operating modes and trigger position

The six 32-bit chips give 192 bits per address. Three operating modes
(`psa_mode_e`) trade the number of signals against depth:

| mode       | signals stored  | samples (default memory) | layout                                          |
|------------|-----------------|--------------------------|-------------------------------------------------|
| `MODE_96`  | `pins[95:0]`    | 512k                     | even samples in chips 0-2, odd samples in chips 3-5 of one address |
| `MODE_192` | `pins[191:0]`   | 256k                     | one sample per address                          |
| `MODE_384` | `pins[383:0]`   | 128k                     | low half at address 2i, high half at 2i+1       |

A capture starts with the START bit. It latches the mode and the trigger
position and writes sample 0 at index 0. Each sample goes to the next index.
After the last index the pointer returns to 0, sets `wrapped` and overwrites
the oldest data. Recording goes on like this until the trigger.

The trigger sample is the newest sample already written when the trigger
event arrives. From then on, the trigger position (`trig_pos_e`) decides how
many more samples are stored before the capture stops (`done`):

| position      | samples after the trigger sample | window kept                         |
|---------------|----------------------------------|-------------------------------------|
| `TPOS_START`  | depth - 1                        | trigger sample first                |
| `TPOS_MIDDLE` | depth / 2                        | half before, half after (128k + 128k in `MODE_192`) |
| `TPOS_END`    | 0                                | everything before the trigger       |

Only the middle position is defined in the original description. The start
and end positions are added here in the way logic analyzers usually offer
them.

Three header values let software unroll the ring:

- `LAST_IDX` is the newest sample.
- `TRIG_IDX` is the trigger sample.
- `wrapped` says whether the entries after `LAST_IDX` hold older samples or
  were never written.

A STOP command ends a capture at once, without a trigger.

In `MODE_384` one sample needs two bus cycles. The second half is written in
the cycle after the first. The sampler therefore never samples faster than
every second clock in that mode. It uses the mode latched at start, so
rewriting CONFIG during a capture cannot break this rule. An assertion in
`psa_sram_if` checks it.

## Trigger condition checker

`psa_trigger_checker` follows the published block structure:

```
 sample ──> pattern checker 0..5 ──> pm0 pm1 | pm2 pm3 | pm4 pm5
 pm[sel] ──> timer ──────────────> timer match  ┐
 pm[...] ──> sequencer ──────────> seq match    ┘
   gate0(pm0,pm1)  gate1(pm2,pm3)  gate2(pm4,pm5)  gate3(timer,seq)   each AND or OR
        │               │               │               │
   on/off/inv      on/off/inv      on/off/inv      on/off/inv
        └───────────────┴──── last gate: AND or OR ─────┘
                                   │
  (ext_trigger AND ext_trig_en) ── OR ── force_trigger ──> trig_hit
```

**Pattern checker** (`psa_pattern_checker`). A sample *hits* when every bit
selected by the mask equals the reference value. The mode then decides the
match:

- `PM_LEVEL`: match while the samples hit.
- `PM_RISE`: match on the first sample that hits after one that did not.
- `PM_FALL`: match on the first sample that misses after one that hit.
- `PM_CHANGE`: match on either.

An edge on a single pin is a one-bit mask.

**Timer** (`psa_timer`). The timer starts on the first match of the pattern
selected by `start_sel`. The sample that starts it counts as elapsed time 0.
`timer match` goes high on the sample that is `ref_cnt` samples later and
stays high, because the counter saturates. It measures "N samples after
event X".

**Sequencer** (`psa_sequencer`). The sequencer takes up to four steps, each
naming a pattern match. Each time the expected match arrives, it advances by
at most one step per sample. Other matches neither advance it nor reset it.
`seq match` rises on the sample that completes the sequence and stays high.
This expresses "X, later Y, later Z".

**Combination** (`trig_comb_t`):

- Four two-input gates each act as AND or OR (`pair_and`).
- Every gate input has an enable (`in_en`). An AND gate ignores a disabled
  input, an OR gate sees it as 0, and a gate with no enabled input gives 0.
- Each gate output passes an on/off/inv stage (`term`). Terms that are off
  are left out of the last AND/OR gate (`final_and`).
- If every term is off, the pattern path never triggers.

With these settings a single match, a pair, a mix such as "timer elapsed AND
NOT pattern 5", or any combination of the eight signals can be chosen. The
input enables and the neutral handling of unused terms are this design's
additions. The original leaves open how a single signal is selected.

The original speaks of thirteen kinds of trigger condition but does not list
them. This design does not claim to match that list. The conditions above
cover levels, edges, delays, sequences and their combinations.

`trig_hit` fires at most once per capture. `trigger_done` then stays high
until the next start.

## Timing of one sample

| cycle | what happens                                                              |
|-------|---------------------------------------------------------------------------|
| t     | sampler tick: pins copied into `sample`                                   |
| t+1   | `sample_valid`: sample written to SRAM; pattern checkers evaluate it       |
| t+2   | pattern matches registered; timer, sequencer and combination give `trig_hit` for this sample; the SRAM interface records it as the trigger sample |

An external or forced trigger reaches `trig_hit` in the cycle it is seen. It
marks whatever sample was written last. The SRAM chips are modelled as
synchronous parts: a write lands at the clock edge, and read data comes one
cycle after the address. Register reads return data one cycle after the
request.

## Synchronization counter: placing samples next to software events

The sampler counts sampling ticks from reset, whether or not a capture runs.
This counter therefore advances at the sampling frequency `f_PSA`. The host
software time-stamps its own trace records with the CPU timer (frequency
`f_CPU`). To merge the two traces:

1. Read both counters at about the same moment t0. Read `SYNC_LO` first: it
   latches the high word into `SYNC_HI`.
2. Convert a CPU time stamp to the PSA time base:
   `counter_PSA(t) = counter_PSA(t0) + f_PSA / f_CPU * (timer_CPU(t) - timer_CPU(t0))`.
3. Find the counter value of each stored sample.
   `TSTAMP` holds the counter value of the trigger sample, and the samples
   are one tick apart. So sample index i has
   `TSTAMP + ((i - TRIG_IDX) mod depth)` if it lies after the trigger. Count
   back from `TSTAMP` for samples before it.

Latching `TSTAMP` at the trigger is this design's way of tying stored samples
to the counter.

The link to the software side works in both directions:

- The software can force the trigger by writing CTRL.force.
- The PSA raises `irq` when it triggers, if IRQ_EN is set. `irq` stays high
  until CTRL.irq_clear or the next start.

## Register map

The registers are 32-bit words at word addresses. The names are in `psa_pkg`.

| addr          | name          | access | contents |
|---------------|---------------|--------|----------|
| 0x000         | CTRL          | W      | bit0 start, bit1 force trigger, bit2 stop, bit3 clear irq (all one-cycle pulses) |
| 0x001         | CONFIG        | RW     | [1:0] mode, [3:2] trigger position, [4] external trigger enable, [5] irq enable |
| 0x002         | RATE          | RW     | one sample every RATE+1 clocks |
| 0x003         | STATUS        | R      | [0] capturing, [1] triggered, [2] done, [3] wrapped, [4] irq pending, [5] readback busy |
| 0x004         | LAST_IDX      | R      | newest sample index |
| 0x005         | TRIG_IDX      | R      | trigger sample index |
| 0x006 / 0x007 | SYNC_LO / HI  | R      | synchronization counter (reading LO latches HI) |
| 0x008 / 0x009 | TSTAMP_LO / HI| R      | counter value of the trigger sample |
| 0x00A         | COMB          | RW     | `trig_comb_t`: [3:0] pair_and, [11:4] in_en, [19:12] term (2 bits each: 0 off, 1 on, 2 inv), [20] final_and |
| 0x00B         | TIMER_SEL     | RW     | [2:0] pattern that starts the timer |
| 0x00C         | TIMER_REF     | RW     | samples to elapse |
| 0x00D         | SEQ           | RW     | `seq_cfg_t`: [2:0] length 1-4, then 3 bits per step, step 0 first |
| 0x00E         | RD_IDX        | RW     | writing starts a readback of that sample index |
| 0x010 + k     | RD_DATA       | R      | word k of the sample read back (low word first) |
| 0x100 + 0x40p + k        | pattern p value | RW | word k of the reference value |
| 0x100 + 0x40p + 0x10 + k | pattern p mask  | RW | word k of the mask (1 = compare) |
| 0x100 + 0x40p + 0x20     | pattern p mode  | RW | `pat_mode_e` |

A typical session goes like this:

1. Program the patterns, COMB, the timer and the sequencer.
2. Write CONFIG and RATE.
3. Write CTRL = 1 to start.
4. Wait for `irq` or for STATUS.done.
5. Read LAST_IDX, TRIG_IDX and TSTAMP.
6. For each index: write RD_IDX, wait until STATUS bit 5 is clear, then read
   the RD_DATA words.

The readback only runs while no capture is active.

## Files

| file | contents |
|------|----------|
| `rtl/psa_pkg.sv` | modes, trigger positions, pattern modes, configuration structs, register map |
| `rtl/psa_block.sv` | top level |
| `rtl/psa_controller.sv` | registers, interrupt, readback buffer |
| `rtl/psa_sampler.sv` | rate divider, synchronization counter |
| `rtl/psa_sram_if.sv` | circular writing, modes, trigger-position stop, readback |
| `rtl/psa_trigger_checker.sv` | pattern checkers, timer, sequencer, combination network |
| `rtl/psa_pattern_checker.sv`, `rtl/psa_timer.sv`, `rtl/psa_sequencer.sv` | trigger sub-blocks |
| `tb/sram_model.sv` | behavioural synchronous SRAM chip (simulation only) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_psa_full` and `tb_psa_mpeg2_capture` |

Parameters (defaults are the published sizes):

- `psa_block`: `N_SRAM` = 6 chips, `SRAM_W` = 32 bits, `SRAM_AW` = 18
  address bits, `N_PAT` = 6 pattern checkers.
- The number of observed pins is derived: `N_SIG = 2*N_SRAM*SRAM_W`.
- `N_SRAM` must be even.
- `N_PAT` must stay 6, because the combination network is drawn for six.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and ends. Each has a
cycle-count watchdog. They run with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/psa_pkg.sv rtl/*.sv \
          tb/sram_model.sv tb/tb_psa_block.sv --top-module tb_psa_block
./obj_dir/Vtb_psa_block
```

Substitute any other `tb_*` name as the top.

- `tb_psa_pattern_checker`, `tb_psa_timer`, `tb_psa_sequencer` and
  `tb_psa_trigger_checker` run random configurations and stimulus. They check
  every sample against a reference model written in the testbench.
- `tb_psa_sram_if` runs every mode × trigger position, before and after
  wrapping, with one sample per clock and with stop. After each capture it
  reads back every entry and checks it.
- `tb_psa_sampler` checks sample spacing and content at several rates, and
  the synchronization counter.
- `tb_psa_controller` checks every register, the pulses, the SYNC latch, the
  readback words and the interrupt.
- `tb_psa_block` is the end-to-end test, with a small memory (2 × 16-bit ×
  32 words), driven only through registers. It triggers on a level pattern,
  an edge, the timer, the sequencer combined with an inverted pattern, the
  external trigger (ignored while disabled) and the force command. It also
  stops a capture. It uses all modes, positions and rates above one, and the
  memory wraps. After each capture it checks the window from the header and
  from samples read back. Each mechanism is counted and must occur.
- `tb_psa_full` is one complete capture at the default size: 384 pins and
  6 × 32-bit × 256k SRAM. It triggers in the middle after the memory has
  wrapped, and checks the 128k samples kept on each side of the trigger.
- `tb_psa_mpeg2_capture` captures 111 active signals in the 192-signal mode
  at full size, the pin count of a published MPEG-2 decoder example.

## How far this follows the original, and what it leaves out

Taken from the published PSA:

- the five parts (controller, sampler, SRAM interface, trigger condition
  checker, external acquisition memory);
- six 32-bit × 256k SRAMs and the three modes 512k×96, 256k×192, 128k×384;
- circular writing from address 0;
- the stop after the trigger with the middle position, 128k samples on each
  side;
- the trigger checker's six pattern checkers, timer, sequencer, AND/OR
  gates, on/off/inv stages, external trigger with enable and force trigger;
- the header contents (last write address, trigger point, mode, rate);
- the synchronization counter at the sampling frequency;
- force-trigger from software and interrupt to software.

This design's own choices:

- the register bus and map;
- the value/mask/mode pattern format;
- counting the timer in samples;
- the sequencer's four steps and its no-reset rule;
- the gate input enables;
- the start and end trigger positions;
- how samples are packed into the SRAM;
- synchronous SRAM timing;
- the rate divider;
- the 64-bit counter and the trigger time stamp;
- an asynchronous active-low reset.

Not included:

- the transactor and host API that carry register accesses between PC and
  FPGA (their protocol is not specified);
- the software variable analyzer, which is instrumentation code in the host
  program;
- the waveform merging software;
- the user logic of the MPEG-2 example (flash, frame buffer and NTSC encoder
  interfaces);
- the exact list of thirteen trigger kinds.
