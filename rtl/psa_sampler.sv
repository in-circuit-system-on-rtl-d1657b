// psa_sampler: samples the observed pins at the programmed sampling rate.
//
// A divider produces one sampling tick every rate+1 clock cycles (every
// cycle for rate = 0). On a tick the pins are copied into sample and, while
// the capture is enabled, sample_valid is raised for one cycle; the copy
// then goes both to the SRAM interface and to the trigger condition checker.
// In the 384-signal mode one sample takes two SRAM writes, so the period is
// never shorter than two cycles there.
//
// The synchronization counter counts ticks from reset, whether or not a
// capture runs, so it advances at the sampling frequency; sample_stamp is
// its value for the sample now held. Software relates it to the CPU timer
// through counter(t) - counter(t0) = freq_PSA / freq_CPU * (timer(t) - timer(t0)).
// restart realigns the divider so the first tick comes on the cycle after.
//
// Timing: sample and sample_valid are registered; they change one cycle
// after the tick decision.
//
// Sampling at a programmable rate and the synchronization counter follow
// the published PSA; the divider form, the counter width and the two-cycle
// minimum in the 384-signal mode are this design's choices.
module psa_sampler
  import psa_pkg::*;
#(
  parameter int unsigned N_SIG  = 384,
  parameter int unsigned RATE_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               restart,
  input  logic               enable,       // capture running
  input  logic [RATE_W-1:0]  rate,         // period - 1, in clock cycles
  input  logic               wide_mode,    // 384-signal mode: period >= 2
  input  logic [N_SIG-1:0]   pins,
  output logic [N_SIG-1:0]   sample,
  output logic               sample_valid,
  output logic [STAMP_W-1:0] sample_stamp,
  output logic [STAMP_W-1:0] sync_count
);

  logic [RATE_W-1:0] div;
  logic [RATE_W-1:0] last;
  logic              tick;

  assign last = (wide_mode && rate == '0) ? RATE_W'(1) : rate;
  assign tick = (div == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div          <= '0;
      sample       <= '0;
      sample_valid <= 1'b0;
      sample_stamp <= '0;
      sync_count   <= '0;
    end else begin
      sample_valid <= 1'b0;
      if (restart) begin
        div <= '0;
      end else begin
        div <= (div >= last) ? '0 : div + 1'b1;
        if (tick) begin
          sample       <= pins;
          sample_valid <= enable;
          sample_stamp <= sync_count;
          sync_count   <= sync_count + 1'b1;
        end
      end
    end
  end

endmodule
