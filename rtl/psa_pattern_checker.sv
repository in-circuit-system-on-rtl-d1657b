// psa_pattern_checker: compares each sample with a reference pattern or edge.
//
// A sample "hits" when every bit selected by pat_mask equals the same bit of
// pat_value. In PM_LEVEL mode the checker matches while samples hit; in the
// edge modes it matches on the sample where the hit condition starts
// (PM_RISE), ends (PM_FALL) or changes (PM_CHANGE), so an edge on a single
// pin is a one-bit mask. The checker remembers whether the previous sample
// hit; after clear no edge can match until one sample has been seen.
//
// Timing: the sample is evaluated in the cycle sample_valid is high; match
// is registered and is valid, for that sample, in the next cycle, marked by
// match_valid. match keeps its value until the next sample.
//
// Comparing the sampled signals with a reference pattern or edge and
// raising a "pattern match" signal follows the published PSA; the
// value/mask/mode form of the reference is this design's choice.
module psa_pattern_checker
  import psa_pkg::*;
#(
  parameter int unsigned N_SIG = 384
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,         // forget history, drop match
  input  logic             sample_valid,
  input  logic [N_SIG-1:0] sample,
  input  logic [N_SIG-1:0] pat_value,
  input  logic [N_SIG-1:0] pat_mask,
  input  pat_mode_e        pat_mode,
  output logic             match,
  output logic             match_valid
);

  logic hit;
  logic prev_hit;
  logic have_prev;
  logic match_d;

  assign hit = ((sample ^ pat_value) & pat_mask) == '0;

  always_comb begin
    unique case (pat_mode)
      PM_LEVEL:  match_d = hit;
      PM_RISE:   match_d = have_prev && hit && !prev_hit;
      PM_FALL:   match_d = have_prev && !hit && prev_hit;
      PM_CHANGE: match_d = have_prev && (hit != prev_hit);
      default:   match_d = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_hit    <= 1'b0;
      have_prev   <= 1'b0;
      match       <= 1'b0;
      match_valid <= 1'b0;
    end else if (clear) begin
      prev_hit    <= 1'b0;
      have_prev   <= 1'b0;
      match       <= 1'b0;
      match_valid <= 1'b0;
    end else begin
      match_valid <= sample_valid;
      if (sample_valid) begin
        prev_hit  <= hit;
        have_prev <= 1'b1;
        match     <= match_d;
      end
    end
  end

endmodule
