// threshold: amplitude and phase decision with hysteresis.
//
// On each th_en (once per sample period) the block updates two flags.
// amp_ok: the rail amplitude must rise to AMP_ON to set it and fall below
// AMP_OFF to clear it; between the two it keeps its value. phase_ok: the
// phase difference delta = rail_phase - ref_phase (9-bit, wrapping, two's
// complement, 1/512 turn per LSB) must lie inside [PH_LO + PH_HYST,
// PH_HI - PH_HYST] to set it and leave [PH_LO, PH_HI] to clear it. The track
// is free only when both flags are set; the AND is done by the caller.
//
// That there are two amplitude thresholds forming a hysteresis, and a phase
// range with hysteresis, is published; the threshold values are not. The
// defaults here are this design's: AMP_ON/AMP_OFF at about 25 % and 20 % of
// the CORDIC amplitude of a full-scale input (about 120000), and a window of
// 90 +- 30 degrees with a 4 degree hysteresis, since the reference supply is
// 90 degrees from the rail supply. Both flags reset to 0 (occupied), the safe
// state.
//
// Timing: flags and delta are registered; they change in the cycle after
// th_en.
module threshold
  import psr_pkg::*;
#(
  parameter amp_t   AMP_ON  = 20'd30000,
  parameter amp_t   AMP_OFF = 20'd24000,
  parameter phase_t PH_LO   = 9'sd85,
  parameter phase_t PH_HI   = 9'sd171,
  parameter phase_t PH_HYST = 9'sd6
) (
  input  logic   clk,
  input  logic   reset,
  input  logic   th_en,
  input  amp_t   rail_amp,
  input  phase_t ref_phase,
  input  phase_t rail_phase,
  output logic   amp_ok,
  output logic   phase_ok,
  output phase_t delta
);
  phase_t d;
  assign d = rail_phase - ref_phase;

  always_ff @(posedge clk) begin
    if (reset) begin
      amp_ok   <= 1'b0;
      phase_ok <= 1'b0;
      delta    <= '0;
    end else if (th_en) begin
      delta <= d;
      if (rail_amp >= AMP_ON)      amp_ok <= 1'b1;
      else if (rail_amp < AMP_OFF) amp_ok <= 1'b0;
      if (d >= PH_LO + PH_HYST && d <= PH_HI - PH_HYST) phase_ok <= 1'b1;
      else if (d < PH_LO || d > PH_HI)                  phase_ok <= 1'b0;
    end
  end

  initial begin
    assert (AMP_OFF <= AMP_ON) else $error("AMP_OFF must not exceed AMP_ON");
    assert (PH_LO + PH_HYST <= PH_HI - PH_HYST) else $error("phase window narrower than its hysteresis");
  end
endmodule
