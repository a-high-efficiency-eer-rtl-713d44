// pfm_pulse_gen: digital pulse generator of the light-load (DCM) mode.
//
// In DCM the converter is driven by pulse-frequency modulation: a switching
// cycle starts only when the output has fallen below the reference, Q1 (G1)
// stays on until the inductor current reaches a fixed peak, Q2 (G2) then
// stays on until the current has fallen to zero, and both switches stay off
// until the next cycle. Four comparator signals drive it:
//   cycle_start       Vout below Vref
//   peak              the current-sense ramp Vc has reached the peak level Vp
//   zero              Vc has returned to the zero level
//   forced_discharge  Vout too far above Vref: end the charge phase early
// Two S-R flip-flops and three gates make the pulses:
//   FF1 (G1): S = cycle_start,        R = peak OR forced_discharge
//   FF2 (G2): S = peak OR forced_discharge, R = cycle_start OR zero
//   S1 = NOR(G1, G2)
// S1 closes the switch that holds the current-sense capacitor at zero while
// both transistors are off, and releases it when a cycle begins.
//
// Interface and timing: the inputs must already be synchronous to `clk`.
// The flip-flops are clocked, each reset-dominant, so G1 and G2 follow their
// set and reset conditions one clock later, and S1 is combinational from
// them. With `en` low (CCM mode) both flip-flops are cleared. Reset clears
// both, so S1 starts high.
//
// From the design description: the two S-R flip-flops, the OR and NOR
// gates, their inputs and the sequence G1 -> G2 -> idle. This design's own
// choices: clocked flip-flops in place of the description's clockless
// latches, reset-dominant priority and the `en` input.
module pfm_pulse_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic cycle_start,
  input  logic peak,
  input  logic zero,
  input  logic forced_discharge,
  output logic g1,
  output logic g2,
  output logic s1
);
  logic r1, s2, r2;

  assign r1 = peak | forced_discharge;
  assign s2 = peak | forced_discharge;
  assign r2 = cycle_start | zero;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g1 <= 1'b0;
      g2 <= 1'b0;
    end else if (!en) begin
      g1 <= 1'b0;
      g2 <= 1'b0;
    end else begin
      if (r1)               g1 <= 1'b0;
      else if (cycle_start) g1 <= 1'b1;
      if (r2)               g2 <= 1'b0;
      else if (s2)          g2 <= 1'b1;
    end
  end

  assign s1 = ~(g1 | g2);
endmodule
