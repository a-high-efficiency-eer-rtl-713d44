// sense_model: behavioural model of the analog sensing around the DC-DC
// controller (not synthesizable; for testbenches only).
//
// - reference DAC: vref = vref_code * VFS / 4095
// - window comparators of width VQ around vref: x = vout < vref - VQ/2,
//   y = vout > vref + VQ/2
// - transition comparator with hysteresis (relay) around VTR
// - cycle_start = vout < vref; forced = vout > vref + VGAP
// - current-sense ramp: while S1 is open the ramp voltage vc follows the
//   inductor current, vc = KV * il; while S1 is closed vc is held at zero.
//   peak = vc >= VP, zero = vc <= VZ.
// The comparator outputs are updated on every rising edge of `clk`.
module sense_model #(
  parameter real VFS  = 5.0,
  parameter real VQ   = 0.030,
  parameter real VTR  = 1.1,
  parameter real VHYS = 0.05,
  parameter real VGAP = 0.05,
  parameter real KV   = 0.6,
  parameter real VP   = 0.12,
  parameter real VZ   = -0.02
) (
  input  logic        clk,
  input  logic [11:0] vref_code,
  input  real         vout,
  input  real         il,
  input  logic        s1,
  output real         vref,
  output real         vc,
  output logic        cmp_x,
  output logic        cmp_y,
  output logic        vout_above_vtr,
  output logic        cmp_cycle_start,
  output logic        cmp_peak,
  output logic        cmp_zero,
  output logic        cmp_forced
);
  initial begin
    vref = 0.0; vc = 0.0;
    cmp_x = 1'b0; cmp_y = 1'b0; vout_above_vtr = 1'b0;
    cmp_cycle_start = 1'b0; cmp_peak = 1'b0; cmp_zero = 1'b0; cmp_forced = 1'b0;
  end

  always @(posedge clk) begin
    vref <= real'(vref_code) * VFS / 4095.0;
    vc   <= s1 ? 0.0 : KV * il;
    cmp_x <= vout < real'(vref_code) * VFS / 4095.0 - VQ / 2.0;
    cmp_y <= vout > real'(vref_code) * VFS / 4095.0 + VQ / 2.0;
    if (vout > VTR + VHYS)      vout_above_vtr <= 1'b1;
    else if (vout < VTR - VHYS) vout_above_vtr <= 1'b0;
    cmp_cycle_start <= vout < real'(vref_code) * VFS / 4095.0;
    cmp_forced      <= vout > real'(vref_code) * VFS / 4095.0 + VGAP;
    cmp_peak        <= !s1 && (KV * il >= VP);
    cmp_zero        <= !s1 && (KV * il <= VZ);
  end
endmodule
