// dcdc_controller: dual-mode digital controller of the buck converter that
// supplies the DC part of the power-amplifier drain voltage.
//
// Heavy load, CCM: fixed 1 MHz switching. Once per period the window
// comparators (x, y) are sampled into the three-level error e(n)
// (error_gen), the table PID compensator turns the error history into the
// 9-bit duty command d(n) (pid_comp), and the hybrid DPWM produces the
// complementary gate pulses G1/G2 with duty d/512 (dpwm).
// Light load, DCM: pulse-frequency modulation; the pulse generator
// (pfm_pulse_gen) starts a cycle when Vout drops below Vref, ends the charge
// phase at the peak-current comparator and the discharge phase at the
// zero-current comparator, and drives the switch S1 of the current-sense
// ramp.
// Mode: CCM when the output is above the transition level Vtr (comparator
// input `vout_above_vtr`) OR the reference command is above it
// (`vref_code` > VTR_CODE); DCM otherwise. The mode is re-evaluated at the
// start of each DPWM period, so a CCM pulse is never cut short.
//
// All comparator inputs are asynchronous and pass through two-flip-flop
// synchronizers. `clk` is the DPWM slot tick (512 MHz for 1 MHz switching
// and 9 bits); every other rate is derived from it. The PID loop only
// samples errors in CCM and is frozen in DCM. On each change from DCM to
// CCM the duty command is preset to the steady-state duty Vout/Vin of the
// output the PFM loop was holding, estimated from the reference of the
// last DCM period (with the default parameters the reference full scale is
// taken to equal Vin = 5 V, so d = vref / 8); the PID then ramps the output
// to the new reference at one duty step per period and corrects any Vin
// mismatch. A step in duty would make the lightly damped output filter
// (Q = 50 with the 50 ohm load) ring for milliseconds, which the
// three-level loop cannot damp. After
// reset the command starts at its minimum for a soft start. In CCM S1 is
// held high (current-sense ramp at zero).
//
// From the design description: the CCM chain (error, table compensator,
// DPWM with S-R output), the PFM generator, the switch between the two
// pulse sources, the OR of the two transition comparisons and Vtr = 1.1 V.
// This design's own choices: the synchronizers, the period-aligned mode
// change, freezing the PID in DCM and presetting it on the return to CCM,
// and VTR_CODE, which assumes the reference code is converted with 5 V full
// scale (1.1 V -> 901). The compensator's d_valid strobe is left unused:
// the DPWM reads d continuously and takes it at the next period start.
module dcdc_controller
  import eer_pkg::*;
#(
  parameter logic [ENV_W-1:0] VTR_CODE     = 12'd901,
  parameter int unsigned      PRESET_NUM   = 1,   // Vfs/Vin as NUM / 2^SHIFT
  parameter int unsigned      PRESET_SHIFT = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ENV_W-1:0]  vref_code,         // reference command
  // analog comparator outputs (asynchronous)
  input  logic              cmp_x,             // Vout < Vref - Vq/2
  input  logic              cmp_y,             // Vout > Vref + Vq/2
  input  logic              vout_above_vtr,    // Vout > Vtr
  input  logic              cmp_cycle_start,   // Vout < Vref
  input  logic              cmp_peak,          // Vc >= Vp
  input  logic              cmp_zero,          // Vc <= Vz
  input  logic              cmp_forced,        // Vout far above Vref
  // gate drive
  output logic              g1,
  output logic              g2,
  output logic              s1,
  // status
  output mode_t             mode,
  output err_t              e,
  output logic [DUTY_W-1:0] d,
  output logic signed [DUTY_W-1:0] dc,        // last duty correction
  output logic              period_start,
  output logic              sys_tick           // system-rate (32 MHz) marker
);
  logic x_s, y_s, vtr_s, cs_s, pk_s, z_s, fd_s;
  logic ccm_entry;                 // DCM -> CCM at this period start
  logic [DUTY_W-1:0] d_ff;         // steady-state duty estimate
  logic [ENV_W+7:0]  d_ff_wide;
  logic [ENV_W-1:0]  vref_dcm;     // reference of the last DCM period

  sync_2ff #(.W(7)) u_sync (
    .clk  (clk),
    .rst_n(rst_n),
    .d    ({cmp_x, cmp_y, vout_above_vtr, cmp_cycle_start, cmp_peak, cmp_zero, cmp_forced}),
    .q    ({x_s, y_s, vtr_s, cs_s, pk_s, z_s, fd_s})
  );

  // CCM chain
  logic sample_strobe, e_valid, d_valid;
  logic pwm_g1, pwm_g2;

  error_gen u_err (
    .clk      (clk),
    .rst_n    (rst_n),
    .sample_en(sample_strobe && mode == MODE_CCM),
    .x        (x_s),
    .y        (y_s),
    .e        (e),
    .e_valid  (e_valid)
  );

  pid_comp u_pid (
    .clk    (clk),
    .rst_n  (rst_n),
    .e_valid (e_valid),
    .e       (e),
    .preset  (ccm_entry),
    .d_preset(d_ff),
    .d       (d),
    .d_valid(d_valid),   // d is also valid between strobes
    .dc     (dc)
  );

  dpwm u_dpwm (
    .clk          (clk),
    .rst_n        (rst_n),
    .d            (d),
    .g1           (pwm_g1),
    .g2           (pwm_g2),
    .period_start (period_start),
    .sys_tick     (sys_tick),
    .sample_strobe(sample_strobe)
  );

  // mode decision, applied at period boundaries
  logic ccm_req;
  assign ccm_req = vtr_s || (vref_code > VTR_CODE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            mode <= MODE_CCM;
    else if (period_start) mode <= ccm_req ? MODE_CCM : MODE_DCM;
  end

  // On the change from DCM to CCM the duty command restarts from the
  // steady-state duty of the voltage the PFM loop was holding, i.e. the
  // reference of the last DCM period: d = vref_dcm * 2^DUTY_W / 2^ENV_W *
  // PRESET_NUM / 2^PRESET_SHIFT (NUM = 1, SHIFT = 0 when the reference full
  // scale equals Vin). From there the PID ramps the output to the new
  // reference one duty step per period.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                vref_dcm <= '0;
    else if (period_start && mode == MODE_DCM) vref_dcm <= vref_code;
  end

  assign ccm_entry = period_start && ccm_req && (mode == MODE_DCM);
  assign d_ff_wide = ((ENV_W+8)'(vref_dcm) * (ENV_W+8)'(PRESET_NUM)) >> (ENV_W - DUTY_W + PRESET_SHIFT);
  assign d_ff      = (d_ff_wide > (ENV_W+8)'({DUTY_W{1'b1}})) ? {DUTY_W{1'b1}} : DUTY_W'(d_ff_wide);

  // DCM chain
  logic pfm_g1, pfm_g2, pfm_s1;

  pfm_pulse_gen u_pfm (
    .clk             (clk),
    .rst_n           (rst_n),
    .en              (mode == MODE_DCM),
    .cycle_start     (cs_s),
    .peak            (pk_s),
    .zero            (z_s),
    .forced_discharge(fd_s),
    .g1              (pfm_g1),
    .g2              (pfm_g2),
    .s1              (pfm_s1)
  );

  // pulse source switch
  always_comb begin
    if (mode == MODE_CCM) begin
      g1 = pwm_g1;
      g2 = pwm_g2;
      s1 = 1'b1;
    end else begin
      g1 = pfm_g1;
      g2 = pfm_g2;
      s1 = pfm_s1;
    end
  end
endmodule
