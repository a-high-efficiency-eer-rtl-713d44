// eer_tx_top: digital part of an envelope-elimination-and-restoration (EER)
// transmitter.
//
// The transmitter amplifies a constant-envelope, phase-modulated carrier in
// a switching (class-E) power amplifier and restores the envelope by
// modulating the amplifier's drain supply. This block does the digital
// work: it converts each baseband I/Q sample into a 12-bit envelope code
// (for the envelope DAC and linear amplifier) and a 5-bit phase code (for
// the digitally controlled phase shifter), splits the envelope into its DC
// part and the AC remainder, and uses the DC part as the reference command
// of a buck DC-DC converter that supplies the bulk of the drain voltage.
// The converter controller runs in CCM (PID + 9-bit DPWM at 1 MHz) or in
// DCM (pulse-frequency modulation) depending on the load level.
//
// Clocks: `clk_s` is the sample clock (38.4 MHz, one I/Q sample per clock
// when `in_valid` is high); `clk_c` is the DPWM slot tick (512 MHz), from
// which the controller derives its 32 MHz system rate and the 1 MHz
// switching period. The DC reference crosses from clk_s to clk_c through a
// toggle handshake (cdc_word). Each clock has its own active-low reset.
//
// Timing: envelope and phase codes come out together, CORDIC_ITER + 4
// sample clocks after the I/Q sample; env_dc/env_ac one clock later. The
// reference reaches the controller a few cycles of each clock after that.
// The analog parts (envelope DAC, filter, linear amplifier, summing node,
// phase shifter, class-E amplifier, the buck power stage, the reference DAC
// and all comparators) are outside this block: their digital signals are
// the ports below.
//
// From the design description: the partition into envelope and phase
// paths, the 12-bit/5-bit codes, the DC reference taken from the envelope
// and the dual-mode controller. This design's own choices: the two-clock
// structure and the clock-crossing handshake. The handshake's update strobe
// is left open: the controller reads vref_code continuously.
module eer_tx_top
  import eer_pkg::*;
#(
  parameter int unsigned IQ_W      = 16,
  parameter int unsigned GAIN_W    = 18,
  parameter int unsigned GAIN_FRAC = 14
) (
  // sample clock domain
  input  logic                   clk_s,
  input  logic                   rst_s_n,
  input  logic                   in_valid,
  input  logic signed [IQ_W-1:0] in_i,
  input  logic signed [IQ_W-1:0] in_q,
  input  logic [GAIN_W-1:0]      env_gain,     // 4095/peak, GAIN_FRAC bits
  output logic                   env_valid,
  output logic [ENV_W-1:0]       env_code,     // to the envelope DAC
  output logic [PH_W-1:0]        phase_code,   // to the phase shifter
  output logic [ENV_W-1:0]       env_dc,       // DC part of the envelope
  output logic signed [ENV_W:0]  env_ac,       // AC part of the envelope
  // controller clock domain
  input  logic                   clk_c,
  input  logic                   rst_c_n,
  output logic [ENV_W-1:0]       vref_code,    // to the reference DAC
  input  logic                   cmp_x,
  input  logic                   cmp_y,
  input  logic                   vout_above_vtr,
  input  logic                   cmp_cycle_start,
  input  logic                   cmp_peak,
  input  logic                   cmp_zero,
  input  logic                   cmp_forced,
  output logic                   g1,
  output logic                   g2,
  output logic                   s1,
  output mode_t                  mode,
  output err_t                   e,
  output logic [DUTY_W-1:0]      d,
  output logic signed [DUTY_W-1:0] dc,         // last duty correction
  output logic                   period_start,
  output logic                   sys_tick
);
  logic                pol_valid;
  logic [ENV_W-1:0]    pol_env;
  logic [PH_W-1:0]     pol_phase;
  logic [PH_W-1:0]     phase_d;

  polar_extract #(
    .IQ_W     (IQ_W),
    .GAIN_W   (GAIN_W),
    .GAIN_FRAC(GAIN_FRAC)
  ) u_polar (
    .clk       (clk_s),
    .rst_n     (rst_s_n),
    .in_valid  (in_valid),
    .in_i      (in_i),
    .in_q      (in_q),
    .env_gain  (env_gain),
    .out_valid (pol_valid),
    .env_code  (pol_env),
    .phase_code(pol_phase)
  );

  envelope_split u_split (
    .clk      (clk_s),
    .rst_n    (rst_s_n),
    .in_valid (pol_valid),
    .env_in   (pol_env),
    .out_valid(env_valid),
    .env_out  (env_code),
    .env_dc   (env_dc),
    .env_ac   (env_ac)
  );

  // keep the phase code aligned with the registered envelope outputs
  always_ff @(posedge clk_s or negedge rst_s_n) begin
    if (!rst_s_n)       phase_d <= '0;
    else if (pol_valid) phase_d <= pol_phase;
  end
  assign phase_code = phase_d;

  cdc_word #(.W(ENV_W)) u_cdc (
    .src_clk  (clk_s),
    .src_rst_n(rst_s_n),
    .src_data (env_dc),
    .dst_clk  (clk_c),
    .dst_rst_n(rst_c_n),
    .dst_data (vref_code),
    .dst_upd  ()
  );

  dcdc_controller u_ctl (
    .clk            (clk_c),
    .rst_n          (rst_c_n),
    .vref_code      (vref_code),
    .cmp_x          (cmp_x),
    .cmp_y          (cmp_y),
    .vout_above_vtr (vout_above_vtr),
    .cmp_cycle_start(cmp_cycle_start),
    .cmp_peak       (cmp_peak),
    .cmp_zero       (cmp_zero),
    .cmp_forced     (cmp_forced),
    .g1             (g1),
    .g2             (g2),
    .s1             (s1),
    .mode           (mode),
    .e              (e),
    .d              (d),
    .dc             (dc),
    .period_start   (period_start),
    .sys_tick       (sys_tick)
  );
endmodule
