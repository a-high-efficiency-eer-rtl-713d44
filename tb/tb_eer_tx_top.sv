// tb_eer_tx_top: end-to-end test of the EER transmitter's digital part at
// its default parameters, closed around behavioural models of the buck
// power stage and the comparators.
//
// A synthetic baseband signal (one I/Q sample per 38.4 MHz clock) has a
// rotating phase and an envelope that swings +-30% around a mean level.
// The mean rises to the level of a 3 V drain-supply reference, falls to
// 1 V (light load) and rises to 3 V again, each change spread over
// 400-500 us (the CCM loop slews at most one duty step, about 10 mV, per
// period); a short burst is driven above the peak so that the envelope
// saturates at 4095.
// Checks:
//  - every envelope code (+-1) and phase code (exact away from rounding
//    boundaries) against floating-point values, and the 19-clock latency
//    from I/Q input to the registered codes
//  - env_ac = env_code - env_dc for every sample
//  - the reference seen by the controller follows env_dc
//  - CCM regulation of the buck output within 3 V +- 50 mV, DCM operation
//    near 1 V, and the return to CCM
// Mechanisms counted, each of which must happen at least once: reference
// transfers across the clock boundary, CCM->DCM and DCM->CCM changes, PFM
// cycles, forced discharges, envelope saturation, phase wrap-around and
// duty corrections of both signs.
module tb_eer_tx_top;
  import eer_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam int  LAT = 19;

  logic clk_s = 1'b0, clk_c = 1'b0, rst_s_n = 1'b0, rst_c_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [15:0] in_i = '0, in_q = '0;
  logic [17:0] env_gain = 18'd2048;            // peak 32767 -> 4095
  logic env_valid;
  logic [11:0] env_code, env_dc, vref_code;
  logic [4:0] phase_code;
  logic signed [12:0] env_ac;
  logic cmp_x, cmp_y, vout_above_vtr, cmp_cycle_start, cmp_peak, cmp_zero, cmp_forced;
  logic g1, g2, s1, period_start, sys_tick;
  mode_t mode;
  err_t  e;
  logic [8:0] d;
  logic signed [8:0] dc;
  real vout, il, vref, vc;
  int checks = 0, failures = 0;

  eer_tx_top dut (
    .clk_s(clk_s), .rst_s_n(rst_s_n), .in_valid(in_valid), .in_i(in_i), .in_q(in_q),
    .env_gain(env_gain), .env_valid(env_valid), .env_code(env_code),
    .phase_code(phase_code), .env_dc(env_dc), .env_ac(env_ac),
    .clk_c(clk_c), .rst_c_n(rst_c_n), .vref_code(vref_code),
    .cmp_x(cmp_x), .cmp_y(cmp_y), .vout_above_vtr(vout_above_vtr),
    .cmp_cycle_start(cmp_cycle_start), .cmp_peak(cmp_peak), .cmp_zero(cmp_zero),
    .cmp_forced(cmp_forced), .g1(g1), .g2(g2), .s1(s1), .mode(mode), .e(e), .d(d),
    .dc(dc), .period_start(period_start), .sys_tick(sys_tick));

  buck_model u_buck (.clk(clk_c), .g1(g1), .g2(g2), .vout(vout), .il(il));

  sense_model u_sense (
    .clk(clk_c), .vref_code(vref_code), .vout(vout), .il(il), .s1(s1), .vref(vref), .vc(vc),
    .cmp_x(cmp_x), .cmp_y(cmp_y), .vout_above_vtr(vout_above_vtr),
    .cmp_cycle_start(cmp_cycle_start), .cmp_peak(cmp_peak), .cmp_zero(cmp_zero),
    .cmp_forced(cmp_forced));

  always #0.9765625 clk_c = ~clk_c;      // 512 MHz slot tick
  always #13.0208333 clk_s = ~clk_s;     // 38.4 MHz sample clock

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- sample domain: stimulus and code checks ----------------
  int  exp_env [$];
  int  exp_ph [$];
  bit  exp_edge [$];
  int  n_in = 0, n_out = 0, first_in = -1, first_out = -1, scyc = 0;
  int  n_sat = 0, n_wrap = 0, last_ph = 0, n_refbad = 0;
  real mean_env = 0.0, phi = 0.0, t_s = 0.0;

  task automatic drive_sample();
    real r, a, ang, sf, mag, envr;
    int  i, q, ee;
    t_s += 1.0 / 38.4e6;
    r   = mean_env * (1.0 + 0.3 * $sin(2.0 * PI * 200.0e3 * t_s)
                          + 0.05 * (real'($urandom % 1000) / 500.0 - 1.0));
    phi = phi + 2.0 * PI * 1.3e6 / 38.4e6 + 0.2 * (real'($urandom % 1000) / 1000.0 - 0.5);
    if (phi >= 2.0 * PI) phi -= 2.0 * PI;
    a = r * 8.0;                            // envelope code -> I/Q LSBs at gain 1/8
    i = $rtoi(a * $cos(phi)); q = $rtoi(a * $sin(phi));
    if (i > 32767) i = 32767; if (i < -32767) i = -32767;
    if (q > 32767) q = 32767; if (q < -32767) q = -32767;
    in_valid = 1'b1; in_i = 16'(i); in_q = 16'(q);
    mag  = $sqrt(real'(i) * real'(i) + real'(q) * real'(q));
    envr = mag * 2048.0 / 16384.0;
    ee   = (envr > 4095.0) ? 4095 : $rtoi(envr + 0.5);
    ang  = $atan2(real'(q), real'(i));
    if (ang < 0.0) ang += 2.0 * PI;
    sf   = ang / (PI / 16.0);
    exp_env.push_back(ee);
    exp_ph.push_back($rtoi(sf + 0.5) % 32);
    exp_edge.push_back(((sf - $floor(sf)) > 0.48 && (sf - $floor(sf)) < 0.52) || mag < 40.0);
    if (first_in < 0) first_in = scyc;
    n_in++;
  endtask

  always @(negedge clk_s) begin
    if (rst_s_n) begin
      scyc++;
      if (env_valid) begin
        int de, dp, ee, pp;
        bit near;
        if (first_out < 0) begin
          first_out = scyc;
          check(first_out - first_in == LAT + 1, $sformatf("latency %0d", first_out - first_in - 1));
        end
        ee = exp_env.pop_front(); pp = exp_ph.pop_front(); near = exp_edge.pop_front();
        de = int'(env_code) - ee;
        check(de >= -1 && de <= 1, $sformatf("env %0d want %0d", env_code, ee));
        dp = (int'(phase_code) - pp + 32) % 32;
        check(dp == 0 || (near && (dp == 1 || dp == 31)), $sformatf("phase %0d want %0d", phase_code, pp));
        check(int'(env_ac) == int'(env_code) - int'(env_dc), "env_ac = env - dc");
        if (env_code == 12'd4095) n_sat++;
        if (phase_code < 5'd8 && last_ph > 24) n_wrap++;
        last_ph = int'(phase_code);
        n_out++;
      end
    end
  end

  // ---------------- controller domain: event counters ----------------
  int n_ccm2dcm = 0, n_dcm2ccm = 0, n_pfm = 0, n_forced = 0, n_up = 0, n_down = 0, n_xfer = 0;
  mode_t mode_q = MODE_CCM;
  logic g1_q = 1'b0, fd_q = 1'b0;
  logic [11:0] vref_q = '0;
  int n_overlap = 0;

  always @(posedge clk_c) begin
    if (rst_c_n) begin
      if (g1 && g2) n_overlap++;
      if (mode != mode_q) begin
        if (mode == MODE_DCM) n_ccm2dcm++; else n_dcm2ccm++;
      end
      if (mode == MODE_DCM && g1 && !g1_q) n_pfm++;
      if (mode == MODE_DCM && dut.u_ctl.fd_s && !fd_q) n_forced++;
      if (dut.u_ctl.e_valid && dc > 0) n_up++;
      if (dut.u_ctl.e_valid && dc < 0) n_down++;
      if (vref_code != vref_q) n_xfer++;
      // the reference seen by the controller stays close to env_dc
      if (vref_code > env_dc + 12'd8 || env_dc > vref_code + 12'd8) n_refbad++;
    end
    mode_q <= mode; g1_q <= g1; fd_q <= dut.u_ctl.fd_s; vref_q <= vref_code;
  end

  task automatic run_us(int us);
    repeat (us * 384 / 10) begin
      @(posedge clk_s);
      #1 drive_sample();
    end
  endtask

  // mean envelope moves linearly between two drain-supply levels (volts)
  task automatic ramp_mean(real v0, real v1, int us);
    for (int k = 0; k < us; k++) begin
      mean_env = (v0 + (v1 - v0) * real'(k) / real'(us)) * 4095.0 / 5.0;
      run_us(1);
    end
    mean_env = v1 * 4095.0 / 5.0;
  endtask

  initial begin
    real vmin, vmax;
    repeat (4) @(posedge clk_s);
    rst_s_n = 1'b1; rst_c_n = 1'b1;
    // heavy load: the mean envelope rises to the level of a 3 V reference
    ramp_mean(0.3, 3.0, 500);
    run_us(500);
    vmin = 10.0; vmax = -10.0;
    repeat (100) begin
      run_us(1);
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
    end
    $display("3 V: vref_code %0d, Vout %f .. %f, mode %s", vref_code, vmin, vmax, mode.name());
    check(mode == MODE_CCM, "CCM at 3 V");
    check(vmin > 2.95 && vmax < 3.05, "Vout regulated near 3 V");
    check(vout > vref - 0.05 && vout < vref + 0.05, "Vout within 50 mV of the reference");
    // short overdrive burst: the envelope clips at full scale
    mean_env = 4095.0 * 1.2;
    run_us(1);
    // light load: the mean envelope falls to the level of a 1 V reference
    ramp_mean(3.0, 1.0, 400);
    run_us(400);
    $display("1 V: vref_code %0d, Vout %f, mode %s, PFM %0d", vref_code, vout, mode.name(), n_pfm);
    check(mode == MODE_DCM, "DCM at 1 V");
    check(vout > vref - 0.1 && vout < vref + 0.15, "Vout near the light-load reference");
    // heavy load again
    ramp_mean(1.0, 3.0, 400);
    run_us(400);
    vmin = 10.0; vmax = -10.0;
    repeat (100) begin
      run_us(1);
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
    end
    $display("3 V again: Vout %f .. %f, Vref %f, mode %s", vmin, vmax, vref, mode.name());
    check(mode == MODE_CCM, "CCM again");
    check(vmin > 2.95 && vmax < 3.05, "Vout regulated again");
    @(posedge clk_s);
    #1 in_valid = 1'b0;
    repeat (LAT + 4) @(posedge clk_s);
    check(n_out == n_in && n_out > 50000, $sformatf("outputs %0d of %0d inputs", n_out, n_in));
    $display("events: xfer %0d ccm->dcm %0d dcm->ccm %0d pfm %0d forced %0d up %0d down %0d sat %0d wrap %0d",
             n_xfer, n_ccm2dcm, n_dcm2ccm, n_pfm, n_forced, n_up, n_down, n_sat, n_wrap);
    check(n_xfer > 100, "reference transfers across the clock boundary");
    check(n_refbad == 0, $sformatf("controller reference tracks env_dc (%0d misses)", n_refbad));
    check(n_ccm2dcm > 0, "CCM to DCM change happened");
    check(n_dcm2ccm > 0, "DCM to CCM change happened");
    check(n_pfm > 5, "PFM cycles happened");
    check(n_forced > 0, "forced discharge happened");
    check(n_up > 0 && n_down > 0, "duty corrections of both signs happened");
    check(n_sat > 0, "envelope saturation happened");
    check(n_wrap > 0, "phase wrap-around happened");
    check(n_overlap == 0, "G1 and G2 never both high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
