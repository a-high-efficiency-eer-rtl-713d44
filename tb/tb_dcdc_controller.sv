// tb_dcdc_controller: closed-loop test of the dual-mode DC-DC controller
// with behavioural models of the buck power stage (5 V in, 10 uH, 10 uF,
// 50 ohm) and of the comparators.
//
// Phases (times in switching periods of 1 us):
//  1. Vref = 3 V from a cold start: CCM. Vout must first reach the window
//     between 200 and 450 us (a soft-start ramp of one duty step per
//     period), then stay within 3 V +- 50 mV for the last 100 us, with the
//     error at 0 in most periods; the period must be 512 ticks.
//  2. Vref = 1 V: the controller must leave CCM once Vout has fallen below
//     the transition level, then hold Vout within 0.9..1.15 V with
//     discontinuous PFM pulses (periods with both switches off).
//  3. Vref ramps from 1 V to 0.6 V within 100 us: the forced-discharge
//     path must fire and Vout must follow to within 0.1 V.
//  4. Vref = 2.5 V: back to CCM and regulation within 2.5 V +- 50 mV.
// Counts how often each mechanism happened (both mode changes, PFM cycles,
// forced discharges, positive and negative duty corrections, idle DCM
// periods) and fails any that never happened. The gate signals must never
// both be high. In every whole CCM period G1 must be high for exactly the
// duty command present at its start, with G2 its complement and S1 high;
// in DCM S1 must be NOR(G1, G2).
module tb_dcdc_controller;
  import eer_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [11:0] vref_code = '0;
  logic cmp_x, cmp_y, vout_above_vtr, cmp_cycle_start, cmp_peak, cmp_zero, cmp_forced;
  logic g1, g2, s1, period_start, sys_tick;
  mode_t mode;
  err_t  e;
  logic [8:0] d;
  logic signed [8:0] dc;
  real vout, il, vref, vc;
  int checks = 0, failures = 0;

  dcdc_controller dut (
    .clk(clk), .rst_n(rst_n), .vref_code(vref_code),
    .cmp_x(cmp_x), .cmp_y(cmp_y), .vout_above_vtr(vout_above_vtr),
    .cmp_cycle_start(cmp_cycle_start), .cmp_peak(cmp_peak), .cmp_zero(cmp_zero),
    .cmp_forced(cmp_forced), .g1(g1), .g2(g2), .s1(s1), .mode(mode), .e(e), .d(d),
    .dc(dc), .period_start(period_start), .sys_tick(sys_tick));

  buck_model u_buck (.clk(clk), .g1(g1), .g2(g2), .vout(vout), .il(il));

  sense_model u_sense (
    .clk(clk), .vref_code(vref_code), .vout(vout), .il(il), .s1(s1), .vref(vref), .vc(vc),
    .cmp_x(cmp_x), .cmp_y(cmp_y), .vout_above_vtr(vout_above_vtr),
    .cmp_cycle_start(cmp_cycle_start), .cmp_peak(cmp_peak), .cmp_zero(cmp_zero),
    .cmp_forced(cmp_forced));

  always #0.9765625 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [11:0] code_of(real v);
    return 12'($rtoi(v * 4095.0 / 5.0 + 0.5));
  endfunction

  // event counters
  int n_ccm2dcm = 0, n_dcm2ccm = 0, n_pfm = 0, n_forced = 0, n_up = 0, n_down = 0;
  int n_idle = 0, n_overlap = 0, tick = 0, last_ps = -1, n_badper = 0;
  mode_t mode_q = MODE_CCM;
  logic g1_q = 1'b0, fd_q = 1'b0;
  logic busy_in_period = 1'b0;
  // per-period checks of the gate signals
  int hi_cnt = 0, d_per = -1, n_per_ok = 0, bad_s1 = 0;
  mode_t mode_per = MODE_CCM, mode_prev = MODE_DCM;

  always @(posedge clk) begin
    tick++;
    if (g1 && g2) n_overlap++;
    if (g1 && rst_n) hi_cnt++;
    if (mode != mode_q) begin
      if (mode == MODE_DCM) n_ccm2dcm++; else n_dcm2ccm++;
    end
    mode_q <= mode;
    if (mode == MODE_DCM && g1 && !g1_q) n_pfm++;
    g1_q <= g1;
    if (mode == MODE_DCM && dut.fd_s && !fd_q) n_forced++;
    fd_q <= dut.fd_s;
    if (dut.e_valid && dc > 0) n_up++;
    if (dut.e_valid && dc < 0) n_down++;
    if (g1 || g2) busy_in_period <= 1'b1;
    if (rst_n) begin
      if (mode == MODE_CCM && (s1 !== 1'b1 || g2 !== ~g1)) bad_s1++;
      if (mode == MODE_DCM && s1 !== ~(g1 | g2)) bad_s1++;
    end
    if (period_start && rst_n) begin
      // a whole CCM period, not the first after a mode change: G1 must be
      // high for exactly the duty command taken at its start
      if (d_per >= 0 && mode_per == MODE_CCM && mode_prev == MODE_CCM && mode == MODE_CCM) begin
        check(hi_cnt == d_per, $sformatf("CCM period: G1 high %0d slots, d = %0d", hi_cnt, d_per));
        n_per_ok++;
      end
      mode_prev = mode_per;
      mode_per  = mode;
      d_per     = int'(d);
      hi_cnt    = 0;
      if (last_ps >= 0 && tick - last_ps != 512) n_badper++;
      last_ps = tick;
      if (mode == MODE_DCM && !busy_in_period && !(g1 || g2)) n_idle++;
      busy_in_period <= 1'b0;
    end
  end

  task automatic wait_us(int us);
    repeat (us * 512) @(posedge clk);
  endtask

  initial begin
    int t_reach, n_e0, n_samp;
    real vmin, vmax;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // 1. CCM start-up to 3 V
    vref_code = code_of(3.0);
    t_reach = -1;
    for (int us = 0; us < 600; us++) begin
      wait_us(1);
      if (t_reach < 0 && vout >= 3.0 - 0.015) t_reach = us + 1;
    end
    $display("CCM: window reached after %0d us, d = %0d", t_reach, d);
    check(t_reach >= 200 && t_reach <= 450, $sformatf("start-up time %0d us", t_reach));
    vmin = 10.0; vmax = -10.0; n_e0 = 0; n_samp = 0;
    for (int us = 0; us < 100; us++) begin
      wait_us(1);
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
      n_samp++; if (e == ERR_ZERO) n_e0++;
    end
    $display("CCM steady: Vout %f .. %f, e=0 in %0d of %0d", vmin, vmax, n_e0, n_samp);
    check(vmin > 2.95 && vmax < 3.05, "CCM regulation at 3 V");
    check(n_e0 * 2 > n_samp, "error mostly zero in steady state");
    check(mode == MODE_CCM, "CCM at 3 V");

    // 2. light load reference 1 V
    vref_code = code_of(1.0);
    wait_us(700);
    check(mode == MODE_DCM, "DCM at 1 V");
    vmin = 10.0; vmax = -10.0;
    for (int us = 0; us < 200; us++) begin
      wait_us(1);
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
    end
    $display("DCM steady: Vout %f .. %f, PFM cycles %0d", vmin, vmax, n_pfm);
    check(vmin > 0.9 && vmax < 1.15, "DCM regulation near 1 V");

    // 3. falling reference
    for (int us = 0; us < 100; us++) begin
      vref_code = code_of(1.0 - 0.4 * real'(us) / 100.0);
      wait_us(1);
    end
    wait_us(50);
    $display("after ramp: Vout %f, Vref %f, forced discharges %0d", vout, vref, n_forced);
    check(vout > 0.5 && vout < 0.7, "Vout follows the falling reference");

    // 4. back to heavy load
    vref_code = code_of(2.5);
    wait_us(500);
    vmin = 10.0; vmax = -10.0;
    for (int us = 0; us < 100; us++) begin
      wait_us(1);
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
    end
    $display("CCM at 2.5 V: Vout %f .. %f", vmin, vmax);
    check(mode == MODE_CCM, "CCM at 2.5 V");
    check(vmin > 2.45 && vmax < 2.55, "CCM regulation at 2.5 V");

    $display("events: ccm->dcm %0d dcm->ccm %0d pfm %0d forced %0d up %0d down %0d idle %0d",
             n_ccm2dcm, n_dcm2ccm, n_pfm, n_forced, n_up, n_down, n_idle);
    check(n_ccm2dcm > 0, "CCM to DCM transition happened");
    check(n_dcm2ccm > 0, "DCM to CCM transition happened");
    check(n_pfm > 5, "PFM cycles happened");
    check(n_forced > 0, "forced discharge happened");
    check(n_up > 0 && n_down > 0, "duty corrections of both signs happened");
    check(n_idle > 0, "discontinuous DCM periods happened");
    check(n_overlap == 0, "G1 and G2 never both high");
    check(n_badper == 0, "switching period is 512 ticks");
    check(bad_s1 == 0, $sformatf("S1/G2 rule broken in %0d ticks", bad_s1));
    check(n_per_ok > 1000, $sformatf("%0d CCM periods checked", n_per_ok));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
