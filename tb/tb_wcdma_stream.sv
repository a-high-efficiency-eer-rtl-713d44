// tb_wcdma_stream: the transmitter's signal path on a WCDMA-like baseband
// stream, at the default parameters of the top.
//
// The stimulus is a single-code QPSK signal at 3.84 Mchip/s, oversampled
// 10 times (38.4 MS/s, one sample per sample clock) and shaped by a
// root-raised-cosine filter with roll-off 0.22 over +-6 chips, as a WCDMA
// downlink carrier would be. Unlike a constant-envelope test signal its
// envelope swings from near zero to a peak several dB above the mean, so
// both the small-magnitude end of the CORDIC and the saturation-free
// peak scaling are exercised. The whole stream is generated first, its
// peak magnitude found and env_gain set to 4095/peak, as a host would.
//
// Checks, for each of the N_SAMP samples:
//  - envelope code within +-1 of round(|I+jQ| * env_gain / 2^14), capped
//    at 4095; the largest sample must map to at least 4094
//  - phase code equal to round(angle/(pi/16)) mod 32, except within 0.003
//    rad of a rounding boundary or below a magnitude of 40 LSB
//  - env_ac + env_dc == env_code, and env_dc within 2 codes of a
//    floating-point model of the 4096-sample exponential average
//  - one output per input, the first 19 sample clocks after the first input
// and, at the end, that the controller's reference equals the last DC
// value. The comparator inputs of the controller are held inactive: this
// test is about the signal path.
module tb_wcdma_stream;
  import eer_pkg::*;

  localparam real PI     = 3.14159265358979;
  localparam int  LAT    = 19;
  localparam int  N_SAMP = 20000;
  localparam int  OSR    = 10;
  localparam int  SPAN   = 6;        // filter half-length in chips
  localparam real BETA   = 0.22;

  logic clk_s = 1'b0, clk_c = 1'b0, rst_s_n = 1'b0, rst_c_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [15:0] in_i = '0, in_q = '0;
  logic [17:0] env_gain = '0;
  logic env_valid;
  logic [11:0] env_code, env_dc, vref_code;
  logic [4:0] phase_code;
  logic signed [12:0] env_ac;
  logic g1, g2, s1, period_start, sys_tick;
  mode_t mode;
  err_t  e;
  logic [8:0] d;
  logic signed [8:0] dc;
  int checks = 0, failures = 0;

  eer_tx_top dut (
    .clk_s(clk_s), .rst_s_n(rst_s_n), .in_valid(in_valid), .in_i(in_i), .in_q(in_q),
    .env_gain(env_gain), .env_valid(env_valid), .env_code(env_code),
    .phase_code(phase_code), .env_dc(env_dc), .env_ac(env_ac),
    .clk_c(clk_c), .rst_c_n(rst_c_n), .vref_code(vref_code),
    .cmp_x(1'b0), .cmp_y(1'b0), .vout_above_vtr(1'b0),
    .cmp_cycle_start(1'b0), .cmp_peak(1'b0), .cmp_zero(1'b0),
    .cmp_forced(1'b0), .g1(g1), .g2(g2), .s1(s1), .mode(mode), .e(e), .d(d),
    .dc(dc), .period_start(period_start), .sys_tick(sys_tick));

  always #0.9765625 clk_c = ~clk_c;      // 512 MHz slot tick
  always #13.0208333 clk_s = ~clk_s;     // 38.4 MHz sample clock

  initial begin
    #2_000_000;
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

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // root-raised-cosine impulse response, t in chips
  function automatic real rrc(real t);
    real x;
    if (fabs(t) < 1e-9) return 1.0 - BETA + 4.0 * BETA / PI;
    if (fabs(fabs(t) - 1.0 / (4.0 * BETA)) < 1e-9)
      return BETA / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * BETA))
                                + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * BETA)));
    x = 4.0 * BETA * t;
    return ($sin(PI * t * (1.0 - BETA)) + x * $cos(PI * t * (1.0 + BETA)))
           / (PI * t * (1.0 - x * x));
  endfunction

  int  si [N_SAMP];
  int  sq [N_SAMP];
  int  exp_env [N_SAMP];
  int  exp_ph [N_SAMP];
  bit  skip_ph [N_SAMP];
  int  gain, peak_idx;

  task automatic make_stream();
    localparam int NCHIP = N_SAMP / OSR + 2 * SPAN + 1;
    real ci [NCHIP], cq [NCHIP];
    real fi [N_SAMP], fq [N_SAMP];
    real pk, m, ang, sf, scale, envr;
    for (int k = 0; k < NCHIP; k++) begin
      ci[k] = (($urandom % 2) != 0) ? 1.0 : -1.0;
      cq[k] = (($urandom % 2) != 0) ? 1.0 : -1.0;
    end
    pk = 0.0;
    for (int n = 0; n < N_SAMP; n++) begin
      real t, acc_i, acc_q, h;
      int c0;
      acc_i = 0.0; acc_q = 0.0;
      c0 = n / OSR;
      for (int k = c0 - SPAN; k <= c0 + SPAN + 1; k++) begin
        t = real'(n - k * OSR) / real'(OSR);
        if (fabs(t) <= real'(SPAN)) begin
          h = rrc(t);
          acc_i += ci[k + SPAN] * h;
          acc_q += cq[k + SPAN] * h;
        end
      end
      fi[n] = acc_i; fq[n] = acc_q;
      m = $sqrt(acc_i * acc_i + acc_q * acc_q);
      if (m > pk) pk = m;
    end
    scale = 30000.0 / pk;
    pk = 0.0; peak_idx = 0;
    for (int n = 0; n < N_SAMP; n++) begin
      si[n] = $rtoi(fi[n] * scale);
      sq[n] = $rtoi(fq[n] * scale);
      m = $sqrt(real'(si[n]) * real'(si[n]) + real'(sq[n]) * real'(sq[n]));
      if (m > pk) begin pk = m; peak_idx = n; end
    end
    gain = $rtoi(4095.0 * 16384.0 / pk);          // 4095/peak, 14 fraction bits
    for (int n = 0; n < N_SAMP; n++) begin
      m    = $sqrt(real'(si[n]) * real'(si[n]) + real'(sq[n]) * real'(sq[n]));
      envr = m * real'(gain) / 16384.0;
      exp_env[n] = (envr > 4095.0) ? 4095 : $rtoi(envr + 0.5);
      ang = $atan2(real'(sq[n]), real'(si[n]));
      if (ang < 0.0) ang += 2.0 * PI;
      sf  = ang / (PI / 16.0);
      exp_ph[n]  = $rtoi(sf + 0.5) % 32;
      skip_ph[n] = ((sf - $floor(sf)) > 0.484 && (sf - $floor(sf)) < 0.516) || m < 40.0;
    end
  endtask

  int  n_out = 0, scyc = 0, first_in = -1, first_out = -1, n_low = 0;
  real dc_model = 0.0, env_sum = 0.0;
  logic [11:0] last_dc = '0;

  always @(negedge clk_s) begin
    if (rst_s_n) begin
      scyc++;
      if (env_valid) begin
        int de, n;
        n = n_out;
        if (first_out < 0) begin
          first_out = scyc;
          check(first_out - first_in == LAT + 1, $sformatf("latency %0d", first_out - first_in - 1));
        end
        if (n < N_SAMP) begin
          de = int'(env_code) - exp_env[n];
          check(de >= -1 && de <= 1, $sformatf("sample %0d: env %0d want %0d", n, env_code, exp_env[n]));
          if (!skip_ph[n])
            check(int'(phase_code) == exp_ph[n],
                  $sformatf("sample %0d: phase %0d want %0d", n, phase_code, exp_ph[n]));
          if (n == peak_idx) check(env_code >= 12'd4094, $sformatf("peak maps to %0d", env_code));
          if (exp_env[n] < 200) n_low++;
        end
        check(int'(env_ac) + int'(env_dc) == int'(env_code), "env_ac + env_dc == env_code");
        dc_model += (real'(env_code) - dc_model) / 4096.0;
        check(fabs(real'(env_dc) - dc_model) <= 2.0,
              $sformatf("env_dc %0d, model %f", env_dc, dc_model));
        env_sum += real'(env_code);
        last_dc = env_dc;
        n_out++;
      end
    end
  end

  initial begin
    make_stream();
    env_gain = 18'(gain);
    $display("stream: %0d samples, env_gain %0d", N_SAMP, gain);
    repeat (4) @(posedge clk_s);
    rst_s_n = 1'b1; rst_c_n = 1'b1;
    for (int n = 0; n < N_SAMP; n++) begin
      @(posedge clk_s);
      #1;
      if (first_in < 0) first_in = scyc;
      in_valid = 1'b1;
      in_i = 16'(si[n]);
      in_q = 16'(sq[n]);
    end
    @(posedge clk_s);
    #1 in_valid = 1'b0;
    repeat (LAT + 200) @(posedge clk_s);
    $display("outputs %0d, mean envelope %f, final DC %0d, samples below 200: %0d",
             n_out, env_sum / real'(n_out), last_dc, n_low);
    check(n_out == N_SAMP, $sformatf("outputs %0d of %0d", n_out, N_SAMP));
    check(n_low > 100, "deep envelope dips present");
    check(vref_code == last_dc, $sformatf("reference %0d, DC %0d", vref_code, last_dc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
