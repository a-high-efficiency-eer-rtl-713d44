// tb_polar_extract: self-checking test of the I/Q to envelope/phase
// converter.
//
// Feeds random I/Q samples (random gaps in in_valid, random full-scale
// peaks) and compares each output with values computed in floating point:
// envelope = min(4095, round(|I+jQ| * env_gain / 2^14)) within +-1 code
// (CORDIC residue), phase = round(angle / (pi/16)) mod 32, exact unless the
// angle lies within 0.01 rad of a rounding boundary. Checks that every
// output comes exactly 18 clocks (CORDIC_ITER + 4) after its input, and
// two worked cases: envelope 0.7235 of the peak -> 2963, and the angle
// 0.7356 rad -> code 4 (4 x 11.25 degrees = 45 degrees is the nearest
// step).
module tb_polar_extract;
  localparam int LAT = 18;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [15:0] in_i = '0, in_q = '0;
  logic [17:0] env_gain = '0;
  logic out_valid;
  logic [11:0] env_code;
  logic [4:0]  phase_code;
  int checks = 0, failures = 0;

  polar_extract dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_i(in_i),
                     .in_q(in_q), .env_gain(env_gain), .out_valid(out_valid),
                     .env_code(env_code), .phase_code(phase_code));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // history of what was applied, indexed by cycle
  logic        h_v [int];
  int          h_env [int];
  int          h_ph [int];
  bit          h_edge [int];
  int          cyc = 0;

  localparam real PI = 3.14159265358979;

  task automatic apply(bit v, int i, int q, int gain);
    real mag, ang, step_f, envr;
    int  env_exp, ph_exp;
    in_valid = v; in_i = 16'(i); in_q = 16'(q); env_gain = 18'(gain);
    mag  = $sqrt(real'(i) * real'(i) + real'(q) * real'(q));
    ang  = $atan2(real'(q), real'(i));
    if (ang < 0.0) ang = ang + 2.0 * PI;
    envr = mag * real'(gain) / 16384.0;
    env_exp = (envr > 4095.0) ? 4095 : $rtoi(envr + 0.5);
    step_f = ang / (PI / 16.0);
    ph_exp = $rtoi(step_f + 0.5) % 32;
    h_v[cyc] = v; h_env[cyc] = env_exp; h_ph[cyc] = ph_exp;
    h_edge[cyc] = ((step_f - $floor(step_f)) > 0.5 - 0.01 * 16.0 / PI &&
                   (step_f - $floor(step_f)) < 0.5 + 0.01 * 16.0 / PI) || mag < 40.0;
  endtask

  // output checker
  int n_out = 0;
  always @(negedge clk) begin
    if (rst_n && cyc > LAT) begin
      int k, de, dp;
      k = cyc - LAT;
      check(out_valid == h_v[k], $sformatf("valid latency at cycle %0d", cyc));
      if (out_valid && h_v[k]) begin
        n_out++;
        de = int'(env_code) - h_env[k];
        check(de >= -1 && de <= 1, $sformatf("env %0d want %0d (cycle %0d)", env_code, h_env[k], k));
        dp = (int'(phase_code) - h_ph[k] + 32) % 32;
        if (h_edge[k]) check(dp == 0 || dp == 1 || dp == 31, "phase near a boundary");
        else check(dp == 0, $sformatf("phase %0d want %0d", phase_code, h_ph[k]));
      end
    end
  end

  initial begin
    int peak, gain, i, q;
    real a;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // worked cases from the specification of the codes
    apply(1, 23707, 0, 2048);                 // 0.7235 of peak 32767
    @(negedge clk); cyc++;
    apply(1, $rtoi(20000.0 * $cos(0.7356)), $rtoi(20000.0 * $sin(0.7356)), 2048);
    @(negedge clk); cyc++;
    apply(0, 0, 0, 2048);
    repeat (LAT - 2) begin @(negedge clk); cyc++; end
    check(env_code == 12'd2963, $sformatf("worked envelope: %0d want 2963", env_code));
    @(negedge clk); cyc++;
    check(phase_code == 5'd4, $sformatf("worked phase: %0d want 4", phase_code));
    for (int n = 0; n < 5000; n++) begin
      if (n % 500 == 0) begin
        peak = 200 + $urandom % 46000;
        gain = $rtoi(4095.0 / real'(peak) * 16384.0 + 0.5);
        if (gain > 262143) gain = 262143;
      end
      a = real'($urandom % 100000) / 100000.0 * 2.0 * PI;
      i = $rtoi(real'(peak) * ($urandom % 1001) / 1000.0 * $cos(a));
      q = $rtoi(real'(peak) * ($urandom % 1001) / 1000.0 * $sin(a));
      if (i > 32767) i = 32767; if (i < -32767) i = -32767;
      if (q > 32767) q = 32767; if (q < -32767) q = -32767;
      apply(($urandom % 4) != 0, i, q, gain);
      @(negedge clk); cyc++;
    end
    apply(0, 0, 0, gain);
    repeat (LAT + 2) begin @(negedge clk); cyc++; end
    check(n_out > 3000, "enough outputs compared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
