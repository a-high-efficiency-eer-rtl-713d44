// tb_pid_comp: self-checking test of the table PID compensator.
//
// Drives a long random sequence of three-level errors, with runs of +1 and
// -1 so that the duty command reaches both range limits. For every update
// the expected correction is recomputed from the PID coefficients
// (a = 0.29199, b = -0.56787, c = 0.27734, scaled by 256 and rounded,
// non-zero values below one LSB rounded away from zero, histories that jump
// across the window forced to 0), and the expected command is the previous
// one plus that correction, limited to 1..511. Also checks the reset value,
// the one-clock d_valid latency and that d holds between strobes.
module tb_pid_comp;
  import eer_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic e_valid = 1'b0;
  err_t e = ERR_ZERO;
  logic [8:0] d;
  logic d_valid;
  logic signed [8:0] dc;
  int checks = 0, failures = 0;
  int seen [27];
  int sat_lo = 0, sat_hi = 0;

  logic preset = 1'b0;
  logic [8:0] d_preset = '0;

  pid_comp dut (.clk(clk), .rst_n(rst_n), .e_valid(e_valid), .e(e),
                .preset(preset), .d_preset(d_preset),
                .d(d), .d_valid(d_valid), .dc(dc));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gold_corr(int e0, int e1, int e2);
    real v;
    int  r;
    if (e0 * e1 == -1 || e1 * e2 == -1) return 0;
    v = 256.0 * (0.29199 * e0 - 0.56787 * e1 + 0.27734 * e2);
    if (v >= 0.0) r = $rtoi(v + 0.5);
    else          r = -$rtoi(-v + 0.5);
    if (r == 0 && (v > 0.01 || v < -0.01)) r = (v > 0.0) ? 1 : -1;
    return r;
  endfunction

  function automatic err_t to_err(int v);
    return (v > 0) ? ERR_POS : (v < 0) ? ERR_NEG : ERR_ZERO;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int h0, h1, h2, exp_d, exp_c, nv, run_len, run_val, idle;
    h1 = 0; h2 = 0; exp_d = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(d == 9'd1, "reset value of d");
    run_len = 0; run_val = 0;
    for (int n = 0; n < 6000; n++) begin
      // pick the next error: long runs push d to the limits
      if (run_len == 0) begin
        run_len = 1 + ($urandom % 3 == 0 ? $urandom % 700 : $urandom % 4);
        run_val = int'($urandom % 3) - 1;
      end
      nv = (run_len > 4) ? run_val : int'($urandom % 3) - 1;
      run_len--;
      h0 = nv;
      @(negedge clk);
      e = to_err(h0);
      e_valid = 1'b1;
      @(negedge clk);
      e_valid = 1'b0;
      exp_c = gold_corr(h0, h1, h2);
      exp_d = exp_d + exp_c;
      if (exp_d < 1)   begin exp_d = 1;   sat_lo++; end
      if (exp_d > 511) begin exp_d = 511; sat_hi++; end
      seen[9 * (h0 + 1) + 3 * (h1 + 1) + (h2 + 1)]++;
      check(d_valid, "d_valid one clock after e_valid");
      check(int'(dc) == exp_c, $sformatf("correction for (%0d,%0d,%0d): got %0d want %0d", h0, h1, h2, dc, exp_c));
      check(int'(d) == exp_d, $sformatf("d after (%0d,%0d,%0d): got %0d want %0d", h0, h1, h2, d, exp_d));
      // idle clocks: d must hold
      idle = 1 + $urandom % 3;
      repeat (idle) @(negedge clk);
      check(int'(d) == exp_d && !d_valid, "d holds between strobes");
      h2 = h1; h1 = h0;
    end
    // preset: loads the value, clears the history
    @(negedge clk);
    preset = 1'b1; d_preset = 9'd200;
    @(negedge clk);
    preset = 1'b0;
    check(d == 9'd200 && dc == 0, "preset loads d");
    e = ERR_POS; e_valid = 1'b1;
    @(negedge clk);
    e_valid = 1'b0;
    check(d == 9'd275, $sformatf("after preset history is clear: d %0d want 275", d));
    preset = 1'b1; d_preset = 9'd0;
    @(negedge clk);
    preset = 1'b0;
    check(d == 9'd1, "preset limited to the range");
    for (int i = 0; i < 27; i++) check(seen[i] > 0, $sformatf("history %0d exercised", i + 1));
    check(sat_lo > 0, "lower limit reached");
    check(sat_hi > 0, "upper limit reached");
    $display("saturation events: low %0d high %0d", sat_lo, sat_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
