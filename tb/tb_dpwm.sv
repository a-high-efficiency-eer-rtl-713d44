// tb_dpwm: self-checking test of the 9-bit hybrid DPWM.
//
// Changes the duty command at random moments (including 0, 1, 255, 256 and
// 511) and checks, period by period: the period is 512 slot ticks; G1 is
// high for exactly d slots, where d is the command present at the period
// start (changes inside a period wait for the next one); G2 is always the
// complement of G1; sys_tick comes every 16 ticks, at slot 0 of each
// system-clock period; sample_strobe comes at slot 256.
// A second instance in the 4-bit configuration used to illustrate the
// scheme (2-bit counter, 2-bit ring, 16 slots per period) runs alongside
// and gets the same period-by-period checks.
module tb_dpwm;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [8:0] d = 9'd0;
  logic g1, g2, period_start, sys_tick, sample_strobe;
  int checks = 0, failures = 0;

  dpwm dut (.clk(clk), .rst_n(rst_n), .d(d), .g1(g1), .g2(g2),
            .period_start(period_start), .sys_tick(sys_tick),
            .sample_strobe(sample_strobe));

  // 4-bit illustration: NC = 2, ND = 2
  logic [3:0] d4 = 4'd0;
  logic g1_4, g2_4, ps_4, st_4, ss_4;
  int pos4 = 0, high4 = 0, d4_per = 0, started4 = 0, periods4 = 0;
  dpwm #(.NC(2), .ND(2), .SAMPLE_SLOT(8)) dut4 (
    .clk(clk), .rst_n(rst_n), .d(d4), .g1(g1_4), .g2(g2_4),
    .period_start(ps_4), .sys_tick(st_4), .sample_strobe(ss_4));

  always #1 clk = ~clk;

  always @(negedge clk) if (rst_n) begin
    if ($urandom % 23 == 0) d4 = 4'($urandom);
    check(g2_4 == ~g1_4, "4-bit: G2 is the complement of G1");
    if (ps_4) begin
      if (started4) begin
        check(pos4 == 16, $sformatf("4-bit: period length %0d", pos4));
        check(high4 == d4_per, $sformatf("4-bit: G1 high for %0d slots, want %0d", high4, d4_per));
        periods4++;
      end
      started4 = 1; pos4 = 0; high4 = 0; d4_per = int'(d4);
    end
    if (started4) begin
      check(st_4 == (pos4 % 4 == 0), $sformatf("4-bit: sys_tick at slot %0d", pos4));
      check(ss_4 == (pos4 == 8), $sformatf("4-bit: sample_strobe at slot %0d", pos4));
      if (g1_4) high4++;
      pos4++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int pos, high, d_per, periods, started;
    int fixed_d [5] = '{0, 1, 255, 256, 511};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    pos = 0; high = 0; d_per = 0; periods = 0; started = 0;
    while (periods < 120) begin
      @(negedge clk);
      // occasional command change, anywhere in the period
      if ($urandom % 300 == 0)
        d = (periods < 10) ? 9'(fixed_d[periods % 5]) : 9'($urandom);
      check(g2 == ~g1, "G2 is the complement of G1");
      if (period_start) begin
        if (started) begin
          check(pos == 512, $sformatf("period length %0d", pos));
          check(high == d_per, $sformatf("G1 high for %0d slots, want %0d", high, d_per));
          periods++;
        end
        started = 1;
        pos = 0; high = 0;
        d_per = int'(d);
      end
      if (started) begin
        check(sys_tick == (pos % 16 == 0), $sformatf("sys_tick at slot %0d", pos));
        check(sample_strobe == (pos == 256), $sformatf("sample_strobe at slot %0d", pos));
        if (g1) high++;
        pos++;
      end
    end
    check(periods4 > 3000, $sformatf("4-bit: %0d periods checked", periods4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
