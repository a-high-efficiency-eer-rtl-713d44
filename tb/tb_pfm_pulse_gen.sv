// tb_pfm_pulse_gen: self-checking test of the DCM pulse generator.
//
// First walks through the switching sequences of light-load operation:
// cycle start -> G1 on; peak current -> G1 off, G2 on; zero current -> G2
// off and S1 on; an early end of the charge phase by forced_discharge; and
// clearing by `en`. Then applies random comparator patterns and compares
// G1, G2 and S1 with a reference model of the two S-R flip-flops (each
// reset-dominant) and the NOR gate.
module tb_pfm_pulse_gen;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic cycle_start = 1'b0, peak = 1'b0, zero = 1'b0, forced = 1'b0;
  logic g1, g2, s1;
  int checks = 0, failures = 0;

  pfm_pulse_gen dut (.clk(clk), .rst_n(rst_n), .en(en), .cycle_start(cycle_start),
                     .peak(peak), .zero(zero), .forced_discharge(forced),
                     .g1(g1), .g2(g2), .s1(s1));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(logic cs, logic pk, logic zr, logic fd);
    cycle_start = cs; peak = pk; zero = zr; forced = fd;
    @(negedge clk);
  endtask

  initial begin
    logic m1, m2;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!g1 && !g2 && s1, "reset: both off, S1 closed");
    en = 1'b1;
    step(1, 0, 0, 0);  check(g1 && !g2 && !s1, "cycle start turns G1 on, S1 open");
    step(0, 0, 0, 0);  check(g1 && !g2, "G1 stays on");
    step(0, 1, 0, 0);  check(!g1 && g2 && !s1, "peak: G1 off, G2 on");
    step(0, 0, 0, 0);  check(!g1 && g2, "G2 stays on");
    step(0, 0, 1, 0);  check(!g1 && !g2 && s1, "zero current: both off, S1 closed");
    step(0, 0, 0, 0);  check(!g1 && !g2 && s1, "idle");
    step(1, 0, 0, 0);  check(g1 && !g2, "next cycle");
    step(0, 0, 0, 1);  check(!g1 && g2, "forced discharge ends the charge phase");
    step(1, 0, 0, 0);  check(g1 && !g2, "cycle start ends the discharge phase");
    en = 1'b0;
    step(1, 0, 0, 0);  check(!g1 && !g2 && s1, "disabled: both off");
    en = 1'b1;
    // random patterns against a reference model
    m1 = g1; m2 = g2;
    for (int n = 0; n < 3000; n++) begin
      logic cs, pk, zr, fd;
      cs = ($urandom % 4) == 0; pk = ($urandom % 5) == 0;
      zr = ($urandom % 5) == 0; fd = ($urandom % 9) == 0;
      if (pk || fd)   m1 = 1'b0; else if (cs) m1 = 1'b1;
      if (cs || zr)   m2 = 1'b0; else if (pk || fd) m2 = 1'b1;
      step(cs, pk, zr, fd);
      check(g1 == m1 && g2 == m2 && s1 == !(m1 || m2),
            $sformatf("random step %0d: g1=%0b g2=%0b s1=%0b want %0b %0b", n, g1, g2, s1, m1, m2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
