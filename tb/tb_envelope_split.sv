// tb_envelope_split: self-checking test of the envelope DC/AC split.
//
// Part 1 compares every output with a reference model of the first-order
// average (acc += floor((env*2^12 - acc) / 2^12), DC = acc rounded to 12
// bits, AC = env - DC) for a random envelope with gaps in in_valid.
// Part 2 checks the filter's behaviour: after a step from 0 to 3000 the DC
// value passes 63% of the step after about one time constant (4096
// samples, accepted 3900..4300) and settles within 1 code of the input;
// env_out repeats the input and out_valid follows in_valid by one clock.
module tb_envelope_split;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [11:0] env_in = '0;
  logic out_valid;
  logic [11:0] env_out, env_dc;
  logic signed [12:0] env_ac;
  int checks = 0, failures = 0;

  envelope_split dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .env_in(env_in),
                      .out_valid(out_valid), .env_out(env_out), .env_dc(env_dc),
                      .env_ac(env_ac));

  always #5 clk = ~clk;

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

  longint acc;
  int     dc_m;

  task automatic model_step(int env);
    longint delta;
    delta = (longint'(env) <<< 12) - acc;
    acc   = acc + (delta >>> 12);
    dc_m  = int'((acc + 2048) >>> 12);
    if (dc_m > 4095) dc_m = 4095;
  endtask

  initial begin
    int v, t63, n;
    bit was_valid;
    acc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // part 1: random envelope
    for (n = 0; n < 20000; n++) begin
      was_valid = ($urandom % 5) != 0;
      v = (n < 10000) ? int'($urandom % 4096) : 3500 + int'($urandom % 596);
      in_valid = was_valid; env_in = 12'(v);
      @(negedge clk);
      check(out_valid == was_valid, "out_valid follows in_valid");
      if (was_valid) begin
        model_step(v);
        check(int'(env_dc) == dc_m, $sformatf("dc %0d want %0d", env_dc, dc_m));
        check(int'(env_ac) == v - dc_m, $sformatf("ac %0d want %0d", env_ac, v - dc_m));
        check(int'(env_out) == v, "env_out");
      end
    end
    // part 2: step response from a cleared filter
    in_valid = 1'b0;
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    t63 = -1;
    for (n = 1; n <= 40000; n++) begin
      in_valid = 1'b1; env_in = 12'd3000;
      @(negedge clk);
      if (t63 < 0 && env_dc >= 12'd1896) t63 = n;
    end
    check(t63 >= 3900 && t63 <= 4300, $sformatf("63%% rise after %0d samples", t63));
    check(env_dc >= 12'd2999 && env_dc <= 12'd3000, $sformatf("settled dc %0d", env_dc));
    check(env_ac >= 0 && env_ac <= 1, "settled ac");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
