// tb_error_gen: self-checking test of the three-level error encoder.
//
// Applies every (x, y) comparator pair with and without the sample strobe
// and checks the encoding (1,0) -> +1, (0,1) -> -1, otherwise 0, the
// one-clock latency of e and e_valid, and that e holds between samples.
module tb_error_gen;
  import eer_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_en = 1'b0, x = 1'b0, y = 1'b0;
  err_t e;
  logic e_valid;
  int checks = 0, failures = 0;

  error_gen dut (.clk(clk), .rst_n(rst_n), .sample_en(sample_en), .x(x), .y(y),
                 .e(e), .e_valid(e_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int expv, held;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(e == ERR_ZERO && !e_valid, "reset state");
    held = 0;
    for (int n = 0; n < 400; n++) begin
      x = 1'($urandom); y = 1'($urandom);
      sample_en = ($urandom % 2) == 0;
      expv = (x && !y) ? 1 : (!x && y) ? -1 : 0;
      @(negedge clk);
      if (sample_en) begin
        check(e_valid, "e_valid after sample");
        check(int'(e) == expv, $sformatf("x=%0b y=%0b: e=%0d want %0d", x, y, e, expv));
        held = expv;
      end else begin
        check(!e_valid, "no e_valid without sample");
        check(int'(e) == held, "e holds");
      end
      sample_en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
