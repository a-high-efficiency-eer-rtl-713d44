// pid_comp: look-up-table PID compensator of the CCM control loop.
//
// The discrete PID law d(n) = d(n-1) + a*e(n) + b*e(n-1) + c*e(n-2) needs no
// multiplier here because e takes only the values -1, 0 and +1: the
// correction for each of the 27 possible (e(n), e(n-1), e(n-2)) histories is
// precomputed, scaled by 256 and stored as a signed 9-bit table entry
// (a = 0.29199, b = -0.56787, c = 0.27734). Histories in which the error
// jumps straight from one side of the window to the other cannot occur
// during a transient and hold 0. The new duty command is the previous one
// plus the table entry, held inside D_MIN..D_MAX (1..511, i.e. 0.2% to
// 99.8% duty).
//
// Interface and timing: on each `e_valid` strobe the error history shifts
// and `d` is updated on the same clock edge, using the table entry of the
// new history; `d_valid` pulses one clock later. A `preset` pulse (which
// takes priority over `e_valid`) loads `d_preset`, limited to the range,
// and clears the error history; the controller uses it when the loop is
// (re)started. Reset clears the history
// and starts d at D_INIT, so the converter starts from a minimum duty and
// ramps up (soft start). Note that the table scale (256) gives steps of
// about 75/512 of the period per unit of a, as in the design description.
//
// From the design description: the coefficients, the table contents
// (including the entries forced to 0 and the +-1 entries for histories
// (-1,-1,-1) and (1,1,1)), the 9-bit command and its 1..511 range. This
// design's own choices: saturation at the range limits, the reset value
// D_INIT, the preset input and the update timing. With D_MAX at the top of
// the 9-bit range the upper preset limit is a constant-false comparison,
// which lint reports; it is kept so that a smaller D_MAX still works.
module pid_comp
  import eer_pkg::*;
#(
  parameter logic [DUTY_W-1:0] D_INIT = 9'd1,
  parameter logic [DUTY_W-1:0] D_MIN  = 9'd1,
  parameter logic [DUTY_W-1:0] D_MAX  = 9'd511
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              e_valid,
  input  err_t              e,
  input  logic              preset,          // load d_preset, clear history
  input  logic [DUTY_W-1:0] d_preset,
  output logic [DUTY_W-1:0] d,
  output logic              d_valid,
  output logic signed [DUTY_W-1:0] dc     // last correction applied
);
  err_t e1, e2;   // e(n-1), e(n-2)

  // index 0..26 = 9*(e(n)+1) + 3*(e(n-1)+1) + (e(n-2)+1)
  function automatic int unsigned lvl(input err_t v);
    case (v)
      ERR_NEG:  lvl = 0;
      ERR_POS:  lvl = 2;
      default:  lvl = 1;
    endcase
  endfunction

  // correction table, entries 1..27 of the compensator table in order
  function automatic logic signed [DUTY_W-1:0] corr(input int unsigned idx);
    case (idx)
      0:  corr = -9'sd1;    1:  corr = 9'sd71;    2:  corr = 9'sd0;
      3:  corr = -9'sd146;  4:  corr = -9'sd75;   5:  corr = -9'sd4;
      6:  corr = 9'sd0;     7:  corr = 9'sd0;     8:  corr = 9'sd0;
      9:  corr = 9'sd74;    10: corr = 9'sd145;   11: corr = 9'sd0;
      12: corr = -9'sd71;   13: corr = 9'sd0;     14: corr = 9'sd71;
      15: corr = 9'sd0;     16: corr = -9'sd145;  17: corr = -9'sd74;
      18: corr = 9'sd0;     19: corr = 9'sd0;     20: corr = 9'sd0;
      21: corr = 9'sd4;     22: corr = 9'sd75;    23: corr = 9'sd146;
      24: corr = 9'sd0;     25: corr = -9'sd71;   26: corr = 9'sd1;
      default: corr = 9'sd0;
    endcase
  endfunction

  logic signed [DUTY_W-1:0] dc_new;
  logic signed [DUTY_W+1:0] sum;
  logic [DUTY_W-1:0]        d_new;

  always_comb begin
    dc_new = corr(9 * lvl(e) + 3 * lvl(e1) + lvl(e2));
    sum    = $signed({2'b00, d}) + (DUTY_W+2)'(dc_new);
    if (sum < $signed({2'b00, D_MIN}))
      d_new = D_MIN;
    else if (sum > $signed({2'b00, D_MAX}))
      d_new = D_MAX;
    else
      d_new = DUTY_W'(sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1      <= ERR_ZERO;
      e2      <= ERR_ZERO;
      d       <= D_INIT;
      dc      <= '0;
      d_valid <= 1'b0;
    end else begin
      d_valid <= e_valid | preset;
      if (preset) begin
        e1 <= ERR_ZERO;
        e2 <= ERR_ZERO;
        d  <= (d_preset < D_MIN) ? D_MIN : (d_preset > D_MAX) ? D_MAX : d_preset;
        dc <= '0;
      end else if (e_valid) begin
        e1 <= e;
        e2 <= e1;
        d  <= d_new;
        dc <= dc_new;
      end
    end
  end
endmodule
