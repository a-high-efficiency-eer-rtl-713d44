// buck_model: behavioural model of the synchronous buck power stage (not
// synthesizable; for testbenches only).
//
// Q1 connects the switching node to VIN while G1 is high, Q2 connects it to
// ground while G2 is high. With both off, the body diodes carry the
// inductor current until it reaches zero, after which the current stays at
// zero (discontinuous conduction). The inductor L feeds the output
// capacitor C, loaded by RLOAD. The state is integrated with the forward
// Euler method once per rising edge of `clk`, with step DT (seconds),
// which should equal the clock period. Default values: VIN = 5 V,
// L = 10 uH, C = 10 uF, RLOAD = 50 ohm, DT = 1/512 MHz.
module buck_model #(
  parameter real VIN   = 5.0,
  parameter real L     = 10.0e-6,
  parameter real C     = 10.0e-6,
  parameter real RLOAD = 50.0,
  parameter real DT    = 1.0 / 512.0e6
) (
  input  logic clk,
  input  logic g1,
  input  logic g2,
  output real  vout,
  output real  il
);
  real vsw, il_next, v_st, i_st;

  initial begin
    v_st = 0.0;
    i_st = 0.0;
    vout = 0.0;
    il   = 0.0;
  end

  always @(posedge clk) begin
    if (g1 && !g2)      vsw = VIN;
    else if (g2 && !g1) vsw = 0.0;
    else if (g1 && g2)  vsw = VIN / 2.0;       // shoot-through: not expected
    else if (i_st > 0.0) vsw = 0.0;            // Q2 body diode
    else if (i_st < 0.0) vsw = VIN;            // Q1 body diode
    else                 vsw = v_st;           // idle, no current
    il_next = i_st + (vsw - v_st) / L * DT;
    if (!g1 && !g2 && ((i_st > 0.0 && il_next < 0.0) || (i_st < 0.0 && il_next > 0.0)))
      il_next = 0.0;
    v_st = v_st + (i_st - v_st / RLOAD) / C * DT;
    i_st = il_next;
    vout <= v_st;
    il   <= i_st;
  end
endmodule
