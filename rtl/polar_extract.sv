// polar_extract: converts baseband I/Q samples into the 12-bit envelope code
// and the 5-bit phase code that drive the envelope DAC and the digital phase
// shifter of an EER transmitter.
//
// How it works: a pipelined CORDIC in vectoring mode rotates (I, Q) onto the
// positive real axis. A first stage folds the left half-plane onto the right
// one (adding pi to the angle); then CORDIC_ITER micro-rotations drive Q to
// zero while accumulating the angle as a binary angle (2^ANG_W = 2*pi), so
// the angle lands in 0..2*pi without further correction. The x output,
// which carries the CORDIC gain of about 1.6468, is multiplied by 1/gain and
// then by `env_gain` (unsigned fixed point with GAIN_FRAC fraction bits) to
// scale the magnitude to 0..4095, rounding to nearest and saturating at
// 4095. The datapath carries 6 guard fraction bits so that the rounding
// stays within a code even at large gains, and each sample carries its own
// gain value down the pipeline, so env_gain may change at any sample. The host sets env_gain = 4095 / peak_magnitude * 2^GAIN_FRAC so that
// the peak of the received signal maps to full scale. The phase is rounded
// to the nearest multiple of pi/16 and wraps to 0..31, code k meaning a
// phase of k*11.25 degrees.
//
// Interface and timing: one sample per clock when `in_valid` is high; the
// result appears with `out_valid` exactly LATENCY = CORDIC_ITER + 4 clocks
// later. Both codes come out on the same cycle, so the two paths leave the
// block aligned.
//
// From the design description: the 12-bit envelope scaled to the signal peak
// with rounding, and the 5-bit phase with pi/16 steps rounded to the nearest
// code. This design's own choices: CORDIC as the conversion method, the I/Q
// width, the gain input format and the pipeline depth.
module polar_extract
  import eer_pkg::*;
#(
  parameter int unsigned IQ_W        = 16,  // signed I and Q width
  parameter int unsigned CORDIC_ITER = 14,  // micro-rotations
  parameter int unsigned GAIN_W      = 18,  // env_gain width
  parameter int unsigned GAIN_FRAC   = 14   // env_gain fraction bits
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IQ_W-1:0]  in_i,
  input  logic signed [IQ_W-1:0]  in_q,
  input  logic [GAIN_W-1:0]       env_gain,
  output logic                    out_valid,
  output logic [ENV_W-1:0]        env_code,
  output logic [PH_W-1:0]         phase_code
);
  localparam int unsigned ANG_W   = 16;          // binary angle, 2^16 = 2*pi
  localparam int unsigned GUARD   = 6;           // fraction bits inside
  localparam int unsigned XW      = IQ_W + 2 + GUARD; // room for growth
  localparam int unsigned MAG_W   = IQ_W + 1 + GUARD; // |I+jQ| < 2^IQ_W
  localparam logic [15:0] KINV    = 16'd39797;   // round(2^16 / 1.64676)
  localparam int unsigned ENV_MAX = (1 << ENV_W) - 1;

  // atan(2^-i) as a binary angle, 2^16 = 2*pi
  function automatic logic [ANG_W-1:0] atan_tab(input int unsigned i);
    case (i)
      0: atan_tab = 16'd8192;  1: atan_tab = 16'd4836;
      2: atan_tab = 16'd2555;  3: atan_tab = 16'd1297;
      4: atan_tab = 16'd651;   5: atan_tab = 16'd326;
      6: atan_tab = 16'd163;   7: atan_tab = 16'd81;
      8: atan_tab = 16'd41;    9: atan_tab = 16'd20;
      10: atan_tab = 16'd10;   11: atan_tab = 16'd5;
      12: atan_tab = 16'd3;    13: atan_tab = 16'd1;
      14: atan_tab = 16'd1;    default: atan_tab = 16'd0;
    endcase
  endfunction

  typedef struct packed {
    logic                 v;
    logic signed [XW-1:0] x;
    logic signed [XW-1:0] y;
    logic [ANG_W-1:0]     z;
    logic [GAIN_W-1:0]    g;    // gain travels with its sample
  } cstage_t;

  cstage_t st [CORDIC_ITER+1];

  // stage 0: fold into the right half-plane
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st[0] <= '0;
    end else begin
      st[0].v <= in_valid;
      st[0].g <= env_gain;
      if (in_i < 0) begin
        st[0].x <= -(XW'(in_i) <<< GUARD);
        st[0].y <= -(XW'(in_q) <<< GUARD);
        st[0].z <= 16'h8000;
      end else begin
        st[0].x <= XW'(in_i) <<< GUARD;
        st[0].y <= XW'(in_q) <<< GUARD;
        st[0].z <= '0;
      end
    end
  end

  // micro-rotation stages
  for (genvar k = 0; k < CORDIC_ITER; k++) begin : g_iter
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st[k+1] <= '0;
      end else begin
        st[k+1].v <= st[k].v;
        st[k+1].g <= st[k].g;
        if (st[k].y >= 0) begin
          st[k+1].x <= st[k].x + (st[k].y >>> k);
          st[k+1].y <= st[k].y - (st[k].x >>> k);
          st[k+1].z <= st[k].z + atan_tab(k);
        end else begin
          st[k+1].x <= st[k].x - (st[k].y >>> k);
          st[k+1].y <= st[k].y + (st[k].x >>> k);
          st[k+1].z <= st[k].z - atan_tab(k);
        end
      end
    end
  end

  // gain correction and envelope scaling, phase rounding
  logic             v1, v2;
  logic [MAG_W-1:0] mag1;
  logic [ANG_W-1:0] z1, z2;
  logic [GAIN_W-1:0] g1;
  logic [MAG_W+GAIN_W-1:0] scaled2;

  logic [XW+15:0] xk;
  assign xk = {16'd0, st[CORDIC_ITER].x[XW-1:0]} * {{XW{1'b0}}, KINV};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0; g1 <= '0;
      mag1 <= '0; z1 <= '0; z2 <= '0; scaled2 <= '0;
      env_code <= '0; phase_code <= '0;
    end else begin
      // stage A: remove the CORDIC gain (x is never negative here)
      v1   <= st[CORDIC_ITER].v;
      mag1 <= MAG_W'((xk + (XW+16)'(1 << 15)) >> 16);
      z1   <= st[CORDIC_ITER].z;
      g1   <= st[CORDIC_ITER].g;
      // stage B: scale to the envelope range
      v2      <= v1;
      scaled2 <= MAG_W'(mag1) * GAIN_W'(g1) + (MAG_W+GAIN_W)'(1 << (GAIN_FRAC+GUARD-1));
      z2      <= z1;
      // stage C: saturate and round
      out_valid <= v2;
      if ((scaled2 >> (GAIN_FRAC+GUARD)) > (MAG_W+GAIN_W)'(ENV_MAX))
        env_code <= ENV_W'(ENV_MAX);
      else
        env_code <= ENV_W'(scaled2 >> (GAIN_FRAC+GUARD));
      phase_code <= PH_W'((z2 + ANG_W'(1 << (ANG_W-PH_W-1))) >> (ANG_W-PH_W));
    end
  end
endmodule
