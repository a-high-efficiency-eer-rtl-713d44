// envelope_split: splits the envelope code into a slow DC component, which
// becomes the reference command of the DC-DC converter, and the remaining AC
// component, which is what the linear amplifier has to supply on top of it.
//
// How it works: the DC component is a first-order low-pass (exponential
// average) of the envelope, acc += (env - acc) / 2^LPF_SHIFT, kept with
// LPF_SHIFT extra fraction bits so that small steps are not lost. `env_dc`
// is the accumulator rounded to 12 bits and `env_ac` = env - env_dc, a
// signed 13-bit value. The envelope itself is passed on, registered, so that
// all three outputs describe the same sample.
//
// Interface and timing: one sample per clock when `in_valid` is high;
// outputs are registered and valid one clock later with `out_valid`. The
// filter state moves only on valid samples. Reset clears the filter, so the
// DC reference rises from zero: with the default LPF_SHIFT = 12 the time
// constant is 4096 samples, about 107 us at 38.4 MS/s.
//
// From the design description: the envelope is split into a low-frequency
// part that drives the DC-DC converter and a high-frequency part obtained by
// subtracting the DC part from the whole envelope. This design's own
// choices: a first-order digital filter in place of the analog low-pass
// filter of the description, and its time constant.
module envelope_split
  import eer_pkg::*;
#(
  parameter int unsigned LPF_SHIFT = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [ENV_W-1:0]        env_in,
  output logic                    out_valid,
  output logic [ENV_W-1:0]        env_out,
  output logic [ENV_W-1:0]        env_dc,
  output logic signed [ENV_W:0]   env_ac
);
  localparam int unsigned AW = ENV_W + LPF_SHIFT;

  logic [AW-1:0]        acc;
  logic signed [AW+1:0] delta;
  logic [AW-1:0]        acc_next;
  logic [ENV_W:0]       dc_round;   // one spare bit for the rounding carry
  logic [ENV_W-1:0]     dc_next;

  always_comb begin
    delta    = $signed({2'b00, env_in, {LPF_SHIFT{1'b0}}}) - $signed({2'b00, acc});
    acc_next = AW'($signed({2'b00, acc}) + (delta >>> LPF_SHIFT));
    dc_round = (ENV_W+1)'((acc_next + AW'(1 << (LPF_SHIFT-1))) >> LPF_SHIFT);
    dc_next  = dc_round[ENV_W] ? {ENV_W{1'b1}} : dc_round[ENV_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      env_out   <= '0;
      env_dc    <= '0;
      env_ac    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        acc     <= acc_next;
        env_out <= env_in;
        env_dc  <= dc_next;
        env_ac  <= $signed({1'b0, env_in}) - $signed({1'b0, dc_next});
      end
    end
  end
endmodule
