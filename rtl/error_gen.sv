// error_gen: three-level error e(n) of the CCM control loop.
//
// Two comparators watch the converter output against a window of width Vq
// around the reference: x is high when Vout lies below Vref - Vq/2, y when
// it lies above Vref + Vq/2. Once per switching period, on `sample_en`,
// the pair is encoded as e(n): (x,y) = (1,0) gives +1, (0,1) gives -1 and
// (0,0) gives 0. (1,1) cannot occur with a window of positive width and is
// read as 0. The inputs must already be synchronous to `clk`.
//
// Timing: `e` and the one-clock strobe `e_valid` are registered one clock
// after `sample_en`. `e` holds its value between samples and resets to 0.
//
// From the design description: the two-comparator three-level ADC, the
// (x,y) code table and one sample per switching period. This design's
// own choices: the value for (1,1) and the register timing.
module error_gen
  import eer_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sample_en,
  input  logic x,           // Vout below the window
  input  logic y,           // Vout above the window
  output err_t e,
  output logic e_valid
);
  err_t e_code;

  always_comb begin
    unique case ({x, y})
      2'b10:   e_code = ERR_POS;
      2'b01:   e_code = ERR_NEG;
      default: e_code = ERR_ZERO;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e       <= ERR_ZERO;
      e_valid <= 1'b0;
    end else begin
      e_valid <= sample_en;
      if (sample_en) e <= e_code;
    end
  end
endmodule
