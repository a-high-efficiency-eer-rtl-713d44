// sync_2ff: two-flip-flop synchronizer for asynchronous single-bit inputs.
//
// Each bit of `d` (for example the output of an analog comparator) passes
// through two flip-flops clocked by `clk`, so `q` follows `d` two clock
// edges later. Bits are synchronized independently, so it is meant for
// independent level signals, not for multi-bit words. Reset value is 0.
module sync_2ff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
