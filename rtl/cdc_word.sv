// cdc_word: carries a slowly changing word from one clock domain to another.
//
// The source side captures `src_data` into a holding register and flips a
// request toggle; the destination side synchronizes the toggle with two
// flip-flops, and on a change it loads the (by then stable) holding register
// into `dst_data` and flips an acknowledge toggle that travels back. The
// source captures a new word only after the acknowledge has returned, so
// the destination sees every transferred word whole, never a mix of two.
// Words that arrive while a transfer is in flight are skipped: the output
// follows the input with a delay of a few clock cycles of each domain,
// which suits a low-pass reference value. `dst_data` resets to 0 and
// `dst_upd` pulses for one destination cycle when it is loaded.
module cdc_word #(
  parameter int unsigned W = 12
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic [W-1:0] src_data,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic [W-1:0] dst_data,
  output logic         dst_upd
);
  logic [W-1:0] hold;
  logic req_tgl, ack_tgl;
  logic ack_s1, ack_s2;
  logic req_s1, req_s2, req_s3;

  // source domain
  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      hold    <= '0;
      req_tgl <= 1'b0;
      ack_s1  <= 1'b0;
      ack_s2  <= 1'b0;
    end else begin
      ack_s1 <= ack_tgl;
      ack_s2 <= ack_s1;
      if (ack_s2 == req_tgl) begin
        hold    <= src_data;
        req_tgl <= ~req_tgl;
      end
    end
  end

  // destination domain
  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      req_s1   <= 1'b0;
      req_s2   <= 1'b0;
      req_s3   <= 1'b0;
      ack_tgl  <= 1'b0;
      dst_data <= '0;
      dst_upd  <= 1'b0;
    end else begin
      req_s1  <= req_tgl;
      req_s2  <= req_s1;
      req_s3  <= req_s2;
      dst_upd <= 1'b0;
      if (req_s2 != req_s3) begin
        dst_data <= hold;
        dst_upd  <= 1'b1;
        ack_tgl  <= req_s2;
      end
    end
  end
endmodule
