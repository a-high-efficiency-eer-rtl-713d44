// dpwm: hybrid counter / delay-ring digital pulse-width modulator.
//
// An N-bit DPWM (N = NC + ND = 9) divides each switching period into 2^N
// slots. The upper NC bits are counted by an NC-bit counter at the system
// rate (2^NC * fs = 32 MHz); the lower ND bits come from a ring of 2^ND
// delay units that splits every system-clock period into 2^ND equal parts.
// Here the ring is a one-hot token passed along 2^ND flip-flops Q0..Q15 on
// `clk`, the slot tick (2^N * fs = 512 MHz); the last unit, Q15, opens each
// system-clock period and advances the counter. A tap encoder turns the
// token position into the ND-bit slot number s (Q15 -> 0, Qk -> k+1).
//
// An S-R flip-flop makes the switching pulse: Set fires when the counter is
// 0 and Q15 holds the token (slot 0 of the period); Reset fires when the
// counter equals d[8:4] and the tap encoder equals d[3:0]. G1 is the
// flip-flop output and G2 its complement, so G1 is high for exactly d slots,
// giving a duty of d/512 (d = 1..511 -> 0.2%..99.8%). With d = 0 the reset
// wins and G1 stays low.
//
// Interface and timing: `d` is captured into a shadow register at slot 0 of
// each period, so a command that changes mid-period takes effect at the next
// period. `period_start` pulses at slot 0, `sys_tick` at the start of every
// system-clock period (every 2^ND slots), and `sample_strobe` at slot
// SAMPLE_SLOT, where the controller samples the output voltage. The default
// SAMPLE_SLOT = 256 samples mid-period, so the command computed from it is
// applied half a period later, matching the Ts/2 loop delay assumed in the
// compensator design. Reset puts the token on Q15 and the counter at 0; G1
// starts low and rises at the first slot 0 after reset.
//
// From the design description: the 5-bit counter / 4-bit ring split, the
// 32 MHz system rate, Set = (counter = 0) AND Q15, Reset = both comparator
// matches, the S-R output with complementary G1/G2 and the 1..511 range.
// This design's own choices: the ring stages are flip-flops stepped by a
// slot-rate clock (a hard macro delay line would replace them in silicon),
// the tap encoding, the shadow register and the sample slot.
module dpwm
#(
  parameter int unsigned NC          = 5,    // counter bits
  parameter int unsigned ND          = 4,    // delay-ring bits
  parameter int unsigned SAMPLE_SLOT = 256   // slot of sample_strobe
) (
  input  logic              clk,            // slot tick, 2^(NC+ND) * fs
  input  logic              rst_n,
  input  logic [NC+ND-1:0]  d,
  output logic              g1,
  output logic              g2,
  output logic              period_start,
  output logic              sys_tick,
  output logic              sample_strobe
);
  localparam int unsigned NR = 1 << ND;      // ring length

  logic [NR-1:0]    ring;      // one-hot token, bit k = Qk
  logic [NC-1:0]    cnt;
  logic [ND-1:0]    slot;      // tap encoder output
  logic [NC+ND-1:0] d_hold;
  logic             set_p, reset_p;
  logic [NC+ND-1:0] d_active;

  // tap encoder: Q15 -> 0, Qk -> k+1
  always_comb begin
    slot = '0;
    for (int k = 0; k < NR; k++)
      if (ring[k]) slot = ND'(k + 1);
  end

  assign set_p   = (cnt == '0) && ring[NR-1];
  assign reset_p = (cnt == d_active[NC+ND-1:ND]) && (slot == d_active[ND-1:0]);

  // the command in force: at slot 0 the new one is taken directly
  assign d_active = set_p ? d : d_hold;

  assign period_start  = set_p;
  assign sys_tick      = ring[NR-1];
  assign sample_strobe = ({cnt, slot} == (NC+ND)'(SAMPLE_SLOT));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ring   <= NR'(1) << (NR-1);
      cnt    <= '0;
      d_hold <= '0;
      g1     <= 1'b0;
    end else begin
      ring <= {ring[NR-2:0], ring[NR-1]};
      if (ring[NR-2]) cnt <= cnt + 1'b1;   // Q15 comes next: new count
      if (set_p) d_hold <= d;
      // S-R flip-flop, reset dominant
      if (reset_p)    g1 <= 1'b0;
      else if (set_p) g1 <= 1'b1;
    end
  end

  assign g2 = ~g1;
endmodule
