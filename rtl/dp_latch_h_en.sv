// Enabled datapath latch, W bits wide, transparent while the clock is high.
//
// One of the preplaced datapath components of the Scale clusters
// (dpLatch_h_en #(32) with ports clk, d_n, en_p, q_np). The datapaths use
// latches so that logic can borrow time across clock phases. The enable is
// captured while the clock is low and gates the clock of the whole latch
// column, as the chip's per-component clock gating does: when en_p was high
// at the rising edge, q_np follows d_n for the high phase and holds through
// the low phase; otherwise q_np holds. The two latches below are intended
// (the linter reports them as latches).
module dp_latch_h_en #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic [W-1:0] d_n,
  input  logic         en_p,
  output logic [W-1:0] q_np
);
  logic en_l;

  // clock-gate enable latch, transparent while clk is low
  always_latch
    if (!clk) en_l = en_p;

  // the data latch, transparent while the gated clock is high
  always_latch
    if (clk && en_l) q_np = d_n;
endmodule
