// cg_orig: conventional latch-based clock gate (integrated clock gating cell).
//
// A latch, transparent while clk is low (clk is inverted in front of it),
// samples en; its output enlt is ANDed with clk. enlt cannot change while clk
// is high, so enclk carries whole clk pulses only, without glitches:
//   enclk = clk & (en sampled when clk last rose).
// The cell is the conventional one. In the 3-phase design it gates p1 latches
// whose enable starts at a p1 latch (or a primary input, which is treated as
// launched by p1), and it is the gate of each data-driven group in ddcg.
// The latch is intended. Inside ddcg, lint reports a combinational loop
// through enlt (q -> compare -> enlt -> gated clock -> latch -> q). It stands
// because the loop passes two latches that are never open together: enlt is
// open only while clk is low, the gated latch only while enclk is high.
module cg_orig (
  input  logic clk,
  input  logic en,
  output logic enclk
);

  logic clk_n;
  logic enlt;

  assign clk_n = ~clk;

  always_latch begin
    if (clk_n) enlt = en;
  end

  assign enclk = clk & enlt;

endmodule
