// ddcg: multi-bit data-driven clock gating for a bank of p2 latches.
//
// Each latch of the bank compares its input d with its output q (one XOR per
// bit). The bank is cut into groups of at most GROUP latches (default 32, the
// largest fanout one gate may drive); the comparisons of a group are ORed, and
// the group receives a clock pulse only when at least one of its latches
// would change. Pulses that would rewrite unchanged data are suppressed,
// which saves clock power when the data seldom toggle.
//
// Interface: clk is the phase that clocks the bank (p2), gclk[j] clocks
// latches [j*GROUP +: GROUP]. The OR of each group passes through a
// conventional clock gate (cg_orig), whose latch holds the decision while clk
// is high; without it the decision would fall as soon as the opened latches
// copy d to q and cut the pulse short. That latch is this design's choice:
// the data-driven gate is described as XOR plus AND only.
// Lint sees a loop q -> diff -> gate latch -> gclk -> bank latch -> q; it is
// broken by the two latches, which are never transparent at the same time.
module ddcg #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned GROUP = tp_pkg::MAX_CG_FANOUT,
  localparam int unsigned NGROUPS = (WIDTH + GROUP - 1) / GROUP
) (
  input  logic               clk,
  input  logic [WIDTH-1:0]   d,
  input  logic [WIDTH-1:0]   q,
  output logic [NGROUPS-1:0] gclk,
  output logic [NGROUPS-1:0] changed
);

  logic [WIDTH-1:0] diff;

  assign diff = d ^ q;

  for (genvar j = 0; j < NGROUPS; j++) begin : g_grp
    localparam int unsigned LO = j * GROUP;
    localparam int unsigned HI = (LO + GROUP > WIDTH) ? WIDTH : LO + GROUP;
    assign changed[j] = |diff[HI-1:LO];
    cg_orig u_cg (.clk(clk), .en(changed[j]), .enclk(gclk[j]));
  end

  initial begin
    assert (GROUP >= 1 && GROUP <= tp_pkg::MAX_CG_FANOUT)
      else $error("ddcg: GROUP %0d outside 1..%0d", GROUP, tp_pkg::MAX_CG_FANOUT);
  end

endmodule
