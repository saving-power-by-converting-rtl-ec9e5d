// cg_m2: latch-free clock gate for p1 or p3 latches.
//
// When no start point of en is a latch on the same phase as clk, en is
// already stable for the whole high time of clk (all other phases are closed
// then), so the glitch-guarding latch of a conventional gate is redundant and
// only the AND remains:
//   enclk = clk & en.
// It may only be used where that condition holds; tp_reg checks it when it
// chooses between this cell and cg_orig.
module cg_m2 (
  input  logic clk,
  input  logic en,
  output logic enclk
);

  assign enclk = clk & en;

endmodule
