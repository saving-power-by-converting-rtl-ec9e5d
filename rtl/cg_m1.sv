// cg_m1: clock gate for p2 latches, with the enable latch clocked by p3.
//
// The conventional gate latches en on the inverted clock. For p2 latches the
// inverter is dropped and the latch is made transparent by p3 instead: en,
// which also gates the upstream p1/p3 latches of the gated p2 latch, is valid
// before p3 closes, so enlt is stable from the fall of p3 to its next rise,
// which covers the whole high time of p2:
//   enclk = p2 & (en as p3 closed in the previous cycle).
// Interface and function follow the modified cell; the latch is intended.
module cg_m1 (
  input  logic en,
  input  logic p3,
  input  logic p2,
  output logic enclk
);

  logic enlt;

  always_latch begin
    if (p3) enlt = en;
  end

  assign enclk = p2 & enlt;

endmodule
