// tp_latch: a bank of WIDTH level-sensitive latches with asynchronous reset.
//
// The latch is transparent while gate g is high (q follows d) and holds its
// value while g is low. rst_n low loads RESET_VALUE (zero by default) at any
// time. In the
// 3-phase design g is one of the phases p1, p2, p3, or a gated copy of one.
// Latches are the storage element of the whole design: the latch inferences
// reported by synthesis are intended. The reset is this design's choice; it
// gives the latch design the same reset state as the flip-flop design it
// replaces.
module tp_latch #(
  parameter int unsigned     WIDTH       = 32,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             rst_n,
  input  logic             g,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_latch begin
    if (!rst_n)  q = RESET_VALUE;
    else if (g)  q = d;
  end

endmodule
