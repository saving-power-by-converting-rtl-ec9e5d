// tp_netlist: a flip-flop circuit with combinational feedback, converted to
// 3-phase latches by the latch-minimising integer program.
//
// Function. N flip-flop positions of WIDTH bits each are connected by a
// graph given as a parameter: FANOUT[u][v] is set when position u feeds the
// next-state logic of position v, and PI_FO[v] when the primary input din
// does. Position v computes
//   next(v) = C_v + (din if PI_FO[v]) + acc_v, where acc_v starts at 0 and,
//             for every fanin u in ascending order, becomes rotl1(acc_v) ^ q(u)
// (C_v = tp_pkg::stage_const(v)). The latch circuit holds, cycle by cycle,
// the state that the flip-flop circuit with the same next-state logic
// would hold.
//
// Working. At elaboration the K vector (main latch on p1 or on p3) is taken
// from tp_pkg::ilp_min_k(), an exhaustive search that reaches the minimum of
// the integer program; G follows from K as in the conversion rules (a p3
// latch, and a p1 latch feeding another p1 latch, get an inserted p2 latch).
// Each position is one tp_reg. A position with G=0 is a single p1 latch;
// its fanouts are then all p3 latches, which close after it at the end of
// the cycle. All other positions expose the output of their p2 latch. The
// primary input counts as launched by p1: if any p1 latch reads it, it
// passes a p2 latch of its own first. This gives a p1 latch only inputs that
// are stable while it is open, and every p3 latch inputs that settle before
// it opens, which is the non-overlap condition of the conversion.
// The inserted p2 latches are gated data-driven (ddcg), as the conversion
// does for p2 latches without a shared enable. Latches reset to 0, the reset
// state of the flip-flops.
//
// Interface. p1, p2, p3: the three phases; rst_n: asynchronous reset;
// din: primary input; node_q[v]: the output of position v; main_clk and
// p2_clk: the gated latch clocks per position (for power accounting);
// the localparams KVEC, GVEC, PI_LATCHED and NUM_LATCH_BANKS give the
// assignment chosen.
//
// Timing. din must change only just after p1 rises, as a flip-flop output
// after its clock edge; the value present at the rise of p1 in cycle k is
// consumed by the flip-flop edge k+1. Between the fall of p2 and the rise of
// p3 of cycle k every node_q[v] equals the flip-flop state after edge k.
//
// Following the document: the integer program, the rules for G and K,
// the treatment of primary inputs and data-driven gating of p2 latches.
// This design's own choices: the default graph (tp_pkg::example_fanout,
// six positions with a ring of three, a self-loop and a ring of two), the
// next-state functions, the width, the exhaustive search in place of an
// integer program solver (graphs up to 12 positions), and that no position
// has a clock enable.
//
// The latch rings of this module are reported by Verilator as circular logic
// (UNOPTFLAT): each ring is broken by latches that are never open at the
// same time, which the simulator cannot see; it only costs settle passes.
module tp_netlist #(
  parameter int unsigned       WIDTH = 32,
  parameter int unsigned       N     = tp_pkg::EXAMPLE_NODES,
  parameter tp_pkg::fanout_t   FANOUT = tp_pkg::example_fanout(),
  parameter tp_pkg::node_set_t PI_FO  = tp_pkg::EXAMPLE_PI_FO
) (
  input  logic             p1,
  input  logic             p2,
  input  logic             p3,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] node_q [N],
  output logic [N-1:0]     main_clk,
  output logic [N-1:0]     p2_clk
);

  import tp_pkg::*;

  localparam node_set_t KVEC       = ilp_min_k(N, FANOUT, PI_FO);
  localparam node_set_t GVEC       = g_from_k(N, FANOUT, KVEC);
  localparam bit        PI_LATCHED = (PI_FO & KVEC) != '0;
  localparam int unsigned NUM_LATCH_BANKS = ilp_cost(N, FANOUT, PI_FO, KVEC) + N;

  // ---- primary input ------------------------------------------------------
  logic [WIDTH-1:0] pi;
  if (PI_LATCHED) begin : g_pi_latch
    tp_latch #(.WIDTH(WIDTH)) u_pi (.rst_n(rst_n), .g(p2), .d(din), .q(pi));
  end else begin : g_pi_direct
    assign pi = din;
  end

  // ---- positions ----------------------------------------------------------
  logic [WIDTH-1:0] q [N];

  for (genvar v = 0; v < N; v++) begin : g_node
    logic [WIDTH-1:0] nxt;
    logic [WIDTH-1:0] qm;

    always_comb begin
      logic [WIDTH-1:0] acc;
      acc = '0;
      for (int unsigned u = 0; u < N; u++)
        if (FANOUT[u][v]) acc = {acc[WIDTH-2:0], acc[WIDTH-1]} ^ q[u];
      nxt = acc + WIDTH'(stage_const(v)) + (PI_FO[v] ? pi : '0);
    end

    tp_reg #(
      .WIDTH(WIDTH), .G(GVEC[v]), .K(KVEC[v]), .EN_GATED(1'b0), .P2_DDCG(1'b1)
    ) u_reg (
      .p1(p1), .p2(p2), .p3(p3), .rst_n(rst_n), .en(1'b1),
      .d(nxt), .q_main(qm), .d2(qm), .q(q[v]),
      .main_clk(main_clk[v]), .p2_clk(p2_clk[v]));

    assign node_q[v] = q[v];
  end

  // ---- elaboration checks -------------------------------------------------
  if (N < 1 || N > 12) begin : g_bad_n
    $error("tp_netlist: N must be 1 to 12 for the exhaustive search");
  end
  if (ilp_cost(N, FANOUT, PI_FO, KVEC) != ilp_min_cost(N, FANOUT, PI_FO)) begin : g_not_min
    $error("tp_netlist: assignment is not minimal");
  end

endmodule
