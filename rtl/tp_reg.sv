// tp_reg: one flip-flop position of the original design, converted to
// 3-phase latches with its clock gating.
//
// G and K are the position's assignment (see tp_pkg):
//   G=0, K=1 : a single latch on p1.
//   G=1, K=1 : a p1 latch followed by an inserted p2 latch.
//   G=1, K=0 : a p3 latch followed by an inserted p2 latch.
//   G=0, K=0 : not allowed (a p3 latch always has a p2 partner).
// The main (p1 or p3) latch takes d and drives q_main. For G=1 the p2 latch
// takes d2 and drives q; logic may sit between q_main and d2 (the inserted
// latch can be moved into the following logic), else tie d2 to q_main. For
// G=0 q equals q_main and d2 is not used.
//
// Clock gating. With EN_GATED the position only loads when en is high, like
// a flip-flop behind a gated clock. The main latch then gets a conventional
// gate (cg_orig) when en starts at a latch of its own phase (EN_SRC_PHASE),
// and the latch-free gate (cg_m2) otherwise. The p2 latch gets the p2 gate
// with the p3-clocked enable latch (cg_m1), driven by the same en. Without
// EN_GATED the main latch is clocked by its phase directly and, if P2_DDCG
// is set, the p2 latch by data-driven gating (ddcg).
//
// Timing, with edge k of the original clock: a p1 latch loads during p1 of
// cycle k, a p3 latch during p3 of cycle k-1 (it closes at the end of that
// cycle, which is edge k) and its p2 partner during p2 of cycle k. en must be
// valid from before p3 of cycle k-1 closes until p1 of cycle k closes, the
// window in which a primary input launched by p1 is stable.
// Reset clears the main latch; the p2 latch resets to P2_RESET, which must be
// the value the logic between q_main and d2 makes of zero, so that a stall
// right after reset holds the same state as the flip-flop original. main_clk and
// p2_clk are the (gated) clocks actually applied, for observation.
// Lint may report circular logic through gclk or q: with data-driven gating,
// or when the position lies on a feedback loop of the circuit, the path
// passes latches that are never open at the same time (see ddcg).
// The assignment, gate choice and p2 gating follow the conversion described
// for this design; the reset and the observation ports are its own.
module tp_reg #(
  parameter int unsigned    WIDTH        = 32,
  parameter bit             G            = 1'b0,
  parameter bit             K            = 1'b1,
  parameter bit             EN_GATED     = 1'b1,
  parameter tp_pkg::phase_e EN_SRC_PHASE = tp_pkg::PH_P1,
  parameter bit             P2_DDCG      = 1'b1,
  parameter logic [WIDTH-1:0] P2_RESET   = '0
) (
  input  logic             p1,
  input  logic             p2,
  input  logic             p3,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q_main,
  input  logic [WIDTH-1:0] d2,
  output logic [WIDTH-1:0] q,
  output logic             main_clk,
  output logic             p2_clk
);

  import tp_pkg::*;

  localparam phase_e MAIN_PHASE = K ? PH_P1 : PH_P3;

  logic ph_main;
  assign ph_main = K ? p1 : p3;

  // ---- main (p1 or p3) latch ----------------------------------------------
  if (EN_GATED) begin : g_main_gated
    if (EN_SRC_PHASE == MAIN_PHASE) begin : g_orig
      cg_orig u_cg (.clk(ph_main), .en(en), .enclk(main_clk));
    end else begin : g_m2
      cg_m2 u_cg (.clk(ph_main), .en(en), .enclk(main_clk));
    end
  end else begin : g_main_free
    assign main_clk = ph_main;
  end

  tp_latch #(.WIDTH(WIDTH)) u_main (.rst_n(rst_n), .g(main_clk), .d(d), .q(q_main));

  // ---- inserted p2 latch ----------------------------------------------------
  if (G) begin : g_pair
    if (EN_GATED) begin : g_p2_m1
      cg_m1 u_cg (.en(en), .p3(p3), .p2(p2), .enclk(p2_clk));
    end else if (P2_DDCG) begin : g_p2_ddcg
      localparam int unsigned NG = (WIDTH + MAX_CG_FANOUT - 1) / MAX_CG_FANOUT;
      logic [NG-1:0] gclk;
      logic [NG-1:0] changed;
      ddcg #(.WIDTH(WIDTH)) u_ddcg (.clk(p2), .d(d2), .q(q), .gclk(gclk), .changed(changed));
      for (genvar j = 0; j < NG; j++) begin : g_bank
        localparam int unsigned LO = j * MAX_CG_FANOUT;
        localparam int unsigned HI = (LO + MAX_CG_FANOUT > WIDTH) ? WIDTH : LO + MAX_CG_FANOUT;
        tp_latch #(.WIDTH(HI - LO), .RESET_VALUE(P2_RESET[HI-1:LO])) u_p2 (.rst_n(rst_n), .g(gclk[j]), .d(d2[HI-1:LO]), .q(q[HI-1:LO]));
      end
      assign p2_clk = |gclk;
    end else begin : g_p2_free
      assign p2_clk = p2;
    end
    if (EN_GATED || !P2_DDCG) begin : g_p2_latch
      tp_latch #(.WIDTH(WIDTH), .RESET_VALUE(P2_RESET)) u_p2 (.rst_n(rst_n), .g(p2_clk), .d(d2), .q(q));
    end
  end else begin : g_single
    assign q      = q_main;
    assign p2_clk = 1'b0;
  end

  // ---- legality of the assignment -----------------------------------------
  if (!G && !K) begin : g_bad_assign
    $error("tp_reg: a p3 latch (K=0) must be in the back-to-back group (G=1)");
  end
  if (EN_GATED && G && EN_SRC_PHASE == PH_P3) begin : g_bad_en
    $error("tp_reg: an enable starting at a p3 latch cannot drive a p2 gate");
  end

endmodule
