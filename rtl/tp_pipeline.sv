// tp_pipeline: a linear flip-flop pipeline converted to 3-phase latches.
//
// The original is a chain of STAGES+1 register positions (0..STAGES) with a
// combinational stage s between positions s-1 and s. Following the minimal
// assignment for a linear pipeline (tp_pkg::assign_linear), the positions
// alternate between single p1 latches and p3 latch + inserted p2 latch
// pairs, counted from the output end so that the last position is always a
// single p1 latch. Only one extra latch bank is added for every other
// position: for the default 4 stages 1 | 3 2 | 1 | 3 2 | 1, seven banks
// instead of five flip-flops or ten master-slave latches. At elaboration the
// assignment is checked against the exhaustive minimum of the latch-
// minimising program (chains of up to 12 positions). Throughput and latency
// equal the original: one word per cycle, STAGES cycles from din to dout.
//
// Retiming: stage s is fb(fa_s(x)), fa_s(x) = x + C_s and
// fb(x) = rotate_left(x,1) ^ (x >> 3), with C_s = tp_pkg::stage_const(s).
// With RETIME set, the p2 latch of a pair sits between fa and fb of the
// following stage, splitting that stage in two, as retiming of the inserted
// latches would; without it the p2 latch follows its p3 latch directly. The
// function is the same either way; a moved p2 latch resets to fa(0), the
// value its logic makes of the zero reset state. The datapath is this
// design's own example.
//
// Primary inputs: en and din are treated as launched by p1, like the output
// of a p1 latch. If position 0 is a p1 latch too (odd number of positions,
// as by default) and PI_LATCH is set, an inserted p2 latch sits between din
// and position 0, exactly as between two p1 positions. The environment may
// then change en and din right after p1 rises, as a flip-flop's output
// changes right after a clock edge, and keep them until the next rise of p1;
// a value launched at edge k-1 is taken at edge k. If position 0 is a p3
// pair (even number of positions) no input latch is needed and the same
// rule holds. With PI_LATCH clear and position 0 on p1 (the bare chain of
// the default, 1 | 3 2 | 1 | 3 2 | 1) din must instead change only while p1
// is low and stay stable from before p3 rises until p1 falls next cycle.
//
// Stall and clock gating: positions 0..GATED_POSITIONS-1 load only while en
// is high (a stall holds them, as a gated-clock flip-flop would); the others
// load every cycle, and their p2 latches use data-driven clock gating. The
// input p2 latch is not gated. dout comes from a p1 latch and is valid after
// p1 of each cycle. main_clk and p2_clk show the gated clock each position
// actually received.
module tp_pipeline #(
  parameter int unsigned WIDTH           = 32,
  parameter int unsigned STAGES          = 4,
  parameter int unsigned GATED_POSITIONS = 3,
  parameter bit          RETIME          = 1'b1,
  parameter bit          PI_LATCH        = 1'b1
) (
  input  logic              p1,
  input  logic              p2,
  input  logic              p3,
  input  logic              rst_n,
  input  logic              en,
  input  logic [WIDTH-1:0]  din,
  output logic [WIDTH-1:0]  dout,
  output logic [STAGES:0]   main_clk,
  output logic [STAGES:0]   p2_clk
);

  import tp_pkg::*;

  // the first position is a p1 latch (odd number of positions): the primary
  // inputs then need their own inserted p2 latch
  localparam bit          FIRST_P1        = assign_linear(0, STAGES + 1).k;
  localparam bit          HAS_PI_LATCH    = PI_LATCH && FIRST_P1;
  localparam int unsigned NUM_LATCH_BANKS = linear_latch_banks(STAGES + 1) + 32'(HAS_PI_LATCH);

  function automatic logic [WIDTH-1:0] fa(int unsigned s, logic [WIDTH-1:0] x);
    return x + WIDTH'(stage_const(s));
  endfunction

  function automatic logic [WIDTH-1:0] fb(logic [WIDTH-1:0] x);
    return {x[WIDTH-2:0], x[WIDTH-1]} ^ (x >> 3);
  endfunction

  logic [WIDTH-1:0] d      [STAGES+1];
  logic [WIDTH-1:0] q_main [STAGES+1];
  logic [WIDTH-1:0] d2     [STAGES+1];
  logic [WIDTH-1:0] q      [STAGES+1];
  logic [WIDTH-1:0] din_l;

  // inserted p2 latch of the primary input (launched by p1, feeds a p1 latch)
  if (HAS_PI_LATCH) begin : g_pi_latch
    tp_latch #(.WIDTH(WIDTH)) u_pi (.rst_n(rst_n), .g(p2), .d(din), .q(din_l));
  end else begin : g_pi_direct
    assign din_l = din;
  end

  for (genvar i = 0; i <= STAGES; i++) begin : g_pos
    localparam reg_assign_t A = assign_linear(i, STAGES + 1);
    // the p2 latch of this position is moved into the next stage's logic
    localparam bit SPLIT = A.g && RETIME && (i < STAGES);

    if (i == 0) begin : g_in
      assign d[i] = din_l;
    end else begin : g_logic
      localparam reg_assign_t AP = assign_linear(i - 1, STAGES + 1);
      if (AP.g && RETIME) begin : g_second_half
        assign d[i] = fb(q[i-1]);
      end else begin : g_whole
        assign d[i] = fb(fa(i, q[i-1]));
      end
    end

    if (SPLIT) begin : g_first_half
      assign d2[i] = fa(i + 1, q_main[i]);
    end else begin : g_direct
      assign d2[i] = q_main[i];
    end

    tp_reg #(
      .WIDTH       (WIDTH),
      .G           (A.g),
      .K           (A.k),
      .EN_GATED    (i < GATED_POSITIONS),
      .EN_SRC_PHASE(PH_P1),
      .P2_DDCG     (1'b1),
      .P2_RESET    (SPLIT ? fa(i + 1, '0) : '0)
    ) u_reg (
      .p1      (p1),
      .p2      (p2),
      .p3      (p3),
      .rst_n   (rst_n),
      .en      (en),
      .d       (d[i]),
      .q_main  (q_main[i]),
      .d2      (d2[i]),
      .q       (q[i]),
      .main_clk(main_clk[i]),
      .p2_clk  (p2_clk[i])
    );
  end

  assign dout = q[STAGES];

  // The alternating assignment must reach the minimum of the latch-minimising
  // program (checked at elaboration for chains the exhaustive search covers).
  if (STAGES + 1 <= 12) begin : g_ilp_check
    localparam fanout_t     CHAIN    = chain_fanout(STAGES + 1);
    localparam int unsigned LIN_COST = ilp_cost(STAGES + 1, CHAIN, node_set_t'(1), linear_k(STAGES + 1));
    localparam int unsigned MIN_COST = ilp_min_cost(STAGES + 1, CHAIN, node_set_t'(1));
    if (LIN_COST != MIN_COST) begin : g_not_minimal
      $error("tp_pipeline: latch assignment is not minimal");
    end
  end

  initial begin
    assert (WIDTH >= 2 && WIDTH <= 64) else $error("tp_pipeline: WIDTH must be 2..64");
    assert (STAGES >= 1) else $error("tp_pipeline: STAGES must be at least 1");
  end

endmodule
