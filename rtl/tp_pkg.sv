// tp_pkg: types and constants shared by the 3-phase latch-based design.
//
// A flip-flop (FF) design is converted to latches clocked by three
// non-overlapping phases p1, p2, p3, which close in that order inside one
// cycle (p3 closes at the end of the cycle). Every original FF position is
// assigned two bits:
//   G = 0 : single latch on p1 (allowed only if no fanout FF is also on p1)
//   G = 1 : back-to-back pair, a p1 or p3 latch followed by an inserted p2 latch
//   K = 1 : the main latch is on p1, K = 0 : it is on p3
// The rules (K=0 forces G=1; two p1 latches in a row force G=1 on the first)
// are those of the conversion; assign_linear() gives a minimal assignment
// for a linear pipeline, which alternates p1 singles and p3+p2 pairs.
// For a general flip-flop graph, ilp_cost() and ilp_min_cost() evaluate the
// latch-minimising integer program by exhaustive search over K (graphs of up
// to MAX_NODES flip-flops, at elaboration time): fanout[u][v] is set when
// flip-flop v is reachable from u through combinational logic only, pi_fo[v]
// when a primary input reaches v. The cost is the number of G=1 flip-flops
// plus one for the primary inputs if they feed a p1 latch (they then need an
// inserted p2 latch of their own). ilp_min_k() returns a K that reaches the
// minimum; tp_netlist builds its latches from it. example_fanout() is this
// design's own example graph with feedback loops.
// MAX_CG_FANOUT (32) is the largest latch group one data-driven clock gate
// drives, as in the conversion flow. The stage functions are this design's
// own example datapath; any combinational logic could take their place.
package tp_pkg;

  typedef enum logic [1:0] {
    PH_P1 = 2'd1,
    PH_P2 = 2'd2,
    PH_P3 = 2'd3
  } phase_e;

  // One converted register position.
  typedef struct packed {
    logic g;  // 1: back-to-back latch pair, 0: single latch
    logic k;  // 1: main latch on p1, 0: main latch on p3
  } reg_assign_t;

  localparam int unsigned MAX_CG_FANOUT = 32;

  // Minimal assignment for position pos of a linear chain of npos flip-flops
  // whose first position is fed by primary inputs (treated as launched by
  // p1). Counted from the output end: the last position is a single p1
  // latch, the one before it a p3 latch + p2 latch, and so on. A chain with
  // an odd number of positions thus starts with a p1 latch (and its inputs
  // need an inserted p2 latch), an even one with a p3 pair (and needs none).
  function automatic reg_assign_t assign_linear(int unsigned pos, int unsigned npos);
    reg_assign_t a;
    a.k = ((npos - 1 - pos) % 2 == 0);
    a.g = !a.k;
    return a;
  endfunction

  // Number of latch banks of a linear pipeline with npos register positions:
  // one per position plus one inserted p2 bank for every other position (an
  // input p2 latch, needed when npos is odd, not counted).
  function automatic int unsigned linear_latch_banks(int unsigned npos);
    return npos + npos / 2;
  endfunction

  localparam int unsigned MAX_NODES = 16;
  typedef logic [MAX_NODES-1:0]                 node_set_t;
  typedef logic [MAX_NODES-1:0][MAX_NODES-1:0]  fanout_t;

  // G implied by K: a p3 latch (K=0) is always in the back-to-back group;
  // a p1 latch is too if any of its fanout flip-flops is a p1 latch.
  function automatic node_set_t g_from_k(int unsigned n, fanout_t fanout, node_set_t k);
    node_set_t g = '0;
    for (int unsigned u = 0; u < n; u++)
      g[u] = !k[u] || ((fanout[u] & k) != '0);
    return g;
  endfunction

  // Objective of the integer program for one K assignment.
  function automatic int unsigned ilp_cost(int unsigned n, fanout_t fanout, node_set_t pi_fo,
                                           node_set_t k);
    node_set_t g = g_from_k(n, fanout, k);
    int unsigned cost = 0;
    for (int unsigned u = 0; u < n; u++) cost += 32'(g[u]);
    return cost + 32'((pi_fo & k) != '0);
  endfunction

  // Minimum of the objective over all K (exhaustive; n <= MAX_NODES).
  function automatic int unsigned ilp_min_cost(int unsigned n, fanout_t fanout, node_set_t pi_fo);
    int unsigned best = 2 * MAX_NODES;
    for (longint unsigned kv = 0; kv < (64'd1 << n); kv++) begin
      int unsigned c = ilp_cost(n, fanout, pi_fo, node_set_t'(kv));
      if (c < best) best = c;
    end
    return best;
  endfunction

  // A K vector that reaches ilp_min_cost(): the first one found, counting K
  // as a binary number from all-p3 (0) upward.
  function automatic node_set_t ilp_min_k(int unsigned n, fanout_t fanout, node_set_t pi_fo);
    int unsigned best = 2 * MAX_NODES;
    node_set_t   kbest = '0;
    for (longint unsigned kv = 0; kv < (64'd1 << n); kv++) begin
      int unsigned c = ilp_cost(n, fanout, pi_fo, node_set_t'(kv));
      if (c < best) begin
        best  = c;
        kbest = node_set_t'(kv);
      end
    end
    return kbest;
  endfunction

  // Example flip-flop graph with feedback (this design's own, used as the
  // default of tp_netlist): a ring 0 -> 1 -> 2 -> 0, an accumulator 3 that
  // feeds itself and is fed by 2, a pair 4 <-> 5 fed by 3; the primary
  // inputs reach 0 and 3.
  function automatic fanout_t example_fanout();
    fanout_t f = '0;
    f[0][1] = 1'b1;  f[1][2] = 1'b1;  f[2][0] = 1'b1;
    f[2][3] = 1'b1;  f[3][3] = 1'b1;
    f[3][4] = 1'b1;  f[4][5] = 1'b1;  f[5][4] = 1'b1;
    return f;
  endfunction
  localparam int unsigned EXAMPLE_NODES = 6;
  localparam node_set_t   EXAMPLE_PI_FO = node_set_t'(16'b00_1001);

  // Fanout matrix of a linear chain of n flip-flops: u feeds u+1.
  function automatic fanout_t chain_fanout(int unsigned n);
    fanout_t f = '0;
    for (int unsigned u = 0; u + 1 < n; u++) f[u][u+1] = 1'b1;
    return f;
  endfunction

  // K vector of assign_linear() for a chain of n flip-flops.
  function automatic node_set_t linear_k(int unsigned n);
    node_set_t k = '0;
    for (int unsigned u = 0; u < n; u++) k[u] = assign_linear(u, n).k;
    return k;
  endfunction

  // Per-stage constant of the example datapath (golden-ratio multiples).
  function automatic logic [63:0] stage_const(int unsigned stage);
    return 64'h9E37_79B9_7F4A_7C15 * 64'(stage + 1);
  endfunction

endpackage
