// tb_tp_netlist: runs two converted flip-flop graphs next to a flip-flop
// model of each and compares every position after each cycle.
//   u0: the defaults, 32 bits, six positions: a ring 0 -> 1 -> 2 -> 0, a
//       self-loop on 3 fed by 2, a ring 4 <-> 5 fed by 3, input to 0 and 3.
//       Its minimum is 4 inserted p2 latches and no input latch (a ring of
//       three needs two, a self-loop one, a ring of two one), 10 banks.
//   u1: 16 bits, positions 0, 1, 2 fed by the input and feeding 3, which
//       feeds itself. Minimum: 0..2 single p1 latches, 3 a p3 pair, plus the
//       input p2 latch: 2 inserted latches, 6 banks.
// The testbench checks the chosen K and G against the rules itself (a p3
// latch is a pair; a p1 latch feeding a p1 latch is a pair; the input is
// latched if it reaches a p1 latch) and the counts above. The phases are
// made here, p2 and p3 first after reset. The input changes just after p1
// rises. The model steps at each rise of p1 (flip-flop edge k): every
// position takes next(v) = C_v + (din if fed) + acc_v, acc_v folding the
// fanins in ascending order as rotl1(acc) ^ q(u). Between p2 and p3 every
// position must equal the model. Single p1 latches and pairs must both be
// present, and the data-driven gates of the pairs must pass p2 pulses (every
// position of these graphs changes each cycle, so none is suppressed here;
// suppression is tested with the pipeline).
module tb_tp_netlist;
  import tp_pkg::*;

  logic p1, p2, p3, rst_n;
  logic [31:0] din0;
  logic [15:0] din1;
  logic [31:0] q0 [6];
  logic [15:0] q1 [4];
  logic [5:0]  mclk0, pclk0;
  logic [3:0]  mclk1, pclk1;
  logic [31:0] s0 [6];
  logic [31:0] s1 [4];
  int checks = 0, failures = 0;
  int ddcg_pulses = 0, singles = 0, pairs = 0;

  function automatic fanout_t f1();
    fanout_t f = '0;
    f[0][3] = 1'b1;  f[1][3] = 1'b1;  f[2][3] = 1'b1;  f[3][3] = 1'b1;
    return f;
  endfunction
  localparam fanout_t   F0  = example_fanout();
  localparam node_set_t PI0 = node_set_t'(16'b00_1001);
  localparam fanout_t   F1  = f1();
  localparam node_set_t PI1 = node_set_t'(16'b0111);

  tp_netlist u0 (
    .p1, .p2, .p3, .rst_n, .din(din0), .node_q(q0), .main_clk(mclk0), .p2_clk(pclk0));
  tp_netlist #(.WIDTH(16), .N(4), .FANOUT(F1), .PI_FO(PI1)) u1 (
    .p1, .p2, .p3, .rst_n, .din(din1), .node_q(q1), .main_clk(mclk1), .p2_clk(pclk1));

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  // flip-flop model of one step, width w (16 or 32)
  function automatic logic [31:0] nxt(int w, int n, fanout_t f, node_set_t pi_fo,
                                      logic [31:0] s [], logic [31:0] din, int v);
    logic [31:0] mask, acc;
    mask = (w == 32) ? 32'hFFFF_FFFF : (32'd1 << w) - 1;
    acc = '0;
    for (int u = 0; u < n; u++)
      if (f[u][v]) acc = (((acc << 1) | (acc >> (w - 1))) & mask) ^ s[u];
    acc = acc + stage_const(v)[31:0] + (pi_fo[v] ? din : 32'd0);
    return acc & mask;
  endfunction

  task automatic check_assign(string name, int n, fanout_t f, node_set_t pi_fo,
                              node_set_t k, node_set_t g, bit pil, int g_count, bit pil_exp,
                              int banks, int banks_exp);
    int cnt = 0;
    for (int u = 0; u < n; u++) begin
      bit feeds_p1 = 0;
      for (int v = 0; v < n; v++) if (f[u][v] && k[v]) feeds_p1 = 1;
      checks++; if (!k[u] && !g[u]) fail($sformatf("%s: p3 latch %0d without p2 latch", name, u));
      checks++; if (k[u] && feeds_p1 && !g[u]) fail($sformatf("%s: p1 latch %0d feeds p1 alone", name, u));
      cnt += int'(g[u]);
      if (g[u]) pairs++; else singles++;
    end
    checks++; if (pil != ((pi_fo & k) != '0)) fail($sformatf("%s: input latch rule", name));
    checks++; if (cnt != g_count) fail($sformatf("%s: %0d p2 latches, expected %0d", name, cnt, g_count));
    checks++; if (pil != pil_exp) fail($sformatf("%s: input latch %0d, expected %0d", name, pil, pil_exp));
    checks++; if (banks != banks_exp) fail($sformatf("%s: %0d banks, expected %0d", name, banks, banks_exp));
  endtask

  initial begin
    logic [31:0] t0 [6];
    logic [31:0] t1 [4];
    logic [31:0] din0_prev, din1_prev;
    p1 = 0; p2 = 0; p3 = 0; rst_n = 0;
    foreach (s0[i]) s0[i] = '0;
    foreach (s1[i]) s1[i] = '0;
    din0 = $urandom; din1 = 16'($urandom);
    check_assign("u0", 6, F0, PI0, u0.KVEC, u0.GVEC, u0.PI_LATCHED, 4, 1'b0, u0.NUM_LATCH_BANKS, 10);
    check_assign("u1", 4, F1, PI1, u1.KVEC, u1.GVEC, u1.PI_LATCHED, 1, 1'b1, u1.NUM_LATCH_BANKS, 6);
    #3 rst_n = 1; #1;
    p2 = 1; #2 p2 = 0; #1;
    p3 = 1; #2 p3 = 0; #1;
    for (int c = 0; c < 800; c++) begin
      // model: edge c+1, consuming the input launched after the last edge
      din0_prev = din0; din1_prev = 32'(din1);
      for (int v = 0; v < 6; v++) t0[v] = nxt(32, 6, F0, PI0, s0, din0_prev, v);
      for (int v = 0; v < 4; v++) t1[v] = nxt(16, 4, F1, PI1, s1, din1_prev, v);
      s0 = t0; s1 = t1;
      p1 = 1; #1;
      // a new input in 10 of every 16 cycles, launched after the rise of p1
      if ((c % 16) < 10) begin
        din0 = $urandom; din1 = 16'($urandom);
      end
      #1 p1 = 0; #1;
      p2 = 1; #1;
      for (int v = 0; v < 6; v++) if (u0.GVEC[v] && pclk0[v]) ddcg_pulses++;
      #1 p2 = 0; #1;
      for (int v = 0; v < 6; v++) begin
        checks++;
        if (q0[v] !== s0[v]) fail($sformatf("u0 position %0d %h expected %h", v, q0[v], s0[v]));
      end
      for (int v = 0; v < 4; v++) begin
        checks++;
        if (32'(q1[v]) !== s1[v]) fail($sformatf("u1 position %0d %h expected %h", v, q1[v], s1[v]));
      end
      p3 = 1; #2 p3 = 0; #1;
    end
    checks++; if (singles == 0) fail("no single p1 latch");
    checks++; if (pairs == 0) fail("no latch pair");
    checks++; if (ddcg_pulses == 0) fail("data-driven gates never passed a p2 pulse");
    $display("singles=%0d pairs=%0d ddcg_pulses=%0d K0=%b G0=%b K1=%b G1=%b", singles, pairs,
             ddcg_pulses, u0.KVEC[5:0], u0.GVEC[5:0], u1.KVEC[3:0], u1.GVEC[3:0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
