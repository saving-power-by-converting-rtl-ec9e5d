// tb_tp_top: end-to-end test of the top at its default parameters (32-bit,
// 4-stage pipeline, 6-tick cycle), run against a flip-flop model of the
// original pipeline.
// The reference clock runs free. The model steps at each rise of p1 (edge
// k) and new inputs are launched a little after it, as a flip-flop output
// changes after a clock edge. After p2 of every cycle
// dout must equal the model's last register; a word therefore takes exactly
// STAGES cycles from din to dout, one per cycle, as in the flip-flop
// original. The cycle must be 6 reference ticks.
// Mechanisms counted, each of which must happen: stalls (en low), p1 pulses
// suppressed by the conventional gate, p3 pulses suppressed by the
// latch-free gate, p2 pulses suppressed by the p3-latched p2 gate, p2
// pulses suppressed and passed by data-driven gating, and words that
// reached dout.
// The circuit with feedback (six positions: ring 0 -> 1 -> 2 -> 0, 2 -> 3,
// self-loop on 3, 3 -> 4, ring 4 <-> 5, input to 0 and 3) runs next to its
// own flip-flop model; all positions are compared after p2 of each cycle,
// and the steps in which every position matched are counted.
module tb_tp_top;
  localparam int W = 32;
  localparam int S = 4;
  logic ref_clk = 1'b0, rst_n, en;
  logic [W-1:0] din, dout;
  logic p1, p2, p3;
  logic [S:0] main_clk, p2_clk;
  logic [W-1:0] r [S+1];
  int checks = 0, failures = 0, cycles = 0;
  int n_stall = 0, n_p1_gated = 0, n_p3_gated = 0, n_m1_gated = 0;
  int n_ddcg_saved = 0, n_ddcg_pulsed = 0, n_words = 0;
  int last_p1 = -1, tick = 0;
  logic [W-1:0] net_din;
  logic [W-1:0] net_q [6];
  logic [5:0] net_main_clk, net_p2_clk;
  logic [W-1:0] ns [6];
  int n_net_steps = 0;
  bit started = 0;

  tp_top dut (
    .ref_clk, .rst_n, .en, .din, .dout, .p1, .p2, .p3, .main_clk, .p2_clk,
    .net_din, .net_q, .net_main_clk, .net_p2_clk);

  always #5 ref_clk = ~ref_clk;
  always @(posedge ref_clk) tick++;

  function automatic logic [W-1:0] f(int s, logic [W-1:0] x);
    logic [63:0] c;
    logic [W-1:0] y;
    c = 64'h9E37_79B9_7F4A_7C15 * 64'(s + 1);
    y = x + c[W-1:0];
    return {y[W-2:0], y[W-1]} ^ (y >> 3);
  endfunction

  // next state of the circuit with feedback: fanins folded in ascending
  // order as rotl1(acc) ^ q(u), then the position constant and the input
  function automatic logic [W-1:0] net_next(int v, logic [W-1:0] q [6], logic [W-1:0] x);
    logic [63:0] c;
    logic [W-1:0] acc;
    c = 64'h9E37_79B9_7F4A_7C15 * 64'(v + 1);
    acc = '0;
    case (v)
      0: acc = q[2];
      1: acc = q[0];
      2: acc = q[1];
      3: acc = {q[2][W-2:0], q[2][W-1]} ^ q[3];
      4: acc = {q[3][W-2:0], q[3][W-1]} ^ q[5];
      default: acc = q[4];
    endcase
    return acc + c[W-1:0] + ((v == 0 || v == 3) ? x : '0);
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // flip-flop model, one step per edge (rise of p1)
  always @(posedge p1) begin
    if (last_p1 >= 0) begin
      checks++;
      if (tick - last_p1 != 6) fail($sformatf("cycle of %0d ticks", tick - last_p1));
    end
    last_p1 = tick;
    if (!en) n_stall++;
    for (int i = S; i >= 1; i--) if (i >= 3 || en) r[i] = f(i, r[i-1]);
    if (en) r[0] = din;
    begin
      logic [W-1:0] t [6];
      for (int v = 0; v < 6; v++) t[v] = net_next(v, ns, net_din);
      ns = t;
    end
    started = 1;
    #2;
    // new inputs: bursts of stalls, slowly changing data
    en = (cycles % 41 > 33) ? 1'b0 : ($urandom_range(0, 5) != 0);
    if ($urandom_range(0, 1) != 0) din = $urandom;
    net_din = $urandom;
  end

  // gate observations in the middle of each phase pulse
  always @(posedge p1) begin
    #1;
    if (!main_clk[0]) n_p1_gated++;
  end
  always @(posedge p3) begin
    #1;
    if (!main_clk[1]) n_p3_gated++;
  end
  always @(posedge p2) begin
    #1;
    if (!p2_clk[1]) n_m1_gated++;
    if (p2_clk[3]) n_ddcg_pulsed++; else n_ddcg_saved++;
    #4;
    if (started) begin
      checks++;
      if (dout !== r[S]) fail($sformatf("cycle %0d: dout %h expected %h", cycles, dout, r[S]));
      else if (cycles >= S) n_words++;
      begin
        bit ok;
        ok = 1;
        for (int v = 0; v < 6; v++) begin
          checks++;
          if (net_q[v] !== ns[v]) begin
            ok = 0;
            fail($sformatf("cycle %0d: position %0d %h expected %h", cycles, v, net_q[v], ns[v]));
          end
        end
        if (ok) n_net_steps++;
      end
      cycles++;
    end
  end

  initial begin
    rst_n = 0; en = 1; din = 32'h1234_5678; net_din = 32'h0BAD_F00D;
    foreach (r[i]) r[i] = '0;
    foreach (ns[i]) ns[i] = '0;
    repeat (3) @(posedge ref_clk);
    #2 rst_n = 1;
    wait (cycles == 2000);
    if (n_stall == 0) fail("no stall");
    if (n_p1_gated == 0) fail("p1 gate never closed");
    if (n_p3_gated == 0) fail("p3 gate never closed");
    if (n_m1_gated == 0) fail("p2 gate with p3-latched enable never closed");
    if (n_ddcg_saved == 0) fail("data-driven gate never suppressed a pulse");
    if (n_ddcg_pulsed == 0) fail("data-driven gate never passed a pulse");
    if (n_words == 0) fail("no word reached dout");
    if (n_net_steps == 0) fail("circuit with feedback never matched its model");
    $display("cycles=%0d stalls=%0d p1_gated=%0d p3_gated=%0d p2_m1_gated=%0d ddcg_saved=%0d ddcg_pulsed=%0d words=%0d net_steps=%0d",
             cycles, n_stall, n_p1_gated, n_p3_gated, n_m1_gated, n_ddcg_saved, n_ddcg_pulsed, n_words, n_net_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
