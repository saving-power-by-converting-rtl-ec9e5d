// tb_tp_pipeline: runs two converted pipelines next to a flip-flop model of
// the original and compares them word by word.
//   u0: the defaults, 32 bits, 4 stages, positions 0..2 stall on en, the
//       p2 latches moved into the next stage, an input p2 latch
//       (latches 2 | 1 | 3 2 | 1 | 3 2 | 1); its inputs change just after
//       the rise of p1, as a flip-flop output after a clock edge
//   u1: 40 bits, 3 stages (latches 3 2 | 1 | 3 2 | 1: the first position
//       is a p3 pair, so no input latch), only position 0 stalls, p2
//       latches not moved; its free p2 bank is split into gated groups of 32
//       and 8 latches; its inputs change at the rise of p2
// The phases are made here: p1, p2, p3 per cycle, the first pulses after
// reset p2, p3. The model steps at each rise of p1 (edge k) with
// r[0] <= din, r[i] <= f_i(r[i-1]), each held when its position stalls,
// f_s(x) = fb(x + C_s) as retyped below. After p2 the p1 positions, an
// unmoved p2 latch and dout must equal the model, which fixes a latency of
// STAGES cycles. The number
// of latch banks must be positions + positions/2 (+1 for the input latch).
// Stalls, suppressed data-driven p2 pulses and gated main clocks are counted
// and each must occur.
module tb_tp_pipeline;
  logic p1, p2, p3, rst_n, en0, en1;
  logic [31:0] din0, dout0;
  logic [39:0] din1, dout1;
  logic [4:0] mclk0, pclk0;
  logic [3:0] mclk1, pclk1;
  logic [31:0] r0 [5];
  logic [39:0] r1 [4];
  int checks = 0, failures = 0;
  int stalls = 0, ddcg_saved = 0, main_gated = 0;

  tp_pipeline u0 (
    .p1, .p2, .p3, .rst_n, .en(en0), .din(din0), .dout(dout0), .main_clk(mclk0), .p2_clk(pclk0));
  tp_pipeline #(.WIDTH(40), .STAGES(3), .GATED_POSITIONS(1), .RETIME(0), .PI_LATCH(0)) u1 (
    .p1, .p2, .p3, .rst_n, .en(en1), .din(din1), .dout(dout1), .main_clk(mclk1), .p2_clk(pclk1));

  function automatic logic [63:0] c_of(int s);
    return 64'h9E37_79B9_7F4A_7C15 * 64'(s + 1);
  endfunction
  function automatic logic [31:0] f32(int s, logic [31:0] x);
    logic [31:0] y;
    y = x + c_of(s)[31:0];
    return {y[30:0], y[31]} ^ (y >> 3);
  endfunction
  function automatic logic [39:0] f40(int s, logic [39:0] x);
    logic [39:0] y;
    y = x + c_of(s)[39:0];
    return {y[38:0], y[39]} ^ (y >> 3);
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  // bursts of stalls; the data change in two of three cycles
  function automatic logic new_en(int c);
    return (c % 37 > 30) ? 1'b0 : ($urandom_range(0, 4) != 0);
  endfunction

  initial begin
    p1 = 0; p2 = 0; p3 = 0; rst_n = 0;
    din0 = '0; din1 = '0;
    foreach (r0[i]) r0[i] = '0;
    foreach (r1[i]) r1[i] = '0;
    en0 = new_en(1); en1 = new_en(2);
    din0 = $urandom; din1 = {8'($urandom), 32'($urandom)};
    checks++;
    if (u0.NUM_LATCH_BANKS != 8 || u1.NUM_LATCH_BANKS != 6) fail("latch bank count");
    #3 rst_n = 1; #1;
    p2 = 1; #2 p2 = 0; #1;
    p3 = 1; #2 p3 = 0; #1;
    for (int c = 0; c < 600; c++) begin
      // model: edge c
      if (!en0) stalls++;
      for (int i = 4; i >= 1; i--) if (i >= 3 || en0) r0[i] = f32(i, r0[i-1]);
      if (en0) r0[0] = din0;
      for (int i = 3; i >= 1; i--) r1[i] = f40(i, r1[i-1]);
      if (en1) r1[0] = din1;
      p1 = 1; #1;
      if (!mclk0[0]) main_gated++;
      // u0: new inputs launched right after the rise of p1
      en0 = new_en(c);
      if ($urandom_range(0, 2) != 0) din0 = $urandom;
      #1 p1 = 0; #1;
      p2 = 1; #1;
      if (pclk0[3] == 1'b0) ddcg_saved++;
      // u1: new inputs at the rise of p2
      en1 = new_en(c + 5);
      if ($urandom_range(0, 2) != 0) din1 = {8'($urandom), 32'($urandom)};
      #1 p2 = 0; #1;
      checks++; if (dout0 !== r0[4]) fail($sformatf("u0 dout %h expected %h", dout0, r0[4]));
      checks++; if (u0.q[0] !== r0[0]) fail("u0 position 0");
      checks++; if (u0.q[2] !== r0[2]) fail("u0 position 2");
      checks++; if (dout1 !== r1[3]) fail($sformatf("u1 dout %h expected %h", dout1, r1[3]));
      checks++; if (u1.q[1] !== r1[1]) fail("u1 position 1");
      checks++; if (u1.q[2] !== r1[2]) fail("u1 position 2 (p2 latch)");
      p3 = 1; #2 p3 = 0; #1;
    end
    if (stalls == 0) fail("no stall");
    if (ddcg_saved == 0) fail("data-driven gating never suppressed a p2 pulse");
    if (main_gated == 0) fail("main clock never gated");
    $display("stalls=%0d ddcg_saved=%0d main_gated=%0d", stalls, ddcg_saved, main_gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
