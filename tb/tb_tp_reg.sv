// tb_tp_reg: checks five converted register positions against the flip-flop
// each replaces (r <= en ? d : r at every clock edge):
//   A: single p1 latch, enable from a p1 start point (conventional gate)
//   B: p3 + p2 pair, enable from p1 (latch-free p3 gate, p3-latched p2 gate)
//   C: p1 + p2 pair, enable from p2 (latch-free p1 gate, p3-latched p2 gate)
//   D: p3 + p2 pair without enable, p2 latch on data-driven gating
//   E: p1 + p2 pair without enable or gating
// The testbench makes the phases itself (p1, p2, p3 per cycle, first pulse
// p3 after reset), changes inputs at the rise of p2 and compares after p2.
// The p2 latch takes d2 = ~q_main, so it must hold ~r (and reset to ones). It also checks that
// gated main latches pulse exactly when en is high and that the p2 gates
// follow the enable of the previous edge, and counts stalls and
// data-driven pulses saved.
module tb_tp_reg;
  localparam int W = 24;
  logic p1, p2, p3, rst_n, en;
  logic [W-1:0] d  [5];
  logic [W-1:0] qm [5];
  logic [W-1:0] q  [5];
  logic [W-1:0] d2 [5];
  logic [4:0] mclk, pclk;
  logic [W-1:0] r [5];
  logic en_prev;
  int checks = 0, failures = 0;
  int stalls = 0, ddcg_saved = 0, ddcg_pulsed = 0;

  for (genvar i = 0; i < 5; i++) begin : g_d2
    assign d2[i] = ~qm[i];
  end

  tp_reg #(.WIDTH(W), .G(0), .K(1), .EN_GATED(1), .EN_SRC_PHASE(tp_pkg::PH_P1)) u_a (
    .p1, .p2, .p3, .rst_n, .en, .d(d[0]), .q_main(qm[0]), .d2(d2[0]), .q(q[0]), .main_clk(mclk[0]), .p2_clk(pclk[0]));
  tp_reg #(.WIDTH(W), .G(1), .K(0), .EN_GATED(1), .EN_SRC_PHASE(tp_pkg::PH_P1), .P2_RESET('1)) u_b (
    .p1, .p2, .p3, .rst_n, .en, .d(d[1]), .q_main(qm[1]), .d2(d2[1]), .q(q[1]), .main_clk(mclk[1]), .p2_clk(pclk[1]));
  tp_reg #(.WIDTH(W), .G(1), .K(1), .EN_GATED(1), .EN_SRC_PHASE(tp_pkg::PH_P2), .P2_RESET('1)) u_c (
    .p1, .p2, .p3, .rst_n, .en, .d(d[2]), .q_main(qm[2]), .d2(d2[2]), .q(q[2]), .main_clk(mclk[2]), .p2_clk(pclk[2]));
  tp_reg #(.WIDTH(W), .G(1), .K(0), .EN_GATED(0), .P2_DDCG(1), .P2_RESET('1)) u_d (
    .p1, .p2, .p3, .rst_n, .en, .d(d[3]), .q_main(qm[3]), .d2(d2[3]), .q(q[3]), .main_clk(mclk[3]), .p2_clk(pclk[3]));
  tp_reg #(.WIDTH(W), .G(1), .K(1), .EN_GATED(0), .P2_DDCG(0), .P2_RESET('1)) u_e (
    .p1, .p2, .p3, .rst_n, .en, .d(d[4]), .q_main(qm[4]), .d2(d2[4]), .q(q[4]), .main_clk(mclk[4]), .p2_clk(pclk[4]));

  localparam bit [4:0] GATED = 5'b00111;
  localparam bit [4:0] PAIR  = 5'b11110;

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

  task automatic new_inputs();
    en = ($urandom_range(0, 3) != 0);
    for (int i = 0; i < 5; i++) begin
      // position D sees low activity: its data seldom change
      if (i != 3 || $urandom_range(0, 3) == 0) d[i] = W'($urandom);
    end
  endtask

  initial begin
    p1 = 0; p2 = 0; p3 = 0; rst_n = 0;
    for (int i = 0; i < 5; i++) begin d[i] = '0; r[i] = '0; end
    new_inputs();
    en_prev = en;
    #3 rst_n = 1; #1;
    // first pulse after reset: p3 (end of cycle -1)
    p3 = 1; #1;
    for (int i = 0; i < 5; i++) if (GATED[i] && i == 1) begin
      checks++; if (mclk[i] !== en) fail("first p3 gate");
    end
    #1 p3 = 0; #1;
    for (int c = 0; c < 300; c++) begin
      // ---- p1: edge c of the flip-flop original
      for (int i = 0; i < 5; i++) if (!GATED[i] || en) r[i] = d[i];
      if (!en) stalls++;
      en_prev = en;
      p1 = 1; #1;
      for (int i = 0; i < 5; i++) begin
        logic want;
        want = (i == 1 || i == 3) ? 1'b0 : (GATED[i] ? en : 1'b1);
        checks++; if (mclk[i] !== want) fail($sformatf("main clock %0d during p1", i));
      end
      #1 p1 = 0; #1;
      // ---- p2
      p2 = 1;
      for (int i = 3; i < 4; i++) begin
        if (d2[i] != q[i]) ddcg_pulsed++; else ddcg_saved++;
      end
      #1;
      for (int i = 1; i < 5; i++) begin
        logic want;
        if (GATED[i]) want = en_prev;
        else if (i == 3) want = pclk[i];  // data-driven, checked through q
        else want = 1'b1;
        checks++; if (pclk[i] !== want) fail($sformatf("p2 clock %0d", i));
      end
      new_inputs();
      #1 p2 = 0; #1;
      for (int i = 0; i < 5; i++) begin
        logic [W-1:0] want;
        want = PAIR[i] ? ~r[i] : r[i];
        checks++;
        if (q[i] !== want) fail($sformatf("pos %0d q=%h expected %h", i, q[i], want));
      end
      // ---- p3: closes at the end of the cycle, edge c+1 for p3 latches
      p3 = 1; #1;
      for (int i = 0; i < 5; i++) begin
        logic want;
        want = (i == 1 || i == 3) ? (GATED[i] ? en : 1'b1) : 1'b0;
        checks++; if (mclk[i] !== want) fail($sformatf("main clock %0d during p3", i));
      end
      #1 p3 = 0; #1;
    end
    if (stalls == 0) fail("no stall occurred");
    if (ddcg_saved == 0 || ddcg_pulsed == 0) fail("data-driven gating never saved or never pulsed");
    $display("stalls=%0d ddcg_saved=%0d ddcg_pulsed=%0d", stalls, ddcg_saved, ddcg_pulsed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
