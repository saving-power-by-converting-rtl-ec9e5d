// tb_three_phase_clkgen: checks the phase generator at its default timing
// (slot of 2 ticks, 1 tick high) and at slot 4 / 3 ticks high. Per cycle
// each phase must be high for HIGH ticks, no two phases may be high at
// once, the pulses must come in the order p2, p3 (first after reset), then
// p1, p2, p3 in every cycle, and the cycle must be 3*SLOT ticks long.
module tb_three_phase_clkgen;
  logic ref_clk = 0, rst_n;
  logic a1, a2, a3, b1, b2, b3;
  int checks = 0, failures = 0;

  three_phase_clkgen dut_a (.ref_clk(ref_clk), .rst_n(rst_n), .p1(a1), .p2(a2), .p3(a3));
  three_phase_clkgen #(.SLOT(4), .HIGH(3)) dut_b (.ref_clk(ref_clk), .rst_n(rst_n), .p1(b1), .p2(b2), .p3(b3));

  always #5 ref_clk = ~ref_clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected pattern: tick t (0-based after reset release) of slot/high
  function automatic logic [2:0] expect_ph(int t, int slot, int high);
    int c, s;
    c = (t + slot + 1) % (3 * slot);
    s = c / slot;
    return (c % slot >= slot - high) ? 3'(1 << s) : 3'b000;
  endfunction

  task automatic chk(logic [2:0] got, logic [2:0] want, string which, int t);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s tick %0d: {p3,p2,p1}=%b expected %b", which, t, got, want);
    end
    checks++;
    if ($countones(got) > 1) begin
      failures++;
      $display("FAIL %s tick %0d: overlapping phases %b", which, t, got);
    end
  endtask

  initial begin
    int first_a, rises_a;
    rst_n = 0;
    repeat (3) @(posedge ref_clk);
    #1;
    chk({a3, a2, a1}, 3'b000, "a in reset", -1);
    rst_n = 1;
    first_a = -1; rises_a = 0;
    for (int t = 0; t < 120; t++) begin
      @(posedge ref_clk); #1;
      chk({a3, a2, a1}, expect_ph(t, 2, 1), "a", t);
      chk({b3, b2, b1}, expect_ph(t, 4, 3), "b", t);
      if (first_a < 0 && (a1 | a2 | a3)) begin
        first_a = t;
        checks++;
        if (!a2) begin failures++; $display("FAIL first pulse is not p2"); end
      end
      if (a1) rises_a++;
    end
    checks++;
    if (rises_a != 20) begin
      failures++;
      $display("FAIL %0d p1 pulses in 120 ticks, expected 20 (6-tick cycle)", rises_a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
