// tb_cg_orig: checks the conventional clock gate. The enable is changed at
// random times, also while clk is high. The model records en at each rising
// clk edge and expects enclk = clk & recorded value at every step, so an
// enable change during a high clk must never shorten or create a pulse.
module tb_cg_orig;
  logic clk, en, enclk;
  logic held;
  int checks = 0, failures = 0;
  int pulses = 0, gated = 0;

  cg_orig dut (.clk(clk), .en(en), .enclk(enclk));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; en = 0; held = 0;
    #5;
    for (int c = 0; c < 400; c++) begin
      // clk low for 4 steps, high for 4 steps; en may change in any step
      for (int t = 0; t < 8; t++) begin
        if (t == 4) begin clk = 1; held = en; if (held) pulses++; else gated++; end
        if (t == 0) clk = 0;
        if ($urandom_range(0, 2) == 0) en = ~en;
        #1;
        checks++;
        if (enclk !== (clk & held)) begin
          failures++;
          $display("FAIL cycle %0d step %0d: clk=%b en=%b enclk=%b", c, t, clk, en, enclk);
        end
        #1;
      end
    end
    if (pulses == 0 || gated == 0) begin
      failures++;
      $display("FAIL: pulses=%0d gated=%0d, both must occur", pulses, gated);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
