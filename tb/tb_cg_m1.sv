// tb_cg_m1: checks the p2 clock gate with the p3-clocked enable latch. The
// testbench generates three non-overlapping phases (p1, p2, p3 in turn) and
// changes en at random times outside the high time of p3, also during p1
// and p2. Expected: each p2 pulse passes exactly when en was high as p3
// last closed; an enable change during p2 must not touch the pulse.
module tb_cg_m1;
  logic p1, p2, p3, en, enclk;
  logic en_at_p3;
  int checks = 0, failures = 0;
  int passed = 0, gated = 0;

  cg_m1 dut (.en(en), .p3(p3), .p2(p2), .enclk(enclk));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    if (!p3 && $urandom_range(0, 2) == 0) en = ~en;
    #1;
    checks++;
    if (enclk !== (p2 & en_at_p3)) begin
      failures++;
      $display("FAIL t=%0t p2=%b p3=%b en=%b enclk=%b expected %b",
               $time, p2, p3, en, enclk, p2 & en_at_p3);
    end
    #1;
  endtask

  initial begin
    p1 = 0; p2 = 0; p3 = 0; en = 0;
    // first p3 pulse defines the latched enable
    en = 1'($urandom); p3 = 1; #2; en_at_p3 = en; p3 = 0; #2;
    for (int c = 0; c < 400; c++) begin
      p1 = 1; step(); step(); p1 = 0; step();
      p2 = 1; if (en_at_p3) passed++; else gated++;
      step(); step(); p2 = 0; step();
      p3 = 1; #1; if ($urandom_range(0, 1) == 1) en = ~en; #1;
      en_at_p3 = en;
      step(); p3 = 0; step();
    end
    if (passed == 0 || gated == 0) begin
      failures++;
      $display("FAIL: passed=%0d gated=%0d, both must occur", passed, gated);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
