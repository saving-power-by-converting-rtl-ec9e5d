// tb_cg_m2: checks the latch-free clock gate against enclk = clk & en for
// all four input combinations and a random sequence.
module tb_cg_m2;
  logic clk, en, enclk;
  int checks = 0, failures = 0;

  cg_m2 dut (.clk(clk), .en(en), .enclk(enclk));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      if (i < 4) {clk, en} = 2'(i);
      else {clk, en} = 2'($urandom);
      #1;
      checks++;
      if (enclk !== (clk && en)) begin
        failures++;
        $display("FAIL clk=%b en=%b enclk=%b", clk, en, enclk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
