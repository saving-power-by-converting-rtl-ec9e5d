// tb_ddcg: checks multi-bit data-driven clock gating on a 40-bit bank, which
// the 32-latch group limit splits into groups of 32 and 8 latches. The bank
// itself is modelled here as two latch groups clocked by gclk. Between p2
// pulses the data change seldom and in random groups. Expected: a group gets
// a whole p2 pulse exactly when one of its latches differs from its input as
// p2 rises, and after every pulse the bank holds the input.
module tb_ddcg;
  localparam int W = 40;
  localparam int G = 32;
  logic clk;
  logic [W-1:0] d, q;
  logic [1:0] gclk, changed;
  logic [1:0] expect_pulse;
  int checks = 0, failures = 0;
  int pulses[2], skipped[2];

  ddcg #(.WIDTH(W)) dut (.clk(clk), .d(d), .q(q), .gclk(gclk), .changed(changed));

  // the gated latch bank
  always_latch if (gclk[0]) q[G-1:0] = d[G-1:0];
  always_latch if (gclk[1]) q[W-1:G] = d[W-1:G];

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_gclk(logic [1:0] want, string what);
    checks++;
    if (gclk !== want) begin
      failures++;
      $display("FAIL %s t=%0t: gclk=%b expected %b", what, $time, gclk, want);
    end
  endtask

  initial begin
    pulses = '{0, 0}; skipped = '{0, 0};
    clk = 0; d = '0;
    // initialise the bank through one ungated pulse worth of data
    force gclk = 2'b11; #1; release gclk; #1;
    for (int c = 0; c < 500; c++) begin
      // low phase: maybe change some bits
      case ($urandom_range(0, 5))
        0: d[G-1:0] = d[G-1:0] ^ (32'd1 << $urandom_range(0, 31));
        1: d[W-1:G] = d[W-1:G] ^ (8'd1 << $urandom_range(0, 7));
        2: d = d ^ {8'h81, 32'h0001_0000};
        default: ;
      endcase
      #2;
      expect_pulse[0] = (d[G-1:0] != q[G-1:0]);
      expect_pulse[1] = (d[W-1:G] != q[W-1:G]);
      checks++;
      if (changed !== expect_pulse) begin
        failures++;
        $display("FAIL changed=%b expected %b", changed, expect_pulse);
      end
      check_gclk(2'b00, "clk low");
      clk = 1;
      #1 check_gclk(expect_pulse, "clk high, start");
      #2 check_gclk(expect_pulse, "clk high, end");
      for (int j = 0; j < 2; j++) if (expect_pulse[j]) pulses[j]++; else skipped[j]++;
      clk = 0;
      #1;
      checks++;
      if (q !== d) begin
        failures++;
        $display("FAIL bank q=%h d=%h after pulse", q, d);
      end
    end
    for (int j = 0; j < 2; j++) begin
      if (pulses[j] == 0 || skipped[j] == 0) begin
        failures++;
        $display("FAIL group %0d pulses=%0d skipped=%0d", j, pulses[j], skipped[j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
