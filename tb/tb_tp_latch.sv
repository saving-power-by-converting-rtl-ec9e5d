// tb_tp_latch: checks the latch bank. While the gate is high the output must
// follow every input change at once; while it is low the output must keep
// the value present when the gate fell; reset clears it in either state.
// Expected values are tracked by the testbench itself.
module tb_tp_latch;
  localparam int W = 16;
  logic rst_n, g;
  logic [W-1:0] d, q, expect_q;
  int checks = 0, failures = 0;

  tp_latch #(.WIDTH(W)) dut (.rst_n(rst_n), .g(g), .d(d), .q(q));

  task automatic check(string what);
    #1;
    checks++;
    if (q !== expect_q) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, expect_q);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; g = 0; d = 16'hABCD; expect_q = '0;
    check("reset, gate low");
    g = 1;
    check("reset, gate high");
    rst_n = 1; expect_q = d;
    check("transparent after reset");
    for (int i = 0; i < 200; i++) begin
      logic [1:0] op;
      op = 2'($urandom_range(0, 3));
      case (op)
        2'd0: begin g = ~g; if (g) expect_q = d; end
        2'd1, 2'd2: begin d = W'($urandom); if (g) expect_q = d; end
        default: begin
          if ($urandom_range(0, 9) == 0) begin
            rst_n = 0; expect_q = '0; check("async reset");
            rst_n = 1; if (g) expect_q = d;
          end
        end
      endcase
      check(g ? "transparent" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
