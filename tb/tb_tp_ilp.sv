// tb_tp_ilp: checks the latch-assignment functions of tp_pkg.
// 1. For random flip-flop graphs and every K vector, the G that g_from_k
//    returns must satisfy the program's inequalities, written out here:
//    G(u) + K(u) >= 1 and G(u) >= K(u) + K(v) - 1 for every fanout v, and it
//    must be the smallest such G (every G(u) = 1 is forced by one of them).
// 2. Minimum costs of hand-worked graphs: a chain of n flip-flops fed by the
//    inputs needs ceil(n/2) (every other flip-flop, counted from the output
//    end, plus an input latch when n is odd), a flip-flop in a loop with
//    itself 1, a ring of 3 or 4 with no
//    inputs 2, a flip-flop fanning out to 3 others 1.
// 3. assign_linear reaches that minimum for chains of 1 to 12 flip-flops,
//    ends every chain with a single p1 latch, and
//    linear_latch_banks(n) = n + n/2.
module tb_tp_ilp;
  import tp_pkg::*;
  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int unsigned got, int unsigned want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, want);
    end
  endtask

  initial begin
    fanout_t f;
    node_set_t g, k;
    // 1. inequalities on random graphs of 6 nodes
    for (int t = 0; t < 20; t++) begin
      f = '0;
      for (int u = 0; u < 6; u++)
        for (int v = 0; v < 6; v++)
          if ($urandom_range(0, 3) == 0) f[u][v] = 1'b1;
      for (int kv = 0; kv < 64; kv++) begin
        k = node_set_t'(kv);
        g = g_from_k(6, f, k);
        for (int u = 0; u < 6; u++) begin
          bit forced;
          forced = (k[u] == 1'b0);
          checks++;
          if (32'(g[u]) + 32'(k[u]) < 1) begin failures++; $display("FAIL G+K>=1"); end
          for (int v = 0; v < 6; v++) if (f[u][v]) begin
            checks++;
            if (32'(g[u]) + 1 < 32'(k[u]) + 32'(k[v])) begin failures++; $display("FAIL G>=K+K-1"); end
            if (k[u] && k[v]) forced = 1;
          end
          checks++;
          if (g[u] != forced) begin failures++; $display("FAIL G(%0d) not minimal", u); end
        end
      end
    end
    // 2. hand-worked minima
    for (int n = 1; n <= 12; n++)
      expect_eq(ilp_min_cost(n, chain_fanout(n), node_set_t'(1)), (n + 1) / 2, $sformatf("chain %0d", n));
    f = '0; f[0][0] = 1'b1;
    expect_eq(ilp_min_cost(1, f, node_set_t'(1)), 1, "self loop");
    f = '0; f[0][1] = 1'b1; f[1][2] = 1'b1; f[2][0] = 1'b1;
    expect_eq(ilp_min_cost(3, f, '0), 2, "ring of 3");
    f = '0; f[0][1] = 1'b1; f[1][2] = 1'b1; f[2][3] = 1'b1; f[3][0] = 1'b1;
    expect_eq(ilp_min_cost(4, f, '0), 2, "ring of 4");
    f = '0; f[0][1] = 1'b1; f[0][2] = 1'b1; f[0][3] = 1'b1;
    expect_eq(ilp_min_cost(4, f, node_set_t'(1)), 1, "fanout of 3");
    // 3. the closed form for chains
    for (int n = 1; n <= 12; n++) begin
      expect_eq(ilp_cost(n, chain_fanout(n), node_set_t'(1), linear_k(n)), (n + 1) / 2,
                $sformatf("assign_linear chain %0d", n));
      expect_eq(32'(assign_linear(n - 1, n).k), 1, $sformatf("chain %0d ends on p1", n));
      expect_eq(32'(assign_linear(n - 1, n).g), 0, $sformatf("chain %0d ends single", n));
      expect_eq(linear_latch_banks(n), n + n / 2, $sformatf("banks %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
