// three_phase_clkgen: generates the three non-overlapping phases p1, p2, p3.
//
// A cycle Tc is 3*SLOT ticks of the reference clock ref_clk. Phase i (p1, p2,
// p3 for i = 0, 1, 2) is high during the last HIGH ticks of slot i, so the
// phases close in the order p1, p2, p3, p3 closes exactly at the end of the
// cycle, and SLOT-HIGH low ticks separate any two phases. All outputs come
// straight from flip-flops, so they are free of glitches. An assertion
// checks that no two phases are ever high together.
//
// Reset: while rst_n is low all phases are low. The counter restarts in slot
// 1, so the pulses after reset are p2, p3, then p1, p2, p3 of the first full
// cycle. That lets a converted design start like its flip-flop original: the
// first p2 lets an input p2 latch take the first input word, and the first
// p3 lets the p3 latches capture what the original's first edge would store.
//
// The ordering and the closing of p3 at the end of the cycle follow the
// multi-phase clock model; the tick counts, the gaps and the reset phase are
// this design's choices.
module three_phase_clkgen #(
  parameter int unsigned SLOT = 2,
  parameter int unsigned HIGH = 1
) (
  input  logic ref_clk,
  input  logic rst_n,
  output logic p1,
  output logic p2,
  output logic p3
);

  localparam int unsigned TICKS = 3 * SLOT;
  localparam int unsigned CW = $clog2(TICKS);

  logic [CW-1:0] cnt;
  logic [CW-1:0] cnt_next;

  assign cnt_next = (cnt == CW'(TICKS - 1)) ? '0 : cnt + 1'b1;

  function automatic logic in_window(logic [CW-1:0] c, int unsigned slot);
    return (32'(c) >= (slot + 1) * SLOT - HIGH) && (32'(c) < (slot + 1) * SLOT);
  endfunction

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= CW'(SLOT);
      p1  <= 1'b0;
      p2  <= 1'b0;
      p3  <= 1'b0;
    end else begin
      cnt <= cnt_next;
      p1  <= in_window(cnt_next, 0);
      p2  <= in_window(cnt_next, 1);
      p3  <= in_window(cnt_next, 2);
    end
  end

  // Neighbouring latches must never be transparent together: at most one
  // phase is high at any time.
  a_non_overlap: assert property (@(posedge ref_clk)
    32'(p1) + 32'(p2) + 32'(p3) <= 1)
    else $error("three_phase_clkgen: phases overlap");

  initial begin
    assert (HIGH >= 1 && HIGH <= SLOT)
      else $error("three_phase_clkgen: HIGH %0d must be 1..SLOT", HIGH);
  end

endmodule
