// tp_top: a 3-phase latch-based pipeline and a converted circuit with
// feedback, with their clock generator.
//
// three_phase_clkgen divides ref_clk into the non-overlapping phases p1, p2,
// p3 (one cycle = 6 ref_clk ticks by default), and tp_pipeline is the
// converted 4-stage, 32-bit pipeline: single p1 latches at even positions,
// p3 + p2 latch pairs at odd ones, the p2 latches moved into the middle of
// the next stage. The first GATED_POSITIONS positions hold on a stall
// (en low) through the 3-phase clock gates; the p2 latches of the others use
// data-driven clock gating. tp_netlist, side by side on the same phases,
// is a six-flip-flop circuit with feedback loops whose latch assignment is
// the minimum of the integer program, found at elaboration.
//
// Interface: the phases are brought out so that the environment can time its
// inputs. en and din count as launched by p1: change them right after p1
// rises and hold them until its next rise, as a flip-flop output would
// behave after a clock edge (an inserted p2 latch at the input makes this
// safe). A word launched at edge k-1 is taken at edge k and appears on dout
// STAGES cycles later, after p1 of that cycle. net_din follows the same
// rule; net_q[v] is position v of the circuit with feedback, valid after p2
// of each cycle. main_clk and
// p2_clk show which latch banks received a clock pulse. The sizes are this
// design's choice; four stages are those of the linear pipeline example.
module tp_top #(
  parameter int unsigned WIDTH           = 32,
  parameter int unsigned STAGES          = 4,
  parameter int unsigned GATED_POSITIONS = 3,
  parameter bit          RETIME          = 1'b1,
  parameter bit          PI_LATCH        = 1'b1,
  parameter int unsigned SLOT            = 2,
  parameter int unsigned HIGH            = 1
) (
  input  logic             ref_clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic             p1,
  output logic             p2,
  output logic             p3,
  output logic [STAGES:0]  main_clk,
  output logic [STAGES:0]  p2_clk,
  input  logic [WIDTH-1:0] net_din,
  output logic [WIDTH-1:0] net_q [tp_pkg::EXAMPLE_NODES],
  output logic [tp_pkg::EXAMPLE_NODES-1:0] net_main_clk,
  output logic [tp_pkg::EXAMPLE_NODES-1:0] net_p2_clk
);

  three_phase_clkgen #(.SLOT(SLOT), .HIGH(HIGH)) u_clk (
    .ref_clk(ref_clk),
    .rst_n  (rst_n),
    .p1     (p1),
    .p2     (p2),
    .p3     (p3)
  );

  tp_pipeline #(
    .WIDTH          (WIDTH),
    .STAGES         (STAGES),
    .GATED_POSITIONS(GATED_POSITIONS),
    .RETIME         (RETIME),
    .PI_LATCH       (PI_LATCH)
  ) u_pipe (
    .p1      (p1),
    .p2      (p2),
    .p3      (p3),
    .rst_n   (rst_n),
    .en      (en),
    .din     (din),
    .dout    (dout),
    .main_clk(main_clk),
    .p2_clk  (p2_clk)
  );

  tp_netlist #(.WIDTH(WIDTH)) u_net (
    .p1      (p1),
    .p2      (p2),
    .p3      (p3),
    .rst_n   (rst_n),
    .din     (net_din),
    .node_q  (net_q),
    .main_clk(net_main_clk),
    .p2_clk  (net_p2_clk)
  );

endmodule
