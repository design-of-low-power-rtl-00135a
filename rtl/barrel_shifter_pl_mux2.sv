// barrel_shifter_pl_mux2: the low-power barrel shifter, a rotate-right
// network of 2:1 multiplexer stages whose select lines are held by pulsed
// latches.
//
// Each select line Sk enters through its own one-bit pulsed latch, clocked
// by clk; the latch outputs drive the multiplexer stages of
// barrel_core_mux2. The data path D -> Q is not latched: Q follows D
// combinationally through the three multiplexer levels, rotated by the
// amount captured at the last clock edge. A new rotate amount presented
// before a rising edge is taken during the pulse after that edge and Q is
// final within the same clock cycle.
//
// Ports: clk clock of the select latches; d data D; s select lines
// (s[k] is Sk; S0 rotates by 4, S1 by 2, S2 by 1 for 8 bits); q result Q.
// Timing: s is sampled in the TPW window after each rising clk edge; it
// must be stable across that window. No reset: until the first clock edge
// the latched selects hold whatever they powered up with.
// One latch per select line, fed by clk, and the multiplexer network follow
// the design; TPW and the single shared clk are this design's choices.
module barrel_shifter_pl_mux2 #(
  parameter int unsigned WIDTH = 8,
  parameter realtime     TPW   = 1.0ns,
  localparam int unsigned STAGES = $clog2(WIDTH)
) (
  input  logic              clk,
  input  logic [WIDTH-1:0]  d,
  input  logic [STAGES-1:0] s,
  output logic [WIDTH-1:0]  q
);
  timeunit 1ns;
  timeprecision 10ps;

  logic [STAGES-1:0] s_held;

  for (genvar k = 0; k < STAGES; k++) begin : g_sel_latch
    pulsed_latch #(.WIDTH(1), .TPW(TPW)) u_pl (
      .clk(clk),
      .d  (s[k]),
      .q  (s_held[k])
    );
  end

  barrel_core_mux2 #(.WIDTH(WIDTH)) u_core (
    .d(d),
    .s(s_held),
    .q(q)
  );
endmodule
