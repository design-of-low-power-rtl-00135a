// barrel_shifter_pl_mux8: 8-bit rotate-right barrel shifter made of eight
// 8:1 multiplexers whose three select lines are held by pulsed latches.
//
// Same interface and behaviour as barrel_shifter_pl_mux2 at 8 bits, with a
// single multiplexer level (barrel_core_mux8) in place of three 2:1 stages.
// Each select line Sk has its own one-bit pulsed latch clocked by clk;
// D -> Q is combinational.
//
// Ports: clk clock of the select latches; d data D; s select lines
// (s[k] is Sk, rotate amount = binary S0 S1 S2); q result Q.
// Timing: s is sampled in the TPW window after each rising clk edge. No
// reset. The latch per select line and the eight 8:1 multiplexers follow
// the design; TPW and the shared clk are this design's choices.
module barrel_shifter_pl_mux8 #(
  parameter realtime TPW = 1.0ns
) (
  input  logic       clk,
  input  logic [7:0] d,
  input  logic [2:0] s,
  output logic [7:0] q
);
  timeunit 1ns;
  timeprecision 10ps;

  logic [2:0] s_held;

  for (genvar k = 0; k < 3; k++) begin : g_sel_latch
    pulsed_latch #(.WIDTH(1), .TPW(TPW)) u_pl (
      .clk(clk),
      .d  (s[k]),
      .q  (s_held[k])
    );
  end

  barrel_core_mux8 u_core (
    .d(d),
    .s(s_held),
    .q(q)
  );
endmodule
