// pulsed_latch: a level latch clocked by a short pulse, so that it acts as
// an edge-triggered storage element with one latch instead of a
// master-slave pair.
//
// A pulse_gen turns each rising edge of clk into a pulse cp of width TPW;
// a level_latch is transparent only while cp is high. q therefore takes the
// value d has during the TPW window after the rising edge and holds it for
// the rest of the cycle. Data that changes inside that window passes
// straight through, which is why a pulsed latch needs d to stay stable for
// the pulse width (hold time grows by TPW).
//
// Ports: clk clock; d data in; q data out. No reset.
// Timing: q settles at the end of the pulse that follows a rising clk edge.
// The structure (pulse generator feeding the clock pin of a latch) follows
// the design; TPW has no given value and 1 ns is this design's choice.
module pulsed_latch #(
  parameter int unsigned WIDTH = 1,
  parameter realtime     TPW   = 1.0ns
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ns;
  timeprecision 10ps;

  logic cp;

  pulse_gen #(.TPW(TPW)) u_pulse (
    .clk(clk),
    .cp (cp)
  );

  level_latch #(.WIDTH(WIDTH)) u_latch (
    .clk(cp),
    .d  (d),
    .q  (q)
  );
endmodule
