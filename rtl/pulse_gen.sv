// pulse_gen: behavioural model of the clock pulse generator of a pulsed
// latch. It is not synthesizable logic: the real part is a delay-line
// circuit whose pulse width is set by transistor delays.
//
// On every rising edge of clk, cp goes high for TPW and then falls, whatever
// the clock's own duty cycle. The model forms it as clk AND NOT (clk delayed
// by TPW); only the pulse, not that gate structure, follows the design this
// RTL implements. TPW must be shorter than the high phase of clk.
//
// Ports: clk clock in; cp pulsed clock out.
// Timing: cp rises with clk and is TPW wide.
module pulse_gen #(
  parameter realtime TPW = 1.0ns
) (
  input  logic clk,
  output logic cp
);
  timeunit 1ns;
  timeprecision 10ps;

  logic clk_dly;

  assign #(TPW) clk_dly = clk;
  assign cp = clk & ~clk_dly;
endmodule
