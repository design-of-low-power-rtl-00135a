// mux2: one-bit 2:1 multiplexer, the cell every stage of the barrel shifter
// is built from.
//
// f = w0 when s = 0 and f = w1 when s = 1 (the two-row truth table of the
// 2:1 multiplexer). Purely combinational, no clock.
//
// Ports: w0, w1 data inputs; s select; f output.
module mux2 (
  input  logic w0,
  input  logic w1,
  input  logic s,
  output logic f
);
  timeunit 1ns;
  timeprecision 10ps;

  always_comb f = s ? w1 : w0;
endmodule
