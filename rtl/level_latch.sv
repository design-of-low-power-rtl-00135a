// level_latch: level-sensitive D latch, the storage cell of the pulsed latch.
//
// While clk is high the latch is transparent and q follows d like a buffer;
// while clk is low q holds the value it had when clk fell, whatever d does.
// WIDTH latches share one clk. The latch is intended: synthesis reports it
// as a latch, and that is the cell this design is built around.
//
// Ports: clk enable (transparent when high); d data in; q data out.
// Timing: no clock edge; q changes whenever d changes during clk = 1.
// q has no reset; it holds whatever it last captured.
// Lint in Verilator reports NOLATCH ("no latches detected") for this block
// when the module is instantiated inside a generate loop; the block is a
// latch (q is assigned only while clk is high) and the message stands.
module level_latch #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ns;
  timeprecision 10ps;

  always_latch begin
    if (clk) q = d;
  end
endmodule
