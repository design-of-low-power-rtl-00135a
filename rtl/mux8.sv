// mux8: one-bit 8:1 multiplexer, the cell of the 8:1-multiplexer barrel
// shifter.
//
// out = i[sel]: the three select bits, read as a binary number with sel[2]
// the most significant, pick one of the eight inputs I0..I7 (select 000 picks
// I0, 111 picks I7, as in the 8:1 truth table). Purely combinational.
//
// Ports: i[7:0] inputs I7..I0; sel[2:0] select; out output.
module mux8 (
  input  logic [7:0] i,
  input  logic [2:0] sel,
  output logic       out
);
  timeunit 1ns;
  timeprecision 10ps;

  always_comb begin
    unique case (sel)
      3'd0: out = i[0];
      3'd1: out = i[1];
      3'd2: out = i[2];
      3'd3: out = i[3];
      3'd4: out = i[4];
      3'd5: out = i[5];
      3'd6: out = i[6];
      default: out = i[7];
    endcase
  end
endmodule
