// shift_rotate_unit: general shifter controlled by a 3-bit opcode
// {Left, Rotate, Arithmetic}: logical and arithmetic shifts and rotations,
// right or left, by a binary amount of 0 .. WIDTH-1 places.
//
//   right, logical     zeros enter at the MSB
//   right, arithmetic  copies of the sign bit (MSB) enter at the MSB
//   right/left rotate  bits leaving one end re-enter at the other
//   left, logical      zeros enter at the LSB
//   left, arithmetic   zeros enter at the LSB: an arithmetic left shift
//                      equals a logical one (this design's reading)
//
// The opcode table is followed as given; how the unit is built is this
// design's choice: the operand is doubled ({fill, a} or {a, a}) and a
// single shift of the doubled word gives every operation.
//
// Ports: a operand; amt shift amount (binary); op opcode (barrel_pkg::
// shift_op_t); f result. Purely combinational.
module shift_rotate_unit
  import barrel_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [AW-1:0]    amt,
  input  shift_op_t        op,
  output logic [WIDTH-1:0] f
);
  timeunit 1ns;
  timeprecision 10ps;

  logic [2*WIDTH-1:0] wide;
  logic [2*WIDTH-1:0] shifted;
  logic [WIDTH-1:0]   fill;

  always_comb begin
    // Bits that enter from the vacated end.
    if (op.rotate)                fill = a;
    else if (op.arith && !op.left) fill = {WIDTH{a[WIDTH-1]}};
    else                          fill = '0;

    if (op.left) begin
      // Upper half of ({a, fill} << amt) is a shifted left with fill's top
      // bits entering at the LSB.
      wide    = {a, fill};
      shifted = wide << amt;
      f       = shifted[2*WIDTH-1:WIDTH];
    end else begin
      wide    = {fill, a};
      shifted = wide >> amt;
      f       = shifted[WIDTH-1:0];
    end
  end
endmodule
