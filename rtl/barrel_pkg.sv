// barrel_pkg: types shared by the barrel-shifter modules.
//
// shift_op_t is the 3-bit opcode of the general shift/rotate unit. Its three
// fields, most significant first, are Left, Rotate and Arithmetic, in the
// column order of the opcode table the design follows:
//   000 shift right logical     100 shift left logical
//   001 shift right arithmetic  101 shift left arithmetic
//   01x rotate right            11x rotate left
package barrel_pkg;
  timeunit 1ns;
  timeprecision 10ps;

  typedef struct packed {
    logic left;    // 1: towards the MSB, 0: towards the LSB
    logic rotate;  // 1: bits leaving one end re-enter at the other
    logic arith;   // 1: arithmetic shift (ignored when rotate = 1)
  } shift_op_t;

endpackage
