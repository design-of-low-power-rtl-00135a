// barrel_shifter_top: the low-power barrel shifter in both multiplexer
// styles, next to the opcode-controlled shift/rotate unit.
//
//   m2_*  barrel_shifter_pl_mux2: WIDTH-bit rotate right through
//         log2(WIDTH) stages of 2:1 multiplexers, select lines held by
//         pulsed latches (the main design).
//   m8_*  barrel_shifter_pl_mux8: the same 8-bit function with one level of
//         eight 8:1 multiplexers, select lines held by pulsed latches.
//   su_*  shift_rotate_unit: combinational shifter with a {Left, Rotate,
//         Arithmetic} opcode covering logical/arithmetic shifts and rotates
//         in both directions.
//
// The three are independent; each has its own ports. Both pulsed-latch
// shifters sample their select lines in the TPW-wide pulse after each
// rising edge of the one shared clk; their data paths and the shift/rotate
// unit are combinational. No reset.
module barrel_shifter_top
  import barrel_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  parameter realtime     TPW   = 1.0ns,
  localparam int unsigned STAGES = $clog2(WIDTH)
) (
  input  logic              clk,
  // 2:1-multiplexer shifter
  input  logic [WIDTH-1:0]  m2_d,
  input  logic [STAGES-1:0] m2_s,
  output logic [WIDTH-1:0]  m2_q,
  // 8:1-multiplexer shifter (8 bits)
  input  logic [7:0]        m8_d,
  input  logic [2:0]        m8_s,
  output logic [7:0]        m8_q,
  // shift/rotate unit
  input  logic [WIDTH-1:0]  su_a,
  input  logic [STAGES-1:0] su_amt,
  input  shift_op_t         su_op,
  output logic [WIDTH-1:0]  su_f
);
  timeunit 1ns;
  timeprecision 10ps;

  barrel_shifter_pl_mux2 #(.WIDTH(WIDTH), .TPW(TPW)) u_mux2_shifter (
    .clk(clk),
    .d  (m2_d),
    .s  (m2_s),
    .q  (m2_q)
  );

  barrel_shifter_pl_mux8 #(.TPW(TPW)) u_mux8_shifter (
    .clk(clk),
    .d  (m8_d),
    .s  (m8_s),
    .q  (m8_q)
  );

  shift_rotate_unit #(.WIDTH(WIDTH)) u_shift_rotate (
    .a  (su_a),
    .amt(su_amt),
    .op (su_op),
    .f  (su_f)
  );
endmodule
