// tb_shift_rotate_unit: checks the opcode-controlled shifter. The 8-bit
// instance is checked exhaustively (every operand, amount and opcode, both
// values of the rotates' don't-care bit) against a bit-by-bit reference.
// A 4-bit instance is checked on the worked rotation examples: one place
// left turns a3a2a1a0 into a2a1a0a3, one place right into a0a3a2a1.
module tb_shift_rotate_unit;
  import barrel_pkg::*;
  timeunit 1ns;
  timeprecision 10ps;

  logic [7:0] a, f;
  logic [2:0] amt;
  shift_op_t  op;
  logic [3:0] a4, f4;
  logic [1:0] amt4;
  shift_op_t  op4;
  int checks = 0, failures = 0;

  shift_rotate_unit #(.WIDTH(8)) dut  (.a, .amt, .op, .f);
  shift_rotate_unit #(.WIDTH(4)) dut4 (.a(a4), .amt(amt4), .op(op4), .f(f4));

  // Reference, one place at a time.
  function automatic logic [7:0] ref_op(input logic [7:0] x, input int n, input shift_op_t o);
    for (int k = 0; k < n; k++) begin
      if (o.left) x = {x[6:0], o.rotate ? x[7] : 1'b0};
      else        x = {o.rotate ? x[0] : (o.arith ? x[7] : 1'b0), x[7:1]};
    end
    return x;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 8; o++) begin
      for (int w = 0; w < 256; w++) begin
        for (int n = 0; n < 8; n++) begin
          a   = 8'(w);
          amt = 3'(n);
          op  = shift_op_t'(3'(o));
          #1;
          checks++;
          if (f !== ref_op(a, n, op)) begin
            failures++;
            $display("FAIL op=%b a=%b amt=%0d f=%b expected %b", op, a, n, f, ref_op(a, n, op));
          end
        end
      end
    end
    // Worked 4-bit examples on every 4-bit word.
    for (int w = 0; w < 16; w++) begin
      a4   = 4'(w);
      amt4 = 2'd1;
      op4  = '{left: 1'b1, rotate: 1'b1, arith: 1'b0};
      #1;
      checks++;
      if (f4 !== {a4[2], a4[1], a4[0], a4[3]}) begin
        failures++;
        $display("FAIL 4-bit rotate left a=%b f=%b", a4, f4);
      end
      op4 = '{left: 1'b0, rotate: 1'b1, arith: 1'b0};
      #1;
      checks++;
      if (f4 !== {a4[0], a4[3], a4[2], a4[1]}) begin
        failures++;
        $display("FAIL 4-bit rotate right a=%b f=%b", a4, f4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
