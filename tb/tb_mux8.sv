// tb_mux8: exhaustive check of the 8:1 multiplexer: every 8-bit input word
// with every select value; the expected output is bit sel of the word.
module tb_mux8;
  timeunit 1ns;
  timeprecision 10ps;

  logic [7:0] i;
  logic [2:0] sel;
  logic       out;
  int checks = 0, failures = 0;

  mux8 dut (.i, .sel, .out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 256; w++) begin
      for (int k = 0; k < 8; k++) begin
        i   = 8'(w);
        sel = 3'(k);
        #1;
        checks++;
        if (out !== ((w >> k) & 1)) begin
          failures++;
          $display("FAIL i=%b sel=%0d out=%b", i, sel, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
