// tb_level_latch: checks the level latch on a 4-bit instance. While clk is
// high every change of d must appear on q; after clk falls q must keep the
// last value while d keeps changing.
module tb_level_latch;
  timeunit 1ns;
  timeprecision 10ps;

  logic       clk;
  logic [3:0] d, q, held;
  int checks = 0, failures = 0;

  level_latch #(.WIDTH(4)) dut (.clk, .d, .q);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic [3:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    clk = 1'b0;
    d   = 4'h0;
    #1 clk = 1'b1;
    for (int r = 0; r < 20; r++) begin
      // Transparent phase: q follows d.
      for (int k = 0; k < 4; k++) begin
        d = 4'($urandom);
        #1 expect_q(d, "transparent");
      end
      held = d;
      clk  = 1'b0;
      // Opaque phase: q holds.
      for (int k = 0; k < 4; k++) begin
        #1 d = 4'($urandom);
        #1 expect_q(held, "hold");
      end
      clk = 1'b1;
      #1 expect_q(d, "reopen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
