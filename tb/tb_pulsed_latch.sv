// tb_pulsed_latch: checks an 8-bit pulsed latch (TPW = 1 ns, 10 ns clock).
// Data set up before a rising edge must appear on q by the end of the
// pulse; data changed after the pulse, while clk is still high or low, must
// not reach q until the next edge; data changed inside the pulse passes
// through (the latch is transparent for the whole pulse).
module tb_pulsed_latch;
  timeunit 1ns;
  timeprecision 10ps;

  logic       clk = 1'b0;
  logic [7:0] d, q, captured;
  int checks = 0, failures = 0;

  pulsed_latch #(.WIDTH(8), .TPW(1.0ns)) dut (.clk, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic [7:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s at %0t: q=%h expected %h", what, $realtime, q, exp);
    end
  endtask

  initial begin
    d = 8'h00;
    @(posedge clk);
    #2;
    for (int r = 0; r < 50; r++) begin
      // Now 2 ns after a rising edge. New data well before the next edge.
      captured = q;
      d = 8'($urandom);
      #1 expect_q(captured, "hold after pulse, clk high");
      #4 expect_q(captured, "hold, clk low");
      d = 8'($urandom);
      @(posedge clk);
      #1.5 expect_q(d, "captured at edge");
      captured = d;
      if (r % 5 == 0) begin
        // Change inside the next pulse: passes straight through.
        @(posedge clk);
        #0.3 d = ~d;
        #0.2 expect_q(d, "transparent inside pulse");
        #1.0 expect_q(d, "held after pulse");
      end
      #0.5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
