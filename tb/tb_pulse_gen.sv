// tb_pulse_gen: checks the pulse generator with TPW = 1 ns on a 10 ns
// clock and on a clock with a long high phase: cp must rise with clk, stay
// high for TPW, fall while clk is still high, and give one pulse per cycle.
module tb_pulse_gen;
  timeunit 1ns;
  timeprecision 10ps;

  logic clk = 1'b0;
  logic cp;
  int checks = 0, failures = 0;
  int pulses = 0;
  realtime t_rise;

  pulse_gen #(.TPW(1.0ns)) dut (.clk, .cp);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cp(input logic exp, input string what);
    checks++;
    if (cp !== exp) begin
      failures++;
      $display("FAIL %s at %0t: cp=%b expected %b", what, $realtime, cp, exp);
    end
  endtask

  // Pulse width measured from each rising to falling edge of cp.
  always @(posedge cp) begin
    t_rise = $realtime;
    pulses++;
  end
  always @(negedge cp) begin
    // A fall before the first rise is cp's power-up value, not a pulse.
    if (pulses > 0) begin
      checks++;
      if ($realtime - t_rise < 0.95 || $realtime - t_rise > 1.05) begin
        failures++;
        $display("FAIL pulse width %0.2f ns", $realtime - t_rise);
      end
    end
  end

  initial begin
    #5;
    expect_cp(1'b0, "idle");
    for (int c = 0; c < 10; c++) begin
      // 50% duty clock, then a 90% duty clock: the pulse width must not
      // depend on the clock's high time.
      automatic realtime high = (c < 5) ? 5.0 : 9.0;
      clk = 1'b1;
      #0.5 expect_cp(1'b1, "inside pulse");
      #1.0 expect_cp(1'b0, "after pulse, clk high");
      #(high - 1.5) clk = 1'b0;
      #0.5 expect_cp(1'b0, "clk low");
      #(9.5 - high);
    end
    checks++;
    if (pulses != 10) begin
      failures++;
      $display("FAIL %0d pulses for 10 clock edges", pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
