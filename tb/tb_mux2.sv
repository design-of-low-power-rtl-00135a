// tb_mux2: exhaustive check of the 2:1 multiplexer against its truth table
// (s = 0 passes w0, s = 1 passes w1) for all eight input combinations.
module tb_mux2;
  timeunit 1ns;
  timeprecision 10ps;

  logic w0, w1, s, f;
  int checks = 0, failures = 0;

  mux2 dut (.w0, .w1, .s, .f);

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, w1, w0} = 3'(v);
      #1;
      checks++;
      if (f !== (v[2] ? v[1] : v[0])) begin
        failures++;
        $display("FAIL s=%b w1=%b w0=%b f=%b", s, w1, w0, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
