// tb_barrel_shifter_pl_mux8: checks the pulsed-latch barrel shifter
// (eight 8:1 multiplexers, TPW = 1 ns, 10 ns clock).
//  - A select code presented mid-cycle must not affect q before the next
//    rising edge (the select latches are opaque outside the pulse).
//  - After that edge, q must show the new rotation by the end of the pulse,
//    i.e. within the same clock cycle.
//  - Data changes at any time must reach q without a clock (the data path
//    is not latched).
// The first eight rounds replay the worked truth table (data 00001111), the
// rest use random data and select codes.
module tb_barrel_shifter_pl_mux8;
  timeunit 1ns;
  timeprecision 10ps;

  logic       clk = 1'b0;
  logic [7:0] d, q;
  logic [2:0] s, s_old;
  int checks = 0, failures = 0;

  barrel_shifter_pl_mux8 #(.TPW(1.0ns)) dut (.clk, .d, .s, .q);

  always #5 clk = ~clk;

  localparam logic [7:0] TABLE_OUT [8] = '{
    8'b00001111, 8'b10000111, 8'b11000011, 8'b11100001,
    8'b11110000, 8'b01111000, 8'b00111100, 8'b00011110
  };

  // Reference rotate right by 4*S0 + 2*S1 + S2.
  function automatic logic [7:0] ref_q(input logic [7:0] x, input logic [2:0] sel);
    int n = 4 * sel[0] + 2 * sel[1] + sel[2];
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = x[(i + n) % 8];
    return r;
  endfunction

  task automatic expect_q(input logic [7:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s at %0t: d=%b q=%b expected %b", what, $realtime, d, q, exp);
    end
  endtask

  initial begin : watchdog
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 8'b00001111;
    s = 3'b000;
    @(posedge clk);
    #2;
    s_old = s;
    for (int r = 0; r < 200; r++) begin
      // 2 ns after a rising edge: present the next select code and data.
      if (r < 8) begin
        s = {r[0], r[1], r[2]};
        d = 8'b00001111;
      end else begin
        s = 3'($urandom);
        d = 8'($urandom);
      end
      #1 expect_q(ref_q(d, s_old), "old select held, new data passed");
      #3 d = 8'($urandom);
      #1 expect_q(ref_q(d, s_old), "data change mid-cycle");
      if (r < 8) d = 8'b00001111;
      @(posedge clk);
      #1.5;
      if (r < 8) begin
        checks++;
        if (q !== TABLE_OUT[r]) begin
          failures++;
          $display("FAIL table row %0d: q=%b expected %b", r, q, TABLE_OUT[r]);
        end
      end else begin
        expect_q(ref_q(d, s), "new select after one edge");
      end
      s_old = s;
      #0.5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
