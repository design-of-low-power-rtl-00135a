// tb_workload_truth_table: replays the worked truth table through
// barrel_shifter_top at its default parameters. Data 00001111 (D3..D0 high,
// D7..D4 low) is rotated by each select code S0 S1 S2 = 000 .. 111 on both
// pulsed-latch shifters. Each code is presented in the low phase of the
// clock, is taken at the next rising edge, and must give the table's output
// before the following edge: one clock cycle per shift.
module tb_workload_truth_table;
  import barrel_pkg::*;
  timeunit 1ns;
  timeprecision 10ps;

  logic       clk = 1'b0;
  logic [7:0] d = 8'b00001111;
  logic [7:0] m2_q, m8_q, su_f;
  logic [2:0] s;
  int checks = 0, failures = 0;
  int cycles = 0;

  // Rows indexed by the code S0 S1 S2 read as a binary number.
  localparam logic [7:0] TABLE_OUT [8] = '{
    8'b00001111, 8'b10000111, 8'b11000011, 8'b11100001,
    8'b11110000, 8'b01111000, 8'b00111100, 8'b00011110
  };

  barrel_shifter_top dut (
    .clk,
    .m2_d(d), .m2_s(s), .m2_q,
    .m8_d(d), .m8_s(s), .m8_q,
    .su_a(8'h00), .su_amt(3'd0), .su_op(shift_op_t'(3'b000)), .su_f
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start;
    @(negedge clk);
    start = cycles;
    for (int row = 0; row < 8; row++) begin
      s = {row[0], row[1], row[2]};  // s[0] is S0
      @(posedge clk);
      #4;
      checks += 2;
      if (m2_q !== TABLE_OUT[row]) begin
        failures++;
        $display("FAIL 2:1 shifter row %0d: q=%b expected %b", row, m2_q, TABLE_OUT[row]);
      end
      if (m8_q !== TABLE_OUT[row]) begin
        failures++;
        $display("FAIL 8:1 shifter row %0d: q=%b expected %b", row, m8_q, TABLE_OUT[row]);
      end
      @(negedge clk);
    end
    checks++;
    if (cycles - start != 8) begin
      failures++;
      $display("FAIL 8 shifts took %0d cycles", cycles - start);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
