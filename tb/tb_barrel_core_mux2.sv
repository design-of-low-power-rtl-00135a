// tb_barrel_core_mux2: checks the 2:1-multiplexer rotate network.
// The 8-bit instance is checked exhaustively (every data word, every select
// code) against a reference rotate-right by 4*S0 + 2*S1 + S2 places, and
// against the eight rows of the worked truth table for data 00001111.
// A 16-bit instance (four stages) is checked on random words.
module tb_barrel_core_mux2;
  timeunit 1ns;
  timeprecision 10ps;

  logic [7:0]  d8, q8;
  logic [2:0]  s8;
  logic [15:0] d16, q16;
  logic [3:0]  s16;
  int checks = 0, failures = 0;

  barrel_core_mux2 #(.WIDTH(8))  dut8  (.d(d8),  .s(s8),  .q(q8));
  barrel_core_mux2 #(.WIDTH(16)) dut16 (.d(d16), .s(s16), .q(q16));

  // Reference: output bit i takes data bit (i + n) mod w.
  function automatic logic [15:0] ror_ref(input logic [15:0] d, input int n, input int w);
    logic [15:0] r = '0;
    for (int i = 0; i < w; i++) r[i] = d[(i + n) % w];
    return r;
  endfunction

  // The worked truth table, rows indexed by the select code S0 S1 S2.
  localparam logic [7:0] TABLE_OUT [8] = '{
    8'b00001111, 8'b10000111, 8'b11000011, 8'b11100001,
    8'b11110000, 8'b01111000, 8'b00111100, 8'b00011110
  };

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Truth table rows: s8[0] is S0, s8[2] is S2.
    for (int row = 0; row < 8; row++) begin
      d8 = 8'b00001111;
      s8 = {row[0], row[1], row[2]};  // S2 S1 S0 from the row's S0 S1 S2
      #1;
      checks++;
      if (q8 !== TABLE_OUT[row]) begin
        failures++;
        $display("FAIL table row %0d: q=%b expected %b", row, q8, TABLE_OUT[row]);
      end
    end
    // Exhaustive 8-bit.
    for (int w = 0; w < 256; w++) begin
      for (int k = 0; k < 8; k++) begin
        d8 = 8'(w);
        s8 = 3'(k);
        #1;
        checks++;
        if (q8 !== 8'(ror_ref(16'(w), 4 * k[0] + 2 * k[1] + k[2], 8))) begin
          failures++;
          $display("FAIL d=%b S0=%b S1=%b S2=%b q=%b", d8, s8[0], s8[1], s8[2], q8);
        end
      end
    end
    // 16-bit: s16[0] (S0) rotates by 8, s16[3] (S3) by 1.
    for (int r = 0; r < 500; r++) begin
      d16 = 16'($urandom);
      s16 = 4'($urandom);
      #1;
      checks++;
      if (q16 !== ror_ref(d16, 8 * s16[0] + 4 * s16[1] + 2 * s16[2] + s16[3], 16)) begin
        failures++;
        $display("FAIL 16-bit d=%h s=%b q=%h", d16, s16, q16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
