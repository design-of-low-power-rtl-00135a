// tb_barrel_core_mux8: checks the 8:1-multiplexer rotate network
// exhaustively (every data word, every select code) against a reference
// rotate-right by 4*S0 + 2*S1 + S2 places, and against the eight rows of the
// worked truth table for data 00001111.
module tb_barrel_core_mux8;
  timeunit 1ns;
  timeprecision 10ps;

  logic [7:0] d8, q8;
  logic [2:0] s8;
  int checks = 0, failures = 0;

  barrel_core_mux8 dut (.d(d8), .s(s8), .q(q8));

  function automatic logic [7:0] ror_ref(input logic [7:0] d, input int n);
    logic [7:0] r = '0;
    for (int i = 0; i < 8; i++) r[i] = d[(i + n) % 8];
    return r;
  endfunction

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
    for (int row = 0; row < 8; row++) begin
      d8 = 8'b00001111;
      s8 = {row[0], row[1], row[2]};
      #1;
      checks++;
      if (q8 !== TABLE_OUT[row]) begin
        failures++;
        $display("FAIL table row %0d: q=%b expected %b", row, q8, TABLE_OUT[row]);
      end
    end
    for (int w = 0; w < 256; w++) begin
      for (int k = 0; k < 8; k++) begin
        d8 = 8'(w);
        s8 = 3'(k);
        #1;
        checks++;
        if (q8 !== ror_ref(8'(w), 4 * k[0] + 2 * k[1] + k[2])) begin
          failures++;
          $display("FAIL d=%b S0=%b S1=%b S2=%b q=%b", d8, s8[0], s8[1], s8[2], q8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
