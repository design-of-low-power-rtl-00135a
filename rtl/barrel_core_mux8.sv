// barrel_core_mux8: combinational 8-bit rotate-right network built from
// eight 8:1 multiplexers, one per output bit.
//
// Output bit Qi has its multiplexer input Ij wired to data bit D((i+j) mod 8),
// so a select value n routes D((i+n) mod 8) to Qi: a rotate right by n in a
// single multiplexer level. The select lines carry the same meaning as in the
// 2:1-multiplexer shifter (s[k] is line Sk, S0 weighs 4, S1 2, S2 1), so both
// shifters give the same output for the same inputs; the 8:1 select is
// therefore {S0, S1, S2}. That wiring of the select lines is this design's
// choice.
//
// Ports: d data D, s select lines, q rotated data Q. No clock.
module barrel_core_mux8 (
  input  logic [7:0] d,
  input  logic [2:0] s,
  output logic [7:0] q
);
  timeunit 1ns;
  timeprecision 10ps;

  logic [2:0] amount;

  assign amount = {s[0], s[1], s[2]};

  for (genvar i = 0; i < 8; i++) begin : g_bit
    logic [7:0] taps;
    for (genvar j = 0; j < 8; j++) begin : g_tap
      assign taps[j] = d[(i + j) % 8];
    end
    mux8 u_mux (
      .i  (taps),
      .sel(amount),
      .out(q[i])
    );
  end
endmodule
