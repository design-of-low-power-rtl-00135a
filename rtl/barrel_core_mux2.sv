// barrel_core_mux2: combinational rotate-right network built from
// log2(WIDTH) stages of WIDTH 2:1 multiplexers (24 multiplexers for 8 bits,
// n*log2(n)).
//
// Each stage either passes its word straight through (select low, mux
// input 0) or rotates it right by a fixed power of two (select high, mux
// input 1 taken from the bit that many places higher, wrapping from the LSB
// end to the MSB end). The stages are cascaded, so they act independently
// and their rotations add up.
//
// Select naming follows the 8-bit schematic: s[k] is line Sk, and the stage
// driven by Sk rotates by 2**(STAGES-1-k). For WIDTH = 8 that is S2 by 1
// (first stage), S1 by 2, S0 by 4 (last stage), so the rotate amount is the
// binary number S0 S1 S2 and, e.g., S2 = S0 = 1 rotates right by five.
// Bit i of a stage output with its select high is bit (i + 2**j) mod WIDTH
// of the stage input, which reproduces the worked truth table
// (00001111 rotated by S0 S1 S2 = 001 gives 10000111).
//
// Ports: d data D, s select lines, q rotated data Q. No clock.
module barrel_core_mux2 #(
  parameter int unsigned WIDTH = 8,
  localparam int unsigned STAGES = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0]  d,
  input  logic [STAGES-1:0] s,
  output logic [WIDTH-1:0]  q
);
  timeunit 1ns;
  timeprecision 10ps;

  if (WIDTH < 2 || WIDTH != (1 << STAGES)) begin : g_bad_width
    $error("barrel_core_mux2: WIDTH must be a power of two, at least 2");
  end

  // lvl[j] is the word entering stage j; lvl[STAGES] is the result.
  logic [WIDTH-1:0] lvl [STAGES+1];

  assign lvl[0] = d;

  for (genvar j = 0; j < STAGES; j++) begin : g_stage
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      mux2 u_mux (
        .w0(lvl[j][i]),
        .w1(lvl[j][(i + (1 << j)) % WIDTH]),
        .s (s[STAGES-1-j]),
        .f (lvl[j+1][i])
      );
    end
  end

  assign q = lvl[STAGES];
endmodule
