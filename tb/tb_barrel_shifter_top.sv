// tb_barrel_shifter_top: end-to-end test of barrel_shifter_top at its
// default parameters (8 bits, TPW = 1 ns), with a 10 ns clock.
//
// Both pulsed-latch shifters get the same data and select codes each cycle
// and must match an independent rotate-right reference and each other.
// Each round:
//   1. 2 ns after a rising edge a new select code and data are presented;
//      q must still use the previous select code (select held) but the
//      new data (combinational data path).
//   2. Mid-cycle the data changes again and q must follow.
//   3. 1.5 ns after the next rising edge q must show the new rotation: the
//      shift completes in the clock cycle in which the code is taken.
//   4. Some rounds change the select code inside the pulse, which a pulsed
//      latch passes straight through.
// Alongside, the shift/rotate unit is driven with random operands, amounts
// and opcodes and checked against a bit-by-bit reference.
// Counted mechanisms, each of which must occur: select captured at an edge,
// select held between edges, data path transparent, select changed inside
// the pulse, every rotate amount 0..7 on both shifters, every opcode of the
// shift/rotate unit.
module tb_barrel_shifter_top;
  import barrel_pkg::*;
  timeunit 1ns;
  timeprecision 10ps;

  logic       clk = 1'b0;
  logic [7:0] d, m2_q, m8_q;
  logic [2:0] s, s_old;
  logic [7:0] su_a, su_f;
  logic [2:0] su_amt;
  shift_op_t  su_op;
  int checks = 0, failures = 0;

  int n_capture = 0, n_hold = 0, n_data = 0, n_in_pulse = 0;
  int n_amount [8];
  int n_op [6];

  barrel_shifter_top dut (
    .clk,
    .m2_d(d), .m2_s(s), .m2_q,
    .m8_d(d), .m8_s(s), .m8_q,
    .su_a, .su_amt, .su_op, .su_f
  );

  always #5 clk = ~clk;

  function automatic int amount(input logic [2:0] sel);
    return 4 * sel[0] + 2 * sel[1] + sel[2];
  endfunction

  function automatic logic [7:0] ref_q(input logic [7:0] x, input logic [2:0] sel);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = x[(i + amount(sel)) % 8];
    return r;
  endfunction

  function automatic logic [7:0] ref_su(input logic [7:0] x, input int n, input shift_op_t o);
    for (int k = 0; k < n; k++) begin
      if (o.left) x = {x[6:0], o.rotate ? x[7] : 1'b0};
      else        x = {o.rotate ? x[0] : (o.arith ? x[7] : 1'b0), x[7:1]};
    end
    return x;
  endfunction

  // Index 0..5: SRL, SRA, ROR, SLL, SLA, ROL.
  function automatic int op_index(input shift_op_t o);
    if (o.rotate) return o.left ? 5 : 2;
    return (o.left ? 3 : 0) + (o.arith ? 1 : 0);
  endfunction

  task automatic expect_both(input logic [7:0] exp, input string what);
    checks += 2;
    if (m2_q !== exp) begin
      failures++;
      $display("FAIL 2:1 shifter, %s at %0t: d=%b s=%b q=%b expected %b", what, $realtime, d, s, m2_q, exp);
    end
    if (m8_q !== exp) begin
      failures++;
      $display("FAIL 8:1 shifter, %s at %0t: d=%b s=%b q=%b expected %b", what, $realtime, d, s, m8_q, exp);
    end
  endtask

  task automatic check_su();
    su_a   = 8'($urandom);
    su_amt = 3'($urandom);
    su_op  = shift_op_t'(3'($urandom));
    #0.1;
    checks++;
    if (su_f !== ref_su(su_a, int'(su_amt), su_op)) begin
      failures++;
      $display("FAIL shift/rotate op=%b a=%b amt=%0d f=%b", su_op, su_a, su_amt, su_f);
    end else begin
      n_op[op_index(su_op)]++;
    end
  endtask

  initial begin : watchdog
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 8'b00001111;
    s = 3'b000;
    su_a = '0;
    su_amt = '0;
    su_op = '0;
    @(posedge clk);
    #2;
    s_old = s;
    for (int r = 0; r < 400; r++) begin
      logic [7:0] q_prev;
      // Step 1: new select code and data, 2 ns after the edge.
      q_prev = m2_q;
      s = (r < 8) ? 3'(r) : 3'($urandom);
      d = (r < 8) ? 8'b00001111 : 8'($urandom);
      #1 expect_both(ref_q(d, s_old), "select held, data passed");
      if (amount(s) != amount(s_old) && ref_q(d, s) != ref_q(d, s_old)) n_hold++;
      // Step 2: data change mid-cycle.
      #3 d = 8'($urandom);
      #1 expect_both(ref_q(d, s_old), "data change mid-cycle");
      if (m2_q != q_prev) n_data++;
      check_su();
      // Step 3: next edge takes the select code.
      @(posedge clk);
      if (r % 7 == 3) begin
        // Step 4: change the code 0.3 ns into the pulse.
        #0.3 s = s ^ 3'b101;
        #0.2 expect_both(ref_q(d, s), "select changed inside pulse");
        n_in_pulse++;
        #1.0;
      end else begin
        #1.5;
      end
      expect_both(ref_q(d, s), "new select within the cycle");
      if (ref_q(d, s) != ref_q(d, s_old)) n_capture++;
      n_amount[amount(s)]++;
      s_old = s;
      #0.5;
    end

    $display("mechanisms: capture=%0d hold=%0d data=%0d in_pulse=%0d",
             n_capture, n_hold, n_data, n_in_pulse);
    checks++;
    if (n_capture == 0 || n_hold == 0 || n_data == 0 || n_in_pulse == 0) begin
      failures++;
      $display("FAIL a pulsed-latch mechanism never occurred");
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (n_amount[k] == 0) begin
        failures++;
        $display("FAIL rotate amount %0d never exercised", k);
      end
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (n_op[k] == 0) begin
        failures++;
        $display("FAIL shift/rotate operation %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
