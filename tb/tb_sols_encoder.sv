// tb_sols_encoder: self-checking end-to-end test of the FM0 / Manchester encoder.
//
// CLK runs at a 10 ns period, high in the first half. Every input change is
// made 1 ns after a rising edge; the output is sampled 3 ns after the rising
// edge (first half-bit) and 3 ns after the falling edge (second half-bit).
// Each sent bit is checked three ways: against a reference model of the two
// codes, against the coding rules (FM0: a transition at every bit boundary and
// a mid-bit transition exactly when X = 0; Manchester: always a mid-bit
// transition), and by decoding the two half-bits back to X. A short hand-worked
// vector is checked first. The test then counts the mechanisms it exercised:
// FM0 bits with and without a mid-bit transition, Manchester bits, switches
// in both directions, and CLR initialisations in the middle of FM0 traffic.
// The rate check asserts that N bits take exactly N CLK cycles.
`timescale 1ns/1ps
module tb_sols_encoder;
  import sols_pkg::*;

  localparam int NBITS = 400;

  logic clk = 1'b1;
  logic clr, mode, x;
  logic enc, b_state;

  int checks = 0, failures = 0;
  int fm0_bits = 0, fm0_mid = 0, fm0_flat = 0, man_bits = 0;
  int to_man = 0, to_fm0 = 0, clr_inits = 0;
  int unsigned cycle = 0;

  logic ref_b;             // model of DFFB
  logic prev_second;       // second half of the previous FM0 bit
  logic prev_valid;        // prev_second belongs to an FM0 bit

  sols_encoder dut (
    .clk_i(clk), .clr_i(clr), .mode_i(mode), .x_i(x),
    .enc_o(enc), .b_state_o(b_state)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (cycle %0d)", what, got, exp, cycle);
    end
  endtask

  // Drive one bit period; return the two sampled half-bits.
  task automatic period(input logic c, input logic m, input logic xv,
                        output logic first, output logic second);
    @(posedge clk);
    #1 clr = c; mode = m; x = xv;
    #2 first = enc;
    #5 second = enc;
  endtask

  task automatic send_fm0(input logic xv);
    logic f, s;
    period(1'b0, MODE_FM0, xv, f, s);
    check(b_state, ref_b, "FM0 DFFB state");
    check(f, ~ref_b, "FM0 first half");
    check(s, ref_b ^ xv, "FM0 second half");
    if (prev_valid) check(f, ~prev_second, "FM0 boundary transition");
    check(f != s, xv == 1'b0, "FM0 mid-bit transition rule");
    check(f == s, xv, "FM0 decode");
    if (xv) fm0_flat++; else fm0_mid++;
    fm0_bits++;
    ref_b = s;
    prev_second = s;
    prev_valid = 1'b1;
  endtask

  task automatic send_man(input logic xv);
    logic f, s;
    period(1'b1, MODE_MANCHESTER, xv, f, s);
    check(b_state, 1'b0, "Manchester DFFB cleared");
    check(f, ~xv, "Manchester first half");
    check(s, xv, "Manchester second half");
    check(f != s, 1'b1, "Manchester mid-bit transition");
    check(s, xv, "Manchester decode");
    man_bits++;
    prev_valid = 1'b0;
  endtask

  // One CLR period in FM0 mode: reinitialise DFFB, send no data.
  task automatic init_fm0();
    logic f, s;
    period(1'b1, MODE_FM0, 1'b0, f, s);
    check(b_state, 1'b0, "CLR clears DFFB");
    ref_b = 1'b0;
    prev_valid = 1'b0;
    clr_inits++;
  endtask

  initial begin : stim
    static logic [4:0] vec_fm0 = 5'b10110;  // sent MSB first
    static logic [9:0] exp_fm0 = 10'b11_01_00_11_01;
    static logic [1:0] vec_man = 2'b10;
    static logic [3:0] exp_man = 4'b01_10;
    logic f, s, m, prev_m;
    int unsigned c0;

    clr = 1'b1; mode = MODE_FM0; x = 1'b0;
    ref_b = 1'b0; prev_second = 1'b0; prev_valid = 1'b0;
    repeat (2) @(posedge clk);
    init_fm0();

    // Hand-worked FM0 vector from the cleared state.
    for (int i = 4; i >= 0; i--) begin
      period(1'b0, MODE_FM0, vec_fm0[i], f, s);
      check(f, exp_fm0[2*i+1], "FM0 vector first half");
      check(s, exp_fm0[2*i],   "FM0 vector second half");
      ref_b = s; prev_second = s; prev_valid = 1'b1; fm0_bits++;
    end
    // Hand-worked Manchester vector.
    to_man++;
    for (int i = 1; i >= 0; i--) begin
      period(1'b1, MODE_MANCHESTER, vec_man[i], f, s);
      check(f, exp_man[2*i+1], "Manchester vector first half");
      check(s, exp_man[2*i],   "Manchester vector second half");
      man_bits++;
    end
    prev_valid = 1'b0;
    ref_b = 1'b0;
    to_fm0++;

    // Random traffic: runs of each mode, random switches and CLR re-inits.
    prev_m = MODE_FM0;
    @(posedge clk);
    c0 = cycle;
    for (int n = 0; n < NBITS; n++) begin
      if (($urandom % 16) == 0) m = ~prev_m; else m = prev_m;
      if (m != prev_m) begin
        if (m == MODE_MANCHESTER) to_man++;
        else begin to_fm0++; ref_b = 1'b0; end
      end
      prev_m = m;
      if (m == MODE_FM0) send_fm0(1'($urandom));
      else               send_man(1'($urandom));
      if (m == MODE_FM0 && ($urandom % 40) == 0) init_fm0();
    end
    // Rate: one bit (or one CLR period) per CLK cycle.
    checks++;
    if (cycle - c0 != NBITS + clr_inits) begin
      failures++;
      $display("FAIL rate: %0d cycles for %0d periods", cycle - c0, NBITS + clr_inits);
    end

    $display("mechanisms: fm0_bits=%0d fm0_mid=%0d fm0_flat=%0d man_bits=%0d to_man=%0d to_fm0=%0d clr_inits=%0d",
             fm0_bits, fm0_mid, fm0_flat, man_bits, to_man, to_fm0, clr_inits);
    if (fm0_mid == 0)   begin failures++; $display("FAIL never: FM0 bit with mid transition"); end
    if (fm0_flat == 0)  begin failures++; $display("FAIL never: FM0 bit without mid transition"); end
    if (man_bits == 0)  begin failures++; $display("FAIL never: Manchester bit"); end
    if (to_man < 2)     begin failures++; $display("FAIL never: switch to Manchester"); end
    if (to_fm0 < 2)     begin failures++; $display("FAIL never: switch to FM0"); end
    if (clr_inits < 2)  begin failures++; $display("FAIL never: CLR initialisation in FM0"); end
    checks += 6;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
