// fm0_manchester_miller_tb: end-to-end test of the FM0 / Manchester /
// Miller line encoder, at its default (and only) configuration.
//
// A 20 ns bit clock; each bit starts at a rising edge, data and controls
// change 1 ns after it, and code_out is sampled in the middle of each
// half-bit. The run first sends Manchester, then FM0, then Miller bits
// (the order of the reference simulation of the design), then random
// bursts of random codes and data. The expected line levels are computed
// from the code definitions:
//   FM0:        first half = inverse of the previous FM0 second half,
//               second half = first half if the bit is 1, inverse if 0
//   Manchester: first half = ~bit, second half = bit
//   Miller:     level unchanged at a bit edge, flips mid-bit on a 1
// Both storage elements keep running while their output is not selected
// (FM0 state during Miller bits and the reverse), and Manchester mode
// clears both, so the model tracks both states in every mode. The test
// counts FM0 0- and 1-bits, Manchester bits, Miller mid-bit flips, clears
// that wipe a non-zero state, mode switches and cs switches, and fails if
// any of them never happened. Each bit is checked inside its own clock
// period: one bit per clock, no latency.
`timescale 1ns / 1ps

module fm0_manchester_miller_tb;
  import dsrc_enc_pkg::*;

  logic clk;
  logic clr = 1'b1;
  logic mode = 1'b1;
  logic cs = 1'b0;
  logic x_in = 1'b0;
  logic code_out;

  int checks = 0;
  int failures = 0;

  // Mechanism counters.
  int n_fm0_zero = 0;
  int n_fm0_one = 0;
  int n_manchester = 0;
  int n_miller_flip = 0;
  int n_miller_hold = 0;
  int n_clear = 0;
  int n_mode_switch = 0;
  int n_cs_switch = 0;

  // Reference state.
  logic fm0_prev = 1'b0;     // FM0 level of the previous second half-bit
  logic mil_level = 1'b0;    // Miller level

  fm0_manchester_miller dut (
    .clk      (clk),
    .clr      (clr),
    .mode     (mode),
    .cs       (cs),
    .x_in     (x_in),
    .code_out (code_out)
  );

  initial begin
    clk = 1'b0;
    forever #10 clk = ~clk;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (code_out !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, code_out, exp);
    end
  endtask

  task automatic send_bit(input line_code_e c, input logic b);
    enc_ctrl_t k;
    logic exp_a, exp_b, fm0_a, fm0_b;
    k = ctrl_for(c);
    @(posedge clk);
    #1;
    if (k.mode != mode) n_mode_switch++;
    if (k.cs != cs) n_cs_switch++;
    mode = k.mode;
    clr  = k.clr;
    cs   = k.cs;
    x_in = b;
    if (k.clr == CLR_ACTIVE) begin
      if (fm0_prev || mil_level) n_clear++;
      fm0_prev  = 1'b0;
      mil_level = 1'b0;
    end
    fm0_a = ~fm0_prev;
    fm0_b = b ? fm0_a : ~fm0_a;
    case (c)
      CODE_FM0: begin
        exp_a = fm0_a;
        exp_b = fm0_b;
        if (b) n_fm0_one++;
        else   n_fm0_zero++;
      end
      CODE_MANCHESTER: begin
        exp_a = ~b;
        exp_b = b;
        n_manchester++;
      end
      default: begin
        exp_a = mil_level;
        exp_b = mil_level ^ b;
        if (b) n_miller_flip++;
        else   n_miller_hold++;
      end
    endcase
    #4 check(exp_a, c.name());
    @(negedge clk);
    #5 check(exp_b, c.name());
    if (k.clr != CLR_ACTIVE) begin
      fm0_prev  = fm0_b;
      mil_level = mil_level ^ b;
    end
  endtask

  initial begin
    #1 clr = 1'b0;
    // Manchester, FM0, Miller in turn, as in the reference simulation.
    for (int i = 0; i < 8; i++) send_bit(CODE_MANCHESTER, 1'(8'b0110_1010 >> i));
    for (int i = 0; i < 8; i++) send_bit(CODE_FM0, 1'(8'b1001_1101 >> i));
    for (int i = 0; i < 8; i++) send_bit(CODE_MILLER, 1'(8'b1110_0110 >> i));
    // Random bursts.
    for (int r = 0; r < 150; r++) begin
      line_code_e c;
      int n;
      c = line_code_e'($urandom_range(0, 2));
      n = 1 + int'($urandom_range(0, 11));
      for (int i = 0; i < n; i++) send_bit(c, 1'($urandom_range(0, 1)));
    end
    $display("fm0 0-bits %0d, fm0 1-bits %0d, manchester %0d, miller flips %0d, holds %0d",
             n_fm0_zero, n_fm0_one, n_manchester, n_miller_flip, n_miller_hold);
    $display("clears %0d, mode switches %0d, cs switches %0d",
             n_clear, n_mode_switch, n_cs_switch);
    if (n_fm0_zero == 0 || n_fm0_one == 0 || n_manchester == 0 || n_miller_flip == 0 ||
        n_miller_hold == 0 || n_clear == 0 || n_mode_switch == 0 || n_cs_switch == 0) begin
      failures++;
      $display("coverage hole: a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
