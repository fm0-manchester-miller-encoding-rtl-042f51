// sols_fm0_manchester_tb: self-checking test of the SOLS FM0/Manchester
// core.
//
// A 20 ns bit clock drives the core; each bit starts at a rising edge, the
// data and controls change 1 ns after it, and the code is sampled in the
// middle of each half-bit (5 ns and 15 ns into the bit). The expected
// levels come from the code definitions, not from the datapath:
//   FM0:        first half = inverse of the previous bit's second half,
//               second half = first half if the bit is 1, its inverse if 0
//   Manchester: first half = ~bit, second half = bit
// The sequence starts in Manchester mode (which holds the clear), runs
// fixed and random FM0 streams, and alternates the two modes so that the
// clear-on-Manchester initialisation of the FM0 state is exercised. Both
// halves are checked in the same bit period, so the code has no latency.
`timescale 1ns / 1ps

module sols_fm0_manchester_tb;
  import dsrc_enc_pkg::*;

  logic clk;
  logic clr = 1'b0;
  logic mode = 1'b1;
  logic x = 1'b0;
  logic code;

  int checks = 0;
  int failures = 0;
  int fm0_mid_flips = 0;
  int fm0_no_flips = 0;
  int manchester_bits = 0;
  int init_after_manchester = 0;

  logic fm0_prev = 1'b0;   // level of the previous FM0 second half-bit
  logic was_manchester = 1'b1;

  sols_fm0_manchester dut (
    .clk  (clk),
    .clr  (clr),
    .mode (mode),
    .x    (x),
    .code (code)
  );

  initial begin
    clk = 1'b0;
    forever #10 clk = ~clk;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  // Send one bit in FM0 (manch = 0) or Manchester (manch = 1) mode.
  task automatic send_bit(input logic manch, input logic b);
    logic exp_a, exp_b;
    enc_ctrl_t k;
    k = manch ? CTRL_MANCHESTER : CTRL_FM0;
    if (k.cs == CS_SEL_MILLER) $fatal(1, "control table selects the Miller path");
    @(posedge clk);
    #1;
    mode = k.mode;
    clr  = k.clr;
    x    = b;
    if (manch) begin
      fm0_prev = 1'b0;
      exp_a = ~b;
      exp_b = b;
      manchester_bits++;
    end else begin
      if (was_manchester) init_after_manchester++;
      exp_a = ~fm0_prev;
      exp_b = b ? exp_a : ~exp_a;
      if (b) fm0_no_flips++;
      else   fm0_mid_flips++;
    end
    was_manchester = manch;
    #4 check(code, exp_a, manch ? "manchester first half" : "fm0 first half");
    @(negedge clk);
    #5 check(code, exp_b, manch ? "manchester second half" : "fm0 second half");
    if (!manch) fm0_prev = exp_b;
  endtask

  initial begin
    // Manchester with the clear held, then a fixed FM0 pattern.
    for (int i = 0; i < 8; i++) send_bit(1'b1, 1'(i % 3 == 0));
    for (int i = 0; i < 8; i++) send_bit(1'b0, 1'(8'b1011_0010 >> i));
    // Alternate modes with random data and random run lengths.
    for (int r = 0; r < 40; r++) begin
      logic manch;
      int n;
      manch = 1'(r % 2);
      n = 1 + int'($urandom_range(0, 9));
      for (int i = 0; i < n; i++) send_bit(manch, 1'($urandom_range(0, 1)));
    end
    if (fm0_mid_flips == 0 || fm0_no_flips == 0 || manchester_bits == 0 ||
        init_after_manchester < 2) begin
      failures++;
      $display("coverage hole: fm0 0-bits %0d, fm0 1-bits %0d, manchester %0d, inits %0d",
               fm0_mid_flips, fm0_no_flips, manchester_bits, init_after_manchester);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
