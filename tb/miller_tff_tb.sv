// miller_tff_tb: self-checking test of the Miller T flip-flop path.
//
// A 20 ns bit clock; each bit starts at a rising edge, the data changes
// 1 ns after it and the output is sampled 5 ns and 15 ns into the bit.
// Expected behaviour: the level is constant across a bit boundary, changes
// in the middle of a bit whose value is 1 and stays put in a 0 bit; the
// asynchronous active-low clear forces it to 0 at once, even in the
// middle of a bit, and holds it there.
`timescale 1ns / 1ps

module miller_tff_tb;
  import dsrc_enc_pkg::*;

  logic clk;
  logic clr = 1'b1;
  logic x = 1'b0;
  logic q;

  int checks = 0;
  int failures = 0;
  int mid_flips = 0;
  int clears = 0;
  logic level = 1'b0;

  miller_tff dut (
    .clk (clk),
    .clr (clr),
    .x   (x),
    .q   (q)
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

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, q, exp);
    end
  endtask

  task automatic send_bit(input logic b);
    @(posedge clk);
    #1 x = b;
    #4 check(level, "first half");
    @(negedge clk);
    #5;
    if (b && clr != CLR_ACTIVE) begin
      level = ~level;
      mid_flips++;
    end
    check(level, "second half");
  endtask

  initial begin
    // Held in clear: the output stays 0 whatever the data.
    #1 clr = 1'b0;
    repeat (3) send_bit(1'b1);
    @(posedge clk);
    #1 clr = 1'b1;
    x = 1'b0;
    for (int i = 0; i < 16; i++) send_bit(1'(16'b1101_0011_1000_1011 >> i));
    for (int r = 0; r < 10; r++) begin
      for (int i = 0; i < 20; i++) send_bit(1'($urandom_range(0, 1)));
      if (level == 1'b0) send_bit(1'b1);   // make the clear observable
      // Clear in the middle of the second half-bit.
      #2 clr = 1'b0;
      #1 level = 1'b0;
      clears++;
      check(level, "asynchronous clear");
      @(posedge clk);
      #1 clr = 1'b1;
      x = 1'b0;
    end
    if (mid_flips == 0 || clears == 0) begin
      failures++;
      $display("coverage hole: flips %0d clears %0d", mid_flips, clears);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
