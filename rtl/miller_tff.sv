// miller_tff: Miller-code path of the DSRC line encoder, a toggle
// flip-flop whose toggle input is the data bit.
//
// The flip-flop toggles at the falling edge of the bit clock, i.e. in the
// middle of the bit period, whenever x is 1, and holds otherwise. Its
// output therefore has a transition in the middle of every 1 bit and none
// in a 0 bit, which is the Miller rule for ones. The extra transition that
// textbook Miller (delay) modulation puts between two consecutive zeros is
// not produced: the path is a single T flip-flop fed only by the data, the
// bit clock and the clear.
//
// Interface: clk is the bit clock (a bit period starts at its rising edge),
// x is the data bit and must be stable around the falling edge, clr is an
// asynchronous active-low clear, q is the Miller output level.
// The T flip-flop with these three inputs follows the encoder architecture;
// the falling edge and the clear polarity are this design's choice.
`timescale 1ns / 1ps

module miller_tff (
  input  logic clk,   // bit clock
  input  logic clr,   // asynchronous clear, active low
  input  logic x,     // data bit, toggle enable
  output logic q      // Miller code level
);

  always_ff @(negedge clk or negedge clr) begin
    if (!clr)   q <= 1'b0;   // active-low clear
    else if (x) q <= ~q;
  end

endmodule
