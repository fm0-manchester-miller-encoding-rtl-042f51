// sols_fm0_manchester: fully re-used FM0 / Manchester encoder built with
// similarity-oriented logic simplification (SOLS).
//
// One data bit X is sent per period of CLK. The period starts with CLK high
// (first half-bit, "A") and ends with CLK low (second half-bit, "B"):
//   FM0        A(t) = ~B(t-1)             level always flips at a bit edge
//              B(t) =  X xor B(t-1)        mid-bit flip only when X = 0
//   Manchester A = ~X, B = X               i.e. X xor CLK
// The datapath is the SOLS one: MUX_2 (select MODE) passes B(t-1) for FM0
// or X for Manchester; MUX_1 (select CLK) passes MUX_2 in the first half and
// XNOR(X, B(t-1)) in the second half; one shared inverter after MUX_1 gives
// the code. DFF B holds B(t-1). In Manchester mode CLR is held low, DFF B
// stays 0 and the XNOR becomes a plain inverter of X, so every gate is used
// in both codes.
//
// Interface: clk is the bit clock, used both as a clock and as the MUX_1
// select, so the output is a combinational function of clk (a
// half-bit-rate waveform). x must be stable from just after a rising edge
// of clk to just after the next one. clr is an asynchronous active-low
// clear of DFF B; FM0 runs with clr = 1, Manchester with clr = 0, and an
// assertion flags mode = 1 with clr = 1 at a rising clock edge (the
// assertion samples clr on clk; this is the only synchronous use of the
// asynchronous clear, and lint reports it as such).
//
// Timing: DFF B loads on the rising clk edge, when the second half-bit
// ends, the level the code had during that half. That level is taken from
// the MUX_1 0-input path through the inverter, which is what MUX_1 still
// selects at that edge; taking it there rather than after MUX_1 keeps the
// register free of a clock-to-select race. The edge and the clear polarity
// are this design's choice; the gate structure follows the SOLS
// architecture.
`timescale 1ns / 1ps

module sols_fm0_manchester (
  input  logic clk,    // bit clock, also MUX_1 select
  input  logic clr,    // asynchronous clear of DFF B, active low
  input  logic mode,   // MUX_2 select: 0 FM0, 1 Manchester
  input  logic x,      // data bit
  output logic code    // FM0 / Manchester code
);

  logic b_q;        // DFF B: B(t-1)
  logic xnor_out;   // logic for B(t)/X
  logic mux2_out;   // logic for A(t)/X
  logic mux1_out;

  always_comb begin
    xnor_out = ~(x ^ b_q);
    mux2_out = mode ? x : b_q;
    mux1_out = clk ? mux2_out : xnor_out;
    code     = ~mux1_out;
  end

  always_ff @(posedge clk or negedge clr) begin
    if (!clr) b_q <= 1'b0;   // active-low clear
    else      b_q <= ~xnor_out;
  end

  // Manchester mode is only Manchester code while DFF B is held cleared.
  a_manchester_needs_clear: assert property (@(posedge clk) mode |-> !clr)
    else $error("mode = 1 (Manchester) with clr = 1: output is not Manchester code");

endmodule
