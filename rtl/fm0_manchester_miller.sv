// fm0_manchester_miller: FM0 / Manchester / Miller line encoder for the
// baseband transmitter of a DSRC transceiver.
//
// The SOLS FM0/Manchester core and the Miller T flip-flop both watch the
// same data bit x_in and bit clock; an output multiplexer selected by cs
// chooses which of them drives the line. Control settings:
//   FM0        mode = 0, clr = 1, cs = 0
//   Manchester mode = 1, clr = 0, cs = 0
//   Miller     mode = 0, clr = 1, cs = 1
// clr also initialises both storage elements (asynchronous, active low),
// which is why it is a separate input and not derived from mode. The
// structure (core, T flip-flop, cs multiplexer) follows the encoder
// architecture; which cs value selects which input, and the Manchester cs
// value, are this design's reading of a specification that disagrees with
// itself on that point.
//
// Interface: one data bit per clk period, a period starts at the rising
// edge of clk with the first half-bit while clk is high; x_in must change
// only just after a rising edge. code_out is a half-bit-rate waveform with
// no register at the output: it follows clk combinationally in FM0 and
// Manchester modes and the falling-edge T flip-flop in Miller mode.
`timescale 1ns / 1ps

module fm0_manchester_miller
  import dsrc_enc_pkg::*;
(
  input  logic clk,       // bit clock
  input  logic clr,       // asynchronous clear / initialisation, active low
  input  logic mode,      // 0 FM0, 1 Manchester (SOLS core)
  input  logic cs,        // 0 SOLS core output, 1 Miller output
  input  logic x_in,      // data bit
  output logic code_out   // encoded line signal
);

  logic sols_code;
  logic miller_code;

  sols_fm0_manchester u_sols (
    .clk  (clk),
    .clr  (clr),
    .mode (mode),
    .x    (x_in),
    .code (sols_code)
  );

  miller_tff u_miller (
    .clk (clk),
    .clr (clr),
    .x   (x_in),
    .q   (miller_code)
  );

  assign code_out = (cs == CS_SEL_MILLER) ? miller_code : sols_code;

endmodule
