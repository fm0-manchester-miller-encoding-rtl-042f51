# FM0 / Manchester / Miller line encoder for DSRC

Dedicated short-range communication (DSRC) links between vehicles and
roadside units send their bits as dc-balanced line codes. The standards use
FM0 and Manchester, and this encoder adds Miller. This RTL is the line encoder
of a DSRC baseband transmitter. It takes one data bit per clock period and
drives one line output carrying FM0, Manchester or Miller code. Three static
control inputs pick the code.

The design idea is hardware re-use. FM0 and Manchester look different, but
both can be computed by one small datapath: two 2:1 multiplexers, one XNOR,
one inverter and one flip-flop. The technique behind this is called
similarity-oriented logic simplification (SOLS). No gate sits idle in either
mode. Miller code comes from one extra T flip-flop. A final multiplexer
chooses between the SOLS output and the Miller output.

## Half-bit timing

Each code sends two half-bits per data bit. Here a bit period is one period
of `clk`:

| half-bit | `clk` | name |
|----------|-------|------|
| first    | 1     | A(t) |
| second   | 0     | B(t) |

A bit starts at a rising edge of `clk`. `x_in` must change only just after
that rising edge and then stay stable for the whole period.

| code       | first half A(t)        | second half B(t)                       |
|------------|------------------------|----------------------------------------|
| FM0        | `~B(t-1)` (always flips at the bit edge) | `x ? A : ~A` (flips mid-bit only for a 0) |
| Manchester | `~x`                   | `x` (so the code is `x ^ clk`)         |
| Miller (as built) | previous level  | flips mid-bit only for a 1             |

`code_out` has no output register. In FM0 and Manchester modes it follows
`clk` combinationally. In Miller mode it follows a flip-flop clocked on the
falling edge. In every mode the first half of a bit already shows that bit's
code, so the encoder adds no latency.

## The shared SOLS datapath

```
            mode                      clk
             |                         |
 B(t-1) --> |0\                        |
            |  MUX_2 ----------------> |1\
 x      --> |1/   (A logic)            |  MUX_1 --> NOT --+--> code (SOLS output)
                                       |0/                |
 x, B(t-1) --> XNOR  (B logic) ------> |                  |
                                                         D|
                          B(t-1) <------------- DFF B <---+   (rising clk, clear = ~clr)
```

The sketch above is `rtl/sols_fm0_manchester.sv`.

- **FM0 (`mode = 0`, `clr = 1`).** While `clk` is high, MUX_2 passes the
  stored level B(t-1) and the inverter gives `~B(t-1)`. That is A(t), so
  the line always flips at a bit edge. While `clk` is low, the XNOR
  path gives `~XNOR(x, B(t-1)) = x ^ B(t-1)`. That is B(t): equal to A for
  a 1 and inverted for a 0. At the next rising edge DFF B stores this
  level as the new B(t-1).
- **Manchester (`mode = 1`, `clr = 0`).** Holding `clr` low keeps DFF B at
  0. While `clk` is high, MUX_2 passes `x` and the inverter gives `~x`.
  While `clk` is low, the XNOR with a 0 operand acts as an inverter of `x`,
  and the shared inverter turns it back into `x`. Every gate is still on the
  signal path.
- **Why `clr` is a separate input.** In Manchester mode `clr` holds the
  flip-flop cleared. In FM0 mode it resets the encoder. Deriving it
  from `mode` would tie these two jobs together, so the controlling system
  drives `mode` and `clr` separately. Leaving Manchester mode therefore
  always starts FM0 from B(t-1) = 0, so the first FM0 half-bit is 1.
- **Where DFF B takes its input.** In the architecture, D is the inverter
  output. At the rising edge, MUX_1 is still selecting the XNOR path, so
  the RTL takes D from the XNOR path through the inverter (`~xnor_out`).
  The value is the same, and a zero-delay simulation has no race between
  the register and the clock-driven multiplexer select.

## The Miller path

`rtl/miller_tff.sv` is a T flip-flop. Its toggle input is `x_in` and its
asynchronous active-low clear is `clr`. It toggles on the falling edge of
`clk`, which is the middle of the bit. A 1 therefore gives a mid-bit
transition and a 0 gives none. This is the Miller rule for ones.

Textbook Miller (delay) modulation also puts a transition at the boundary
between two consecutive zeros. A single T flip-flop that sees only the
data, the clock and the clear cannot do that. This design does not add it,
so its "Miller" output differs from textbook Miller code on runs of zeros.
If you need the full code, add one flip-flop that remembers the previous
bit. Also toggle at the rising edge when both the previous bit and the
current bit are 0.

The T flip-flop runs whenever `clr = 1`, even while the SOLS output is
selected. Likewise, DFF B keeps following FM0 while Miller is selected.

## Control settings

| code       | `mode` | `clr` | `cs` |
|------------|--------|-------|------|
| FM0        | 0      | 1     | 0    |
| Manchester | 1      | 0     | 0    |
| Miller     | 0      | 1     | 1    |

`cs = 0` selects the SOLS output and `cs = 1` selects the Miller flip-flop.
The original specification of this encoder disagrees with itself here:

- One listing gives the three settings with `cs = 0` for FM0, `cs = 1` for
  Manchester and `cs = 1` for Miller.
- Another sentence says `cs = 1` selects FM0/Manchester, and gives Miller
  as `mode = 1, clr = 0, cs = 0`.

The table above keeps the FM0 and Miller rows of the first listing. That
listing also matches the state at the end of the reference simulation.
Manchester uses `cs = 0`, because only the SOLS output carries it. Any
setting with `clr = 0` holds the Miller flip-flop at 0, so `cs = 1` with
`clr = 0` gives a constant-0 line. `dsrc_enc_pkg::ctrl_for()` returns the
table row for a code.

## Interface of `fm0_manchester_miller` (top)

| port       | dir | meaning |
|------------|-----|---------|
| `clk`      | in  | bit clock, one data bit per period. It is also a multiplexer select |
| `clr`      | in  | asynchronous active-low clear of both flip-flops, and part of the mode setting |
| `mode`     | in  | 0 FM0, 1 Manchester |
| `cs`       | in  | 0 SOLS output, 1 Miller output |
| `x_in`     | in  | data bit |
| `code_out` | out | line code |

Integration notes:

- `clk` is used as data (MUX_1 select), as the architecture intends. In
  silicon or an FPGA, `code_out` can glitch around clock edges. It is meant
  to drive the RF modulator directly, not to be sampled by logic on the
  same clock.
- There is no synchroniser on `clr`.
- A concurrent assertion in the SOLS core flags `mode = 1` with `clr = 1`
  at a rising edge of `clk`. With that setting the line does not carry
  Manchester code.
- The design has no parameters. Its size is fixed: two flip-flops, three
  2:1 multiplexers, an XNOR and an inverter.

## Files

- `rtl/dsrc_enc_pkg.sv`: the control-setting struct, the code enum, the
  table above, and the clear and select polarities.
- `rtl/sols_fm0_manchester.sv`: the SOLS FM0/Manchester core.
- `rtl/miller_tff.sv`: the Miller T flip-flop.
- `rtl/fm0_manchester_miller.sv`: the top. It holds both paths and the
  `cs` multiplexer.
- `tb/*_tb.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

The testbenches get their expected levels from the code definitions, not
from the gate structure. They sample the line in the middle of each
half-bit. `tb/fm0_manchester_miller_tb.sv` first sends Manchester, then
FM0, then Miller bits. It then sends 150 random bursts of random codes.
Both internal states keep evolving in every mode, and the model tracks
them. The test counts FM0 zeros and ones, Manchester bits, Miller flips
and holds, clears of a non-zero state, `mode` switches and `cs` switches.
If any of these never happens, the test fails.

## Simulating

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module fm0_manchester_miller_tb \
    rtl/dsrc_enc_pkg.sv rtl/sols_fm0_manchester.sv rtl/miller_tff.sv \
    rtl/fm0_manchester_miller.sv tb/fm0_manchester_miller_tb.sv
./obj_dir/Vfm0_manchester_miller_tb
```

Replace the top module and the testbench file to run the block tests:
`sols_fm0_manchester_tb` and `miller_tff_tb`. Every file sets
`timescale 1ns/1ps`. The testbenches use a 20 ns bit clock.

## How far to trust it

These points come from the encoder architecture:

- the gate structure of the SOLS core;
- the use of `clk` as the select between the A and B logic;
- the T flip-flop driven by data, clock and clear;
- the `cs` output multiplexer;
- the control settings for FM0 and Miller.

These points are this design's own choices:

- the clear polarity (active low) and making the clear asynchronous;
- the edges: DFF B on the rising edge, the T flip-flop on the falling edge;
- which `cs` value selects which path, and `cs` for Manchester;
- a bit period that starts with `clk` high;
- taking DFF B's D input before MUX_1 rather than after it.

All three codes were checked in simulation against their definitions. No
timing analysis, FPGA fit or power estimate was made of this RTL. The
published implementation of this encoder was on a Cyclone II
EP2C35F672C6. It reported 5 logic cells, 1 dedicated logic register and
110.54 mW total thermal power, most of it static and I/O. This RTL holds
two flip-flops.

## Not included

The encoder is one part of a DSRC transceiver. These parts are outside
this RTL:

- the MAC-level microprocessor;
- the rest of the transmit baseband: modulation, error correction and
  clock synchronisation;
- the receive baseband, including any decoder;
- the RF front ends.

The system controller that drives `mode`, `clr` and `cs` is also outside
this RTL. These signals are ports of the top.
