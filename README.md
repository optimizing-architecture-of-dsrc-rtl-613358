# Gate-shared FM0, Manchester and differential Manchester line encoders for DSRC

Dedicated short-range communication (DSRC) links, such as electronic toll
collection between a vehicle and a roadside unit, encode the downlink bit stream
with a DC-free two-level line code before modulation. The European standard
(CEN, 500 kb/s) uses FM0. The American (ASTM, 27 Mb/s) and Japanese (ARIB,
4 Mb/s) standards use Manchester. A transceiver that serves more than one standard
needs both codes. The straightforward way is one encoder per code plus an output
multiplexer, but then part of the logic sits idle whichever code is in use.

The encoders here are built so that **every gate is active in every mode**. The
main design encodes FM0 or Manchester with one flip-flop, two 2:1 multiplexers,
one XNOR and one inverter. A second design applies the same idea to FM0 and
differential Manchester. A standalone differential Manchester encoder is also
provided.

## The three codes

Each data bit X occupies one period of the bit clock CLK. The period has two
halves: the **former half A** (CLK high) and the **later half B** (CLK low). Let
`E` be the line level at the end of the previous bit (its later half).

| code | former half A | later half B | transitions |
|---|---|---|---|
| FM0 | `~E` | `X ? A : ~A` = `X ^ E` | always at the bit boundary; mid-bit only for X = 0 |
| Manchester | `~X` | `X` | always mid-bit; the code is `X ^ CLK` |
| differential Manchester | `X ? E : ~E` | `~A` = `X ^ E` | always mid-bit; at the boundary only for X = 0 |

FM0 and differential Manchester carry data only in *whether* the level changes,
not in the level itself. So either polarity is valid, and the encoder must
remember `E`. Manchester needs no memory.

FM0 can also be read as a four-state machine on the state code (A, B):
S1 = 11, S2 = 10, S3 = 01, S4 = 00. X = 0 leads to S3 from S1 or S3, and to S2
from S2 or S4. X = 1 leads to S4 from S1 or S3, and to S1 from S2 or S4. This
is the same as `A(t) = ~B(t-1)` and `B(t) = X ^ B(t-1)`.

## The FM0/Manchester encoder (`sols_fm0_manchester_enc`)

The design comes from two steps that make FM0 and Manchester look alike in
hardware. Together they are called similarity-oriented logic simplification
(SOLS).

**Area-compact retiming.** A direct FM0 encoder keeps A and B in two
flip-flops and selects between them with CLK. Only `B(t-1)` is ever needed,
because A is `~B(t-1)`. So one flip-flop, DFF_B, is moved to the output of the
CLK multiplexer (MUX_1). There it captures the line level at each rising edge of
CLK. That level is the later half of the bit just finished, which is `B(t-1)`.

**Balance logic-operation sharing.** Manchester is a CLK-selected multiplexer
too: `~X` while CLK is high, `X` while it is low. So each MUX_1 leg has to make
one FM0 value and one Manchester value:

```
            Mode                                  CLK
             |                                     |
 B(t-1) --0\ |                                     |
           MUX_2 -------------------------------1\ |
 X ------1/                                      MUX_1 --[>o]--+--> code
                                                 0/            |
 X ------\                                       /             |
          XNOR ---------------------------------+              |
 B(t-1) -/                                                     |
                                                               |
 B(t-1) <-- Q [DFF_B, rising CLK, async clear CLR (active low)] D <-+
```

- A leg: MUX_2 passes `B(t-1)` (FM0) or `X` (Manchester). After the shared
  inverter this gives `~B(t-1)` = A or `~X`.
- B leg: `X XNOR B(t-1)`. After the inverter this is `X ^ B(t-1)`. That is B
  for FM0, and `X` for Manchester when DFF_B is held at 0.
- DFF_B is held at 0 for Manchester by its clear input. So the multiplexer that
  would otherwise pick "`B(t-1)` or 0" for the XOR is absorbed into the
  flip-flop.
- The inverter sits after MUX_1 and serves both legs. This keeps the delays of
  the two legs equal, so MUX_1 does not glitch when CLK switches legs.

The modes are set by two separate controls from the system controller:

| code | `mode` | `clr_n` |
|---|---|---|
| FM0 | 0 | 1 (after one low pulse to initialise) |
| Manchester | 1 | 0 |

Mode and clear are kept separate on purpose. If the clear were derived from
Mode, it could not also serve as the initialisation of the encoder. An
assertion in the RTL flags Manchester mode while the clear is released.

## The FM0/differential Manchester encoder (`fm0_diff_manchester_enc`)

The table above shows that FM0 and differential Manchester have the **same later
half**, `X ^ E`. They differ only in the former half: `~E` for FM0 and
`~(X ^ E)` for differential Manchester. So the encoder needs these parts:

- one flip-flop holding `E`;
- one XOR making `X ^ E`;
- a MODE multiplexer choosing `E` (mode 0, FM0) or `X ^ E` (mode 1,
  differential Manchester);
- one inverter after the MODE multiplexer, giving the former half;
- a CLK multiplexer putting the former half on the line while CLK is high and
  `X ^ E` while CLK is low.

The flip-flop captures `X ^ E` at each rising CLK edge. Because `E` means the
same thing in both modes, `mode` may change at any bit boundary without a
reset. `rst` (active high, asynchronous) sets `E` to 0.

`diff_manchester_enc` is the same circuit with the MODE multiplexer removed:
`code = CLK ? ~(X ^ E) : (X ^ E)`.

## Timing, and clock used as data

- All encoders take one bit per CLK period and have **zero latency**. The code
  for a bit is on the line during the same period in which the bit is presented.
  So the line toggles at up to twice the bit rate.
- X must be stable for a whole CLK period, starting just after a rising edge.
- CLK is used both as a clock (the rising edge updates the stored level) and as
  data (the select of the output multiplexer). This is inherent in the
  architecture, so `code` is a combinational function of CLK.
  - On silicon this puts the line's duty cycle and glitch behaviour in the
    designer's hands at layout.
  - On an FPGA, CLK would have to be routed to fabric as well as to the clock
    tree.
- The flip-flop's D input is wired to the later-half net itself, not to the
  multiplexer output. The two nets carry the same value while CLK is low,
  which is when the flip-flop samples. This wiring avoids a race between the
  rising clock edge and the multiplexer switching legs at that same instant.

## Top level (`dsrc_line_encoder_top`)

In a DSRC transceiver the line encoder sits in the transmit baseband, between
the data source and the RF front-end, and a microprocessor sets its mode.
The top places the three encoders side by side on one `clk` and one data
stream `x`. Each encoder has its own output (`fm0_manch_code`, `fm0_dm_code`,
`dm_code`) toward the front-end, and its own controls (`sols_mode`,
`sols_clr_n`, `fd_mode`, `rst`) for the controller to drive. The modulator, the
RF front-end, the receive path and the controller are not part of this RTL. The
design has no parameters: every encoder is one bit wide by nature.

Synthesised, the whole top is 3 flip-flops, 5 two-input multiplexers, 4
inverters and 3 XOR/XNOR gates.

## Where this RTL makes its own choices

- **Differential Manchester convention.** A level change at the start of a bit
  means 0. The opposite convention (a change for 1) is equally common. It is
  obtained by swapping the two inputs of the CLK multiplexer in
  `diff_manchester_enc`. The combined FM0/differential Manchester encoder
  depends on the "change means 0" form, because only then do the two codes
  share their later half.
- **Inverter placement in the combined encoder.** The inverter follows the MODE
  multiplexer. With the inverter placed on the XOR output ahead of the MODE
  multiplexer, mode 0 would put `E` itself in the former half. That breaks
  FM0's rule of a change at every bit boundary. The part count is the same
  either way.
- **Clear and reset.** These are asynchronous. The FM0/Manchester encoder's
  clear is active low, as its mode table requires. The differential encoders'
  reset is active high.
- **Flip-flop input.** The D input comes from the later-half net (see the
  timing section above).
- **Combined top.** Three independent encoders sharing a clock and data input
  is a packaging choice. A product would normally keep only the encoder it
  needs.
- **Transistor counts and gate-level glitch balancing.** These are properties
  of a custom-cell implementation and are not modelled by RTL.

## Verification

Each testbench is self-checking. It computes the expected levels from the coding
rules in the table above, independently of the gate structure, and checks the
line in the middle of both half periods of every bit. It prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it runs |
|---|---|
| `tb_sols_fm0_manchester_enc` | FM0 and Manchester of the example bits 0,1,1,0,1 against their known waveforms; 300 random FM0 bits and 150 random Manchester bits with rule checks on the real line; mode switches both ways; a clear released in mid-bit |
| `tb_diff_manchester_enc` | bits 1,0,1,0,0,1,1,1,0,0,1 and 300 random bits, each decoded from transitions alone; a reset in mid-stream |
| `tb_fm0_diff_manchester_enc` | the FM0 example waveform; 480 random bits across 12 mode switches; a reset |
| `tb_dsrc_standards` | the three downlink profiles at their real rates: CEN (FM0, 500 kb/s), ARIB (Manchester, 4 Mb/s) and ASTM (Manchester, 27 Mb/s), 128 random bits each through the top. It checks every half period of all outputs, that every line change falls on a clock edge, and the measured bit rate to within 0.1 %. |
| `tb_dsrc_line_encoder_top` | end to end: about 960 random bits through all three encoders, 8 FM0/Manchester switches, 16 FM0/differential Manchester switches, clears and resets. It counts each mechanism and fails any that never happened. It uses the top exactly as shipped. |

Every testbench also fails, as intended, against a deliberately broken copy of
its block (a swapped multiplexer input or an inverted flip-flop input).

To simulate one with Verilator 5 from the project root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/line_code_pkg.sv tb/tb_dsrc_line_encoder_top.sv --top-module tb_dsrc_line_encoder_top
./obj_dir/Vtb_dsrc_line_encoder_top
```

Replace the top-module name to run another testbench. `tb_dsrc_standards`
counts its delays in nanoseconds, hence the time scale. All runs finish in well
under a second.

## Files

- `rtl/line_code_pkg.sv`: mode enumerations shared by the encoders.
- `rtl/sols_fm0_manchester_enc.sv`: FM0/Manchester encoder.
- `rtl/fm0_diff_manchester_enc.sv`: FM0/differential Manchester encoder.
- `rtl/diff_manchester_enc.sv`: differential Manchester encoder.
- `rtl/dsrc_line_encoder_top.sv`: the three encoders side by side.
- `tb/tb_*.sv`: one self-checking testbench per module, plus `tb_dsrc_standards.sv` for the three downlink profiles.
