# Programmable delay-line timing for SRAM

An SRAM read only works if the wordline stays open long enough for the selected cell to build
a usable voltage difference on its bitlines, and the sense amplifier fires only after that.
Open the wordline too long and half-selected cells in the same row can flip; the bitlines also
discharge further than needed, which costs power on every read. The right window depends on
the individual die: process variation and ageing make some cells weaker than nominal.

This design makes those windows programmable after fabrication. It is a delay-line timing
block that turns each rising clock edge into the four SRAM control signals:

| signal | meaning | programmable edges |
|---|---|---|
| `pre` | precharge / evaluate; high = bitlines floating, cell may be accessed | rise, fall (4-bit each) |
| `wle` | wordline enable to the row decoder | rise (4-bit), **fall (6-bit, 20 codes)** |
| `sae` | sense amplifier enable, read cycles only | **rise (6-bit, 20 codes)**, fall (4-bit) |
| `we`  | write driver enable, write cycles only | rise, fall (4-bit each) |

The two edges in bold set the wordline access time and the sense-enable point. They get the
widest range. A 42-bit serial shift register holds every code. This follows the
arrangement of the original 180 nm test chip, which used a low-speed external test clock.

The delay line, the delay elements and their delays are analog circuits. Here they are
**behavioural models** with picosecond delays, so you can simulate them but not synthesise
them. Only the code register (`ctrl_shift_reg`) and the top-level wiring are synthesizable logic.

## The cycle

All signals derive from the clock's rising edge only. With the typical (TT) corner and every
code at its middle setting (fine `0011`, extended `01_0011`), the edges fall at these times
(in ps after the clock edge):

```
clk_in  _/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
pre     ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\______   185 / 1735
wle     ______/‾‾‾‾‾‾‾‾‾‾‾‾\__________________________________________________   284 / 653
sae     ______________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_________   711 / 1635  (rw=1)
we      ________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_____________   385 / 1535  (rw=0)
```

The order is the one an SRAM needs:

- Precharge ends before the wordline opens.
- For a read, the wordline closes before the sense amplifier fires.
- Sense enable and write enable both end before precharge resumes.

The whole sequence fits in 2 ns, so the outputs run at 500 MHz speed even when `clk_in` is
slow.

The clock must be slow, in fact. Each output is the AND of two delayed copies of the clock,
so the clock has to stay high until `pre` has fallen (about 1.6 ns after the edge). It must
then stay low about as long, so the delay line can recover. The testbenches use 100–125 MHz.
That is how the original block was meant to be tested: full-speed internal timing from a
low-speed external clock.

`rw` is not latched. It goes straight to the output gates, `sae = pulse & rw` and
`we = pulse & ~rw`. Hold it steady from before the clock edge until the pulses have ended.

With the default taps at TT, WLE, SAE and WE stay inside PRE's evaluation phase for every
code. `timing_block` checks this with assertions: each of them may rise only while `pre`
is high, and all must be low when `pre` falls. The assertions are armed at the first clock
edge, so the delay line's power-up settling is ignored. A tap change that breaks the order
stops the simulation with an error.

The SAE falling edge and the WLE rising edge can also be programmed, but only over the
five fine codes. The earliest description of the original block calls them fixed. Its
code register, however, covers both edges of every signal, and this design follows the
register.

## How one output is made: the pulse generator

`static_delay_line` is a chain of 30 inverters driven by `clk_in`. Each output (`pulse_gen`)
takes two taps of it and combines them:

```
A = element_A(tap_a)          rises  t_IN-A after the clock edge  -> output rising edge
B = NOT element_B(tap_b)      falls  t_IN-B after the clock edge  -> output falling edge
out = A & B                   t_D = t_IN-A,  t_PW = t_IN-B - t_IN-A
```

Each element is a programmable delay. Code A moves only the rising edge of the output and
code B only the falling edge. This is why every edge of every signal can be set on its own.

The original circuit puts the inversion between the two taps. In this model a single inverter
sits after element B. The delay element varies only its pulldown, so only its rising output
edge is programmable. Placing the inverter after element B turns that rising edge into B's
falling edge, the one that ends the pulse. Tap positions are parameters of `timing_block`
(`*_A_TAP`, `*_B_TAP`, all even).

## Delay elements and their codes

**DCDE** (`dcde`) is a buffer whose first stage discharges through a bank of parallel
transistors. One transistor is always on and four are switched by the code S4..S1. Each
additional conducting transistor shortens the rising delay by one step:

```
rise delay = MIN + STEP * (4 - number of ones)      fall delay = fixed
```

The code is a **thermometer code**: `0000, 0001, 0011, 0111, 1111`, from slowest to
fastest. A binary-weighted bank gives 16 codes, but it can be non-monotonic: one code up
can make the delay longer. A thermometer code avoids this and gives evenly spaced steps,
at the cost of only five codes. The model treats any code by its number of ones. An
assertion warns when a non-thermometer code is in place at a clock edge.

**Extended range element** (`ext_range_delay`) adds a binary coarse stage in front of the
DCDE. A 4:1 multiplexer selects the input itself or the input after one, two or three static
buffers:

```
code[5:4] coarse : 00 -> 3 buffers (slowest) ... 11 -> no buffer (fastest)
code[3:0] fine   : thermometer, as above
```

Each buffer is five fine steps long, so the 20 codes form one evenly spaced ladder. Read
in the order coarse-then-fine (`00_0000, 00_0001, ... 00_1111, 01_0000, ... 11_1111`),
the delay drops by exactly one step per code. The package functions `ext_code_at(i)` and
`ext_code_index(c)` convert between a code and its position 0..19 (0 = longest delay).

### Step sizes and corners

The per-step delays are the averages of the original block's corner simulations. They can
be selected with the `CORNER` parameter of `timing_block` / `sram_timing_top`:

| corner | SAE rise step | SAE range (19 steps) | WLE fall step | WLE range |
|---|---|---|---|---|
| `CORNER_TT` (25 °C) | 22.6 ps | 429.4 ps | 21.9 ps | 416.1 ps |
| `CORNER_SS` (85 °C) | 30.2 ps | 573.8 ps | 29.1 ps | 552.9 ps |
| `CORNER_FF` (0 °C)  | 18.0 ps | 342.0 ps | 17.2 ps | 326.8 ps |

The reference ranges are 430.4/416.3, 574.8/553.9 and 342.3/328.0 ps; the model stays within
1.5 ps of them. The other delays are this design's own choices: the 140 ps minimum
element delay, the 140 ps fixed falling delay and the 50 ps inverter. At SS and FF they are
scaled by the ratio of the SAE steps. The plain 4-bit elements use the SAE step, except
the WLE rising edge, which uses the WLE step.

At SS the slowest codes stretch the cycle to about 2.4 ns. 500 MHz is only claimed for
typical conditions.

## The control word

`ctrl_shift_reg` is a 42-bit serial-in register. On each rising `sclk` edge with `shift_en`
high it shifts toward bit 0 and takes `sdin` into bit 41. Send the word least significant
bit first; it is in place after exactly 42 enabled clocks. The previous word comes out on
`sdout` at the same time, which lets you read back or chain registers. There is no update
latch: the delays change while shifting. Load codes while `clk_in` is idle.
`rst_n` (asynchronous) clears the word. All-zero codes select the longest delay everywhere,
so reset gives the most relaxed, safest timing.

Layout (`sram_timing_pkg::timing_ctrl_t` in bits 35:0):

| bits | field | type |
|---|---|---|
| 3:0 | `we_fall` | fine |
| 7:4 | `we_rise` | fine |
| 11:8 | `sae_fall` | fine |
| 17:12 | `sae_rise` | coarse 17:16, fine 15:12 |
| 23:18 | `wle_fall` | coarse 23:22, fine 21:18 |
| 27:24 | `wle_rise` | fine |
| 31:28 | `pre_fall` | fine |
| 35:32 | `pre_rise` | fine |
| 41:36 | spare | shifted through, unused |

The 42-bit length is that of the original register. The original field layout is not
known. Six-bit codes for the two key edges and four-bit codes for the other six come to
36 bits, so this design leaves the top six bits spare.

## Using it: per-die calibration

The intended use is to tune each die after manufacture:

1. Start with the most aggressive code, the shortest wordline access time.
2. Test the memory.
3. If the test fails, relax the code by one step and test again.
4. Stop at the first code that passes. If the last code also fails, reject the die.

Running the same sweep later in the product's life can make up for ageing. `tb_sram_timing_top`
runs this flow. It measures the WLE pulse width where a memory self-test would give
pass/fail. Required access times are 240, 310 and 450 ps, about what a 65 nm cell needs at
1 V for 0, 3 and 6 sigma of variation. The flow picks WLE-fall codes 12, 9 and 3 (with
WLE rise at `0011`). For 700 ps it runs out of codes, because the range at that setting ends
at 522 ps.

The memory self-test controller and the SRAM itself are not part of this RTL: the array,
decoders, sense amplifiers and write drivers are analog. Connect `pre`, `wle`, `sae` and
`we` to your SRAM model.

## What to trust and what differs from the original

- **Structure and function** follow the original design:
  - pulse-generator outputs, `OUT = A AND B`;
  - thermometer-coded current-starved DCDE;
  - two-bit coarse plus four-bit fine extended element with 20 codes;
  - extended range on the WLE falling edge and the SAE rising edge;
  - SAE on reads only and WE on writes only;
  - a 42-bit serial code register.
- **Delays are models, not silicon data.** Only the step sizes come from the reference
  simulations. The minimum, fixed-fall, buffer and inverter delays are this design's own
  choices, picked to give the stated ranges and a 2 ns cycle. Real elements are neither
  perfectly linear nor exactly equal per step.
- **This design's own choices:**
  - tap positions;
  - placing the inverter after element B;
  - the control-word layout and spare bits;
  - the register's shift direction, enable, read-back and reset;
  - not latching `rw`.
- Delay resolution is 0.1 ps (`timeprecision 100fs`). Long chains accumulate up to about
  1 ps of rounding.
- Pulses shorter than the element delays, and clock phases shorter than the output
  sequence, are not modelled faithfully.

## Files

| file | contents |
|---|---|
| `rtl/sram_timing_pkg.sv` | code types, control-word struct, corner step tables, code helpers |
| `rtl/ctrl_shift_reg.sv` | 42-bit serial code register (synthesizable) |
| `rtl/dcde.sv` | DCDE model |
| `rtl/ext_range_delay.sv` | coarse buffers + multiplexer + DCDE model |
| `rtl/static_delay_line.sv` | tapped inverter chain model |
| `rtl/pulse_gen.sv` | one two-tap pulse-generator output |
| `rtl/timing_block.sv` | the four outputs, taps and `rw` gating |
| `rtl/sram_timing_top.sv` | code register + timing block |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every file sets `timeunit 1ps; timeprecision 100fs`. Delays need verilator's timing support.
Verilator warns (`ZERODLY`) about delays computed at run time, such as the code-dependent
DCDE delay; `-Wno-fatal` lets the build go on past that warning:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sram_timing_pkg.sv tb/tb_sram_timing_top.sv --top-module tb_sram_timing_top -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops; a watchdog ends it if it
hangs. The testbenches cover the following:

- `tb_dcde`: rising and falling delay for all thermometer and binary codes.
- `tb_ext_range_delay`: all 20 codes, uniform step and full range.
- `tb_static_delay_line`: tap timing and polarity.
- `tb_pulse_gen`: t_D, t_PW and one pulse per clock for random codes.
- `tb_timing_block`: all edges at the three corners, read and write cycles, signal order,
  the 2 ns bound, identical edges for three clock periods and duty cycles, monotonic
  20-code sweeps and corner ranges.
- `tb_sram_timing_top` (default parameters):
  - serial load and read-back;
  - random control words in read and write cycles;
  - both 20-code sweeps;
  - the calibration flow.

  It counts each of these and fails if one never occurs.

Expect a few non-thermometer warnings from the assertion in the first nanosecond, before the
code register is reset.

To change the timing, change tap positions or `N_STAGES` in `timing_block`, or the delay
constants in `sram_timing_pkg`. Keep every tap even, and keep each output's B tap past its A tap.
