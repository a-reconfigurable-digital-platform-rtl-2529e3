# Real-time digital emulation of a copper access loop

A DSL modem only sees its telephone line as a set of electrical effects. The
line attenuates, mostly at high frequency. It delays, with a group delay that
depends on frequency. And it reflects, at every splice where two cables of
different impedance meet and at the open end of every unused pair (a *bridged
tap*). Testing modems against real cable drums is awkward. Analog line
simulators handle only a few fixed loops and drift with temperature and age.

This core replaces the cable by digital signal processing. A 14-bit ADC
samples the signal on each side of the loop: the subscriber side (CPE) and the
exchange side (CO). The core computes in real time what would arrive at the
other end, and what would come back as echo. Two 14-bit DACs put that back on
the line. The whole loop topology is defined by coefficients and delays that a
host loads at run time. The same hardware therefore emulates any chain of cable
sections, splices and taps, and the host can change the line while it carries
traffic, for example to emulate a temperature drift.

The sample rate is 32 MSPS, enough for the full 12 MHz VDSL band. The core
clock is 160 MHz, so every filter has exactly five clock cycles per sample.
Samples are 32-bit words.

## Waves, sections, nodes and taps

The core does not simulate voltages and currents. It propagates two *waves*
through the loop: a forward wave from CPE to CO and a backward wave from CO to
CPE. Each piece of the loop acts on those waves:

* A **line section** (`line_section`) is a stretch of uniform cable. In each
  direction it is a cascade of `STAGES` second-order IIR sections followed by
  a delay line. The filters give the frequency-dependent attenuation and the
  varying part of the phase. The delay line gives the constant part of the
  group delay, which for long cables is most of it. A cable is reciprocal, so
  both directions of a stage use the same coefficients.
* A **node** (`node`) is a splice with three ports: 0 towards the CPE-side
  section, 1 towards the CO-side neighbour and 2 towards a bridged tap. It
  applies a 3×3 scattering matrix whose entries are filters, not constants:

  ```
          from port 0   from port 1   from port 2
  port 0    Γ1            1+Γ           1+Γ
  port 1    1+Γ           Γ2            1+Γ
  port 2    1+Γ           1+Γ           Γ3
  ```

  The diagonal holds the reflection seen at each port and the off-diagonal
  entries the transmission from one port into another. Entry `coef[j][i]` is
  the second-order section from port `i` to port `j`. Each output is the
  saturated sum of its row. Because every entry is a full second-order
  section, a reflection can depend on frequency, as it does when the
  characteristic impedances of real cables differ.
* A **bridged tap** (`bridged_tap`) is a line section whose far end is left
  open. An open end reflects the voltage wave fully and without a sign change.
  In the RTL the section's forward output therefore feeds its own backward
  input. What the node sends into the tap comes back filtered twice and
  delayed twice.
* A **basic building block** (`bbb`) is one line section, the node at its
  CO-side end and a tap on that node. A topology is a cascade of blocks.
  Three switches per block make a block fit any piece of a loop:

  | switch        | effect                                                  |
  |---------------|---------------------------------------------------------|
  | `line_bypass` | the line section becomes a wire                        |
  | `node_bypass` | the node becomes a straight connection (no reflection, no tap) |
  | `tap_en`      | connects the tap to node port 2 (otherwise port 2 sees 0) |

  Bypassed parts are plain wires and add no latency.

The top level, `dsl_loop_emulator`, chains `N_BBB` blocks (default 3) between
the two converter interfaces:

```
adc_cpe -> sample_io -> bbb[0] -> bbb[1] -> bbb[2] -> sample_io -> dac_co
dac_cpe <- sample_io <- bbb[0] <- bbb[1] <- bbb[2] <- sample_io <- adc_co
```

Mapping a loop onto blocks works like this. ANSI VDSL 4 is 150 ft of TP2,
then a splice with a 150 ft tap, then 150 ft of TP2, then a splice with a
300 ft tap, then 1000 ft (or 4500 ft) of TP1. It uses all three blocks:

* block 0: line 1, node 1 and tap 1
* block 1: line 2, node 2 and tap 2
* block 2: line 3, with its node bypassed

A two-section loop uses blocks 0 and 1 with node 1 bypassed and block 2
bypassed completely.

## Timing: the delay budget

This is the part of the design that needs the most care. A real cable delays
a signal by about 1.5 ns per foot. The emulator must reproduce that delay, and
it cannot be faster than the delay it emulates. An echo from a splice 150 ft
from the modem comes back after about 457 ns. About 200 ns of that goes
through the converters and analog filters. That leaves roughly 257 ns, eight
sample periods, for every digital operation on the path. Pipelining to raise
the clock is therefore not an option: each register stage costs part of the
emulated line length.

The core is a **lock-step sample pipeline**:

* `sample_timer` issues a one-cycle strobe every 5 clocks. The strobe is also
  brought out as `conv_stb`, the converter sample enable.
* Every part registers its outputs once per sample. The next part reads them
  on the next strobe.
* Each part's latency, counted from the strobe on which it reads a sample to
  the strobe on which the next part reads the result, is therefore a whole
  number of samples:

| part                        | latency (samples)       |
|-----------------------------|-------------------------|
| converter interface, input  | 1 (ADC register)        |
| second-order section        | 1                       |
| delay line set to `d`       | `d + 1`                 |
| line section                | `STAGES + d + 1`        |
| node                        | 1                       |
| bridged tap (round trip)    | `2 (STAGES + d + 1)`    |
| bypassed part               | 0                       |

The DAC register takes the result on the strobe after the last part. Two
examples:

* **Reset state** (every node bypassed, unity line stages, `d = 0`): an ADC
  sample appears on the far DAC after 1 + 3 × 3 = 10 samples.
* **Echo from the first node** with `STAGES = 2` and `d = 0`: the path is the
  ADC register, two stages, the node reflection and two stages back. That is
  1 + 3 + 1 + 3 = 8 samples = 250 ns, which fits the 257 ns window above. This
  is why `STAGES` defaults to 2.

To set up a section of length L feet, aim for a total section latency of
about L × 1.52 ns / 31.25 ns samples and set `d` to that figure minus
`STAGES + 1`. Two sections are special:

* The section next to a converter must also give up the time the converters
  and analog filters take. For a short first section `d` is then 0.
* A tap's round trip is twice its one-way figure.

Examples of the arithmetic: 3000 ft gives 146 samples (d = 143) and 4500 ft
gives 219 samples (d = 216). `DEPTH = 256` is sized for 4500 ft, the longest
section in the evaluated loops.

Delays move in whole samples (31.25 ns). Finer delay has to come from the
filter coefficients: the phase of the second-order sections can absorb a
fraction of a sample.

## The second-order section and its five-cycle schedule

`biquad` is the only arithmetic block. Every line, tap and node is built from
it. One instance serves two channels, which is what "bidirectional" means
here: in a line stage, the forward and the backward wave. Each channel runs
the transposed direct form II recursion

```
y  = b0·x + s1
s1 = b1·x − a1·y + s2
s2 = b2·x − a2·y
```

on one shared datapath of three 32×18 multipliers and four adders:

| cycle | work                                                               |
|-------|--------------------------------------------------------------------|
| 0     | strobe: capture both inputs                                        |
| 1     | channel 0: `b0·x`, `b1·x`, `b2·x`; adders 1 and 2: `y = b0·x + s1`, `u1 = b1·x + s2`; `u2 = b2·x` |
| 2     | channel 0: `a1·y`, `a2·y`; adders 3 and 4: `s1 = u1 − a1·y`, `s2 = u2 − a2·y` |
| 3, 4  | the same for channel 1                                             |

Channel 0's output register changes on the clock edge after the capture edge.
Channel 1's changes two edges later. Both hold until the next sample. `y` is cut
back to 32 bits by an arithmetic shift (truncation, so no rounding adder is
needed) and saturated. The feedback uses exactly that value, the value that
leaves the section. The node's reflection at port 2 has no partner, so it
uses a one-channel instance (`NCH = 1`, three cycles).

Number formats (in `emu_pkg`):

* samples: 32-bit two's complement
* coefficients: 18-bit Q2.16, range [−2, 2). A pole pair close to the unit
  circle (|a1| close to 2) is representable.
* products and states: 56 bits, with no precision lost inside the recursion
* section outputs: truncated to 32 bits and saturated. The bias is below one
  LSB of the 32-bit word, 2^-16 of a converter step.
* node sums: saturated to 32 bits

## Converter interface

`sample_io` places the 14-bit two's-complement ADC code at bit 16 of the
32-bit word. That leaves two guard bits above the converter's full scale for
filter gain and the node's sums. Towards the DAC it rounds to the converter
step and clips to 14 bits, and `clip_cpe` / `clip_co` flag each sample that
had to be clipped. The low 16 bits of the ADC word are zero by construction.

## Configuration

The host writes 32-bit words over a simple port: `cfg_we`, `cfg_addr` and
`cfg_wdata`. `cfg_regs` holds a shadow copy of every parameter. Raising
`cfg_commit` copies the whole shadow set into the active set on the next
sample strobe. Until that strobe, `cfg_pending` stays high. A topology change
or a new set of line coefficients therefore never lands in the middle of a
filter schedule, and a host can step the line's characteristics between two
samples while traffic runs.

Word address = block × 128 + offset:

| offset              | content                                                    |
|---------------------|------------------------------------------------------------|
| `0x00 + 5k + c`     | line stage `k`, coefficient `c`                            |
| `0x20 + 5k + c`     | tap stage `k`, coefficient `c`                             |
| `0x40 + 5(3j+i) + c`| node entry from port `i` to port `j`, coefficient `c`      |
| `0x70`              | line delay `d` (samples)                                   |
| `0x71`              | tap delay `d` (samples)                                    |
| `0x72`              | bit 0 `line_bypass`, bit 1 `node_bypass`, bit 2 `tap_en`   |

Here `c` = 0..4 selects b0, b1, b2, a1 or a2, in data bits 17:0 as Q2.16.
Writes to other offsets are ignored. After reset the core is transparent:

* unity line stages and zero delays
* every node bypassed
* taps off

Computing the coefficients for a real cable from its primary or secondary
parameters is a host task and is not part of this RTL. The testbenches use
hand-picked low-pass and junction values, not fitted cable models.

## What is outside the core, and where it departs from the original instrument

The instrument this core is modelled on has two boards, one per side of the
loop. Each board holds a Virtex-II FPGA, one ADC, one DAC, a line hybrid and a
USB 2.0 port. A 1 Gbit/s full-duplex link joins the boards. Departures and
omissions in this RTL:

* **One core instead of two.** The whole chain of blocks is one module with
  both converter pairs as ports. Splitting the chain across two devices, and
  the board link that would do it, are not modelled.
* **No reflection modules.** The immediate reflections at the two loop ends,
  caused by the modems' impedance mismatch, are left to circuits outside this
  core. In the original these are separate reflection modules, drawn as
  amplifier stages. The echoes the core produces come only from nodes and taps
  inside the loop.
* **Converters, hybrids, analog front end, USB transceiver and host PC** are
  not included. The core has converter codes and a register-write port where
  they would connect.
* **Section schedule.** The original section is quoted as three 32×18
  multipliers and four adders in five cycles. The schedule here has the same
  counts, but the original's own schedule is not known.
* **Choices not fixed by the original**, all of this design's own:
  * the number of blocks (3), stages per section (2) and delay depth (256)
  * the Q2.16 coefficient format, truncation and saturation
  * the register map and the commit mechanism
  * the ideal open end of a tap
  * which parts can be bypassed

**Resource note.** At the defaults the core has 27 second-order sections
(9 per block: 2 line, 2 tap, 5 node), that is 81 multipliers of 32×18 bits.
On a Virtex-II each 32×18 multiplier takes two 18×18 blocks, so 162 in total.
An XC2V3000 has 96. The default core would therefore need two such devices,
as in the two-board instrument, or fewer node entries. The delay lines need
12 × 256 × 32 bits, well within block RAM.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
design with reference models in `tb/tb_ref_pkg.sv`. The models are written
from the equations at sample level in 64-bit integers, not from the RTL
schedule. Every testbench ends with a `TB_RESULT checks=… failures=…` line.

| testbench              | what it establishes                                             |
|------------------------|-----------------------------------------------------------------|
| `tb_biquad`            | both channels against the recursion; channel 0 ready one edge and channel 1 three edges after capture; saturation |
| `tb_delay_line`        | delays 0, 1, 5 and the maximum; zero output before the buffer fills; output held between strobes |
| `tb_line_section`      | latency `STAGES + d` per direction; random traffic against the model |
| `tb_bridged_tap`       | single echo after `2(STAGES + d + 1)` samples; random traffic    |
| `tb_node`              | routing of all nine entries; random filters; saturation of the sum |
| `tb_bbb`               | every switch setting against the block model; echo present      |
| `tb_cfg_regs`          | every address; nothing active before commit; commit lands on the strobe |
| `tb_sample_timer`      | strobe period 5 (and 3)                                         |
| `tb_sample_io`         | ADC placement, DAC rounding at the half-step boundaries, clipping |
| `tb_dsl_loop_emulator` | whole core at default size (below)                              |

`tb_dsl_loop_emulator` runs the core at its default parameters. A model of
the whole chain runs beside the design, and the test compares both DAC codes
and clip flags on every sample. It steps through five scenarios:

1. the reset state, with the 10-sample latency checked by hand
2. test case A (250 ft flat pair, a splice, then 3000 ft of TP2)
3. VDSL 4 with a 4500 ft last section, with the 8-sample first-node echo
   checked by hand
4. a coefficient change on the running loop
5. full-scale drive into a high-gain loop, so the DAC clips

It counts node reflections, tap echoes, bypassed parts carrying signal, the
long delay line in use, commits and clips, and fails if any of them never
happened. It simulates about 90 µs of real time in well under a second.

To run it with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/emu_pkg.sv tb/tb_ref_pkg.sv tb/tb_dsl_loop_emulator.sv \
    --top-module tb_dsl_loop_emulator
./obj_dir/Vtb_dsl_loop_emulator
```

Any other testbench runs the same way with its own name. `-Wno-fatal` keeps
width-extension lint warnings in the testbenches from stopping the build.

What the tests do not establish:

* That the default sizes meet 160 MHz on an FPGA. The RTL is written for
  clarity, and the multiplier-to-adder path in a section is one cycle long.
* That any particular coefficient set reproduces a real cable.
