# Gray-code oscillator TDC: a pulse-width measurement unit

A time-to-digital converter (TDC) measures a time interval. This one measures
the width of a pulse on one input, `hit`. It counts it in 8 ns system-clock
periods and refines the count with two small oscillators that resolve a few
hundred picoseconds. It is meant for FPGAs (the reference target is a Xilinx
7-series part at 125 MHz). Each channel needs only 16 logic elements:
five LUTs for the oscillator, one for the store signal and ten flip-flops.
Many channels therefore fit in a small device. That matters for
time-of-flight work such as multi-beam LiDAR, where every receiver needs its
own channel.

The fine stage rests on one observation. In a gray code only one bit changes
per step, so a gray-code counter can be built as a loop of LUTs with **no
register in the loop**. Each LUT computes one bit of the next code from the
current code. As soon as one bit flips, the LUT for the next bit sees it and
flips in turn. The loop counts freely at a rate set only by LUT and routing
delays. The system clock then samples the free-running code. The sampled code
says how long the loop has been running since the hit edge. Because only one
bit is ever in motion, the sample is a valid code, at worst one step off.

Five code bits are the limit: a 7-series LUT has six inputs, and one is
needed for the enable. That gives 32 steps. This is enough as long as 32 steps
last longer than one clock period.

## A measurement, step by step

```
hit            ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_____________________
hit_start      ___/‾‾‾‾‾‾‾‾‾‾\___________________________________________
start osc code 000 01 03 02 06 07 000 ...
clk edges             ^E_s         ^            ^E_p         ^
hit_stop       ______________________________________/‾‾‾‾‾‾‾‾\_______
```

1. **Input stage.** The rising edge of `hit` clocks a flip-flop whose D input
   is tied high (`input_stage`). Its output, `hit_start`, rises at once,
   without waiting for the clock. The falling edge does the same for
   `hit_stop`, through an identical stage clocked by the inverted `hit`.
2. **Oscillation.** `hit_start` enables the start oscillator (`gray_osc`). It
   steps 00, 01, 03, 02, 06, 07, ... until it is stopped.
3. **Sampling.** On every rising clock edge the channel's first register set
   (`tdc_channel.sampled`) copies the oscillator. At the first edge `E_s`
   that finds a non-zero code, `store` rises for one cycle. `store` is the OR
   of the sampled bits. It does three things:
   * it loads the sampled code into the second register set (`fine`);
   * it clears the input stage, so the oscillator drops back to zero and never
     runs for much more than one clock period (this also saves power);
   * it copies the coarse counter into the start sample register.
4. **Stop.** The same happens on the stop side for the falling edge, giving a
   stop code and a stop coarse sample at edge `E_p`.
5. **Merge.** Once both channels hold a value, the state machine in
   `tdc_merge` forms one 32-bit word and writes it into the FIFO. It then
   issues `count_reset`, which re-arms both channels.
6. **Read-out.** A processor reads the words over AXI4-Lite.

The measured width is

```
width = 8 ns * coarse + t(start_code) - t(stop_code)
```

`t(code)` is the time the oscillator needs to reach that code from its
enable. This is the time from the hit edge to the sampling edge. Decode the
gray code to a step count `n` (`tdc_pkg::gray2bin`). Then take `t` as the
mid-point of bin `n`, from a table of bin widths. On hardware that table comes
from a code-density calibration (below). Because `t` is measured back from a
clock edge, a larger start code means the pulse began earlier, hence the plus
sign.

### The late-sample case

If the hit edge lands just before a clock edge, the oscillator may not have
completed its first step (623 ps in the model) when the edge samples it. The
sample is then zero, `store` does not rise, and the oscillator keeps running.
The next edge, 8 ns later, finds a code beyond the one-period range. That
code is stored, and the coarse sample is taken one cycle later. The formula
stays correct because `t(code)` then covers more than 8 ns. It also needs
`32 steps > 8 ns + one step`, which holds in both the model and the hardware.
The end-to-end testbench forces this case on purpose.

## The oscillator and its timing model (`gray_osc`)

On the FPGA the oscillator is five LUTs, one per code bit. Each LUT reads all
five bits and the enable and drives zero while the enable is low. A loop of
LUTs cannot be described by RTL in any way a simulator or a synthesis tool
would honour. `gray_osc` is therefore a **behavioural model**, not
synthesizable logic, and the top level is synthesizable everywhere except
there.

The linearity of this TDC depends almost entirely on routing. LUT delay does
not depend on the function a LUT implements, but the wires between the LUTs
differ a lot. In the 5-bit reflected code, bit 0 flips on every other step,
so every step is either

* a route **from bit 0 to the LUT of a higher bit**, or
* a route **from a higher bit back to LUT 0**,

plus one LUT delay. Only these 8 of the 20 routes between the LUTs ever set a
step size. The design equalises them by placing and routing the LUTs by hand.
The routes are then copied unchanged to every channel, so all channels share
one delay profile and could share one calibration table.

The model is built from the LUTs' own truth tables. `tdc_pkg::lut_init(b)`
returns the 64-bit INIT value of the LUT for bit `b`, for the pin order
I0 = bit4, I1 = bit3, I2 = bit2, I3 = bit1, I4 = bit0, I5 = enable:

| LUT | INIT (hex)         |
|-----|--------------------|
| 0   | `9669966900000000` |
| 1   | `6969FF0000000000` |
| 2   | `F0F099F000000000` |
| 3   | `CCCCCC5C00000000` |
| 4   | `AAAAAAAC00000000` |

The upper half of each table is the next-code bit; the lower half
(enable low) is zero. The same values go into `LUT6` primitives on the
device. In the model, the one LUT whose output disagrees with its bit is the
next to switch.

Each step takes

```
ROUTE_PS[bit that changed last][LUT that changes next] + LUT_PS
```

`ROUTE_PS` holds the worst-case route delays of the hand-routed oscillator
(rows bit 0..4, columns LUT 0..4). `LUT_PS` = 123 ps. This value makes the
model reproduce the worst-case timing-simulation step sizes of the start
channel exactly: 999, 600, 809, 704 (703 here), 999, 600, 814, 832 ps... for
codes 01, 03, 02, 06, 07, 05, 04, 0c. The first step after the enable uses
`HIT_ROUTE_PS` (500 ps, an assumption) instead of a bit route. The same delay
also sets how fast the code returns to zero when the enable falls.

These are worst-case figures. The average step over 16 codes is about
780 ps, so roughly ten codes fall within one clock period. On the reference
hardware at room temperature the measured average step (the LSB) was
380.9 ps, and about 21 codes are used. Override `ROUTE_PS`, `LUT_PS` and
`HIT_ROUTE_PS` to model another device or another routing. For example,
`tb_routing_compare` loads the delays of automatic routing and shows its
worse linearity.

## The control path

### Input stage (`input_stage`)

This is an edge-triggered flip-flop with an asynchronous clear. The clear is
`!nrst || clr_req`. The channel drives `clr_req` with `store`, and keeps it
high while it waits for `count_reset`. During that wait any further `hit`
edge is ignored. The flip-flop powers up at zero, as FPGA flip-flops do after
configuration. In simulation this matters: the clear acts on its edge, so a
clear already high at time zero would otherwise leave the flip-flop
undefined. `hit` is a clock for these two flip-flops.

### Channel (`tdc_channel`)

This block holds the two register sets, the `store` OR and a two-state
machine:

* **IDLE** covers "idle", "oscillating" and "sampled". The oscillator needs
  no clock, so there is nothing for a state machine to follow.
* The store cycle moves the channel to **WAIT**.
* **WAIT** holds the fine value and the input-stage clear until
  `count_reset`.

`store` is gated to IDLE, so a code seen while waiting changes nothing.

Latency: `store` is high during the cycle after the sampling edge, and
`fine` and `captured` are valid from the edge after that.

### Coarse counter (`coarse_counter`)

A 16-bit binary counter advances on every clock. Each channel's `store`
copies the count into that channel's sample register. Both samples are
therefore taken one cycle after their sampling edges, and the offset cancels
in the difference. `count_reset` clears the counter and both samples. The
difference is taken modulo 2^16, so a free-running counter would give the
same result. The range is 2^16 × 8 ns = 524 µs, far beyond the 1.34 µs
round trip of a 200 m LiDAR.

### Merge state machine (`tdc_merge`)

```
IDLE --start captured--> MEASURING --stop captured--> MERGE --(1 cycle)--> STORE
  ^                                                                          |
  +------- hit low / count_reset ------ COUNT_RESET <--------(1 cycle)-------+
                                        (stays while hit is high)
```

* **MERGE** registers the word.
* **STORE** writes the word to the FIFO for one cycle. If the FIFO is full
  the word is lost, and `ev_dropped` pulses.
* **COUNT_RESET** waits until `hit` is low, seen through two synchronising
  flip-flops, before it releases the channels. A channel is therefore never
  re-armed in the middle of a pulse.

A pulse that starts before `count_reset` is issued is not measured: both of
its edges fall while the channels are still held. The earliest re-arm comes
about 4 cycles after the stop capture, which is about 6 cycles after the
falling edge.

One case needs special handling. If `hit` is high when reset is released, its
first falling edge is a stop with no start. The machine discards it through
COUNT_RESET and pulses `ev_stray_stop`; otherwise the stop channel would block
forever.

### Measurement word (`tdc_pkg::tdc_word_t`)

| bits    | field        | meaning                                                |
|---------|--------------|--------------------------------------------------------|
| [31:26] | `pad`        | zero                                                   |
| [25:10] | `coarse`     | stop coarse sample − start coarse sample (mod 2^16)    |
| [9:5]   | `stop_fine`  | raw gray code of the stop channel                      |
| [4:0]   | `start_fine` | raw gray code of the start channel                     |

The fine codes are stored raw. Decoding and calibration are left to software.

### FIFO and AXI4-Lite port (`sync_fifo`, `axi_lite_slave`)

`sync_fifo` is a 512 × 32 single-clock first-word-fall-through buffer, which
is one 18 Kb block RAM on a 7-series device. The register map:

| address | name   | access | content                                                       |
|---------|--------|--------|---------------------------------------------------------------|
| 0x0     | DATA   | read   | oldest word, removed by the read; SLVERR and 0 if FIFO empty  |
| 0x4     | STATUS | read   | [0] empty, [1] full, [31:16] number of words                  |

Writes are accepted and answered OKAY, but there are no writable registers. A
read response comes one cycle after the address. Assertions check that `R`
and `B` stay valid and stable until they are taken.

## Calibration and the code-density test

The bin widths come from a code-density test:

1. Feed pulses whose edges are uncorrelated with the clock, for example a
   999133 Hz square wave against 125 MHz.
2. Count how often each code appears: `N_i` out of `N_total`.
3. The width of bin `i` is `tau_i = N_i × 8 ns / N_total`.
4. From these, DNL_i = (tau_i − mean)/mean, and INL is the running sum of DNL.

A single bin-by-bin table built this way serves every channel that uses the
same routing. `tb_code_density` runs exactly this test: 100,000 pulses of
480.7 ns, drained over AXI. It recovers every bin of the model within 0.2 ps
on both channels, and reports a single-shot spread of about 340 ps RMS when
widths are rebuilt from bin mid-points. The spread is the quantisation of
bins up to 1 ns wide. The test runs in about 20 s.

## Departures from the original design, and choices made here

These follow the original design: the structure and wiring of the unit, the
5-bit oscillator, the two register sets, `store` as the OR of the sampled
code, the input-stage flip-flop cleared by `store`, the 16-bit coarse counter
sampled by `store`, the 32-bit merged word, the FIFO, the AXI4-Lite port, the
five-state TDC state machine, the per-channel states, and the oscillator's
step delays.

These are this implementation's own choices:

* The oscillator is a timing model, not RTL (see above). On an FPGA it has to
  be built from LUT primitives with fixed placement, locked LUT inputs and
  hand-routed nets. Those constraints are not part of this code.
* The state machines follow the channels' `captured` levels rather than the
  asynchronous `hit_start`/`stop_store` events themselves. The channel state
  machine folds idle, oscillating and sampled into one state.
* The position of the fields inside the 32-bit word, the FIFO depth and type,
  the register map, and SLVERR on an empty read.
* A word arriving at a full FIFO is dropped, because the state machine leaves
  STORE unconditionally. `ev_dropped` reports it.
* `hit` is synchronised by two flip-flops for the COUNT_RESET decision.
* A stray stop after reset is discarded, and `ev_stray_stop` reports it.
* `count_reset` also clears the coarse counter; this is harmless because the
  difference is modular.
* The route from the enable into the oscillator (500 ps) is assumed.

Limits on trust:

* Metastability of the sampling flip-flops, temperature and voltage drift,
  and real routing delays are outside what an RTL simulation can show.
* The model is deterministic and has no jitter.
* The resolution and linearity reported for the hardware (LSB 380.9 ps, DNL
  within ±0.38 LSB, INL up to 0.7 LSB, 290 ps single-shot precision) depend on
  placement and routing, and cannot be reproduced from this code.

## Files

| file                      | content                                                              |
|---------------------------|----------------------------------------------------------------------|
| `rtl/tdc_pkg.sv`          | widths, word layout, gray/binary conversion, next-code function      |
| `rtl/gray_osc.sv`         | behavioural model of the LUT ring oscillator                         |
| `rtl/input_stage.sv`      | hit-edge flip-flop that enables one oscillator                       |
| `rtl/tdc_channel.sv`      | sampling and store registers, `store`, channel state machine         |
| `rtl/coarse_counter.sv`   | 16-bit counter and its start/stop samples                            |
| `rtl/tdc_merge.sv`        | TDC state machine, word formation, FIFO write, `count_reset`         |
| `rtl/sync_fifo.sv`        | 512 × 32 FIFO                                                        |
| `rtl/axi_lite_slave.sv`   | AXI4-Lite register port                                              |
| `rtl/gray_tdc_top.sv`     | the complete unit                                                    |
| `tb/tb_*.sv`              | one self-checking testbench per module, plus `tb_code_density`       |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Every testbench also has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/tdc_pkg.sv tb/tb_gray_tdc_top.sv --top-module tb_gray_tdc_top -o sim
./obj_dir/sim
```

Replace `tb_gray_tdc_top` with the name of any other testbench. `--timing` is
required, because the oscillator model and the testbenches use delays. All
files carry `` `timescale 1ns/1ps``.

* `tb_gray_tdc_top` runs the unit at its default parameters. It applies about 600
  pulses of 0.2 ns to 1.4 µs at picosecond-resolution offsets, and predicts
  each word's codes and coarse difference from its own step table. It also
  exercises every mechanism at least once: pulses shorter than a clock, late
  samples, a pulse arriving before re-arm, a stray stop, a full FIFO with
  dropped words, and an empty read.
* `tb_code_density` runs the 100,000-pulse code-density and single-shot test.
* `tb_routing_compare` runs two oscillator models side by side, one with the
  hand-routed delays and one with the delays automatic routing gave. It shows
  the trade-off: hand routing has the larger step (780.6 ps against 585.4 ps,
  worst case) and the better linearity (max |DNL| 0.28 against 0.51 LSB).
* The unit testbenches check their block's timing to the cycle. For the
  oscillator they check each step to the picosecond.

For synthesis, the RTL modules are plain SystemVerilog. Replace `gray_osc` by
a LUT-level netlist with placement and routing constraints for the target
device.
