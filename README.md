# Sigma-delta switching controller for a three-phase matrix converter

A direct matrix converter connects each of its three output phases (A, B, C)
to one of its three input phases (a, b, c) through nine bidirectional
switches. Only 27 switch states are allowed: every output is on exactly one
input. The controller in this repository picks one of those 27 states every
10 µs (100 kHz). It does this with sigma-delta modulation instead of space-vector
modulation. Three second-order sigma-delta modulators track the three desired
output voltages, and a fourth tracks the desired input reactive power. Each
modulator produces a reference. The "quantiser" is then a search: every one
of the 27 configurations is scored by how far its output voltages and reactive
power would land from those references, and the cheapest one is switched
in. The chosen configuration's actual voltages and reactive power go back to
the modulators as their quantised values, which closes the sigma-delta loop.
The switching error is therefore shaped into high frequencies in the same way
as in a 1-bit sigma-delta converter, but with a 27-level quantiser.

The RTL covers the whole programmable-logic part of such a controller:
- sigma-delta ADC decimation;
- a reference sine synthesiser;
- the four modulators;
- three time-shared cost datapaths with their own float32 arithmetic;
- the minimum search;
- safe four-step commutation of the switches;
- a logging memory;
- the register, interrupt and UART peripherals a CPU needs to drive it all over AXI4-Lite.

The CPU itself is not included. Its AXI master port and interrupt line are
top-level ports.

Everything is SystemVerilog-2017, synthesizable, on one 100 MHz clock.

## One sample, step by step

`mc_top` runs the following sequence once every 1000 clocks (defaults
R = 200, CE_DIV = 5, MUX_DIV = 50):

| cycle (approx.) | what happens | block |
|---|---|---|
| 0 | six sinc³ decimators deliver V1..V3 (input phase voltages) and I1..I3 (load currents) as 16-bit words | `adc_bank`, `sinc3_decimator` |
| 1–5 | the synthesiser steps its phase and reads three sines 120° apart, scaled by the amplitude register | `dds_fs`, `sine_rom` |
| 6 | the four modulators update and present `v_ref[0..2]` and `q_ref` | `ciff_modulator` ×4 |
| 7–457 | three lanes each walk through 9 configurations, one every 50 clocks (2 MHz) | `config_mux` → `dsp_datapath` → `config_demux`, ×3 |
| ~486 | last cost is stored; the minimum search starts | `min_detector` |
| ~491 | `k_sel` changes; the modulators latch their quantised values; a log record is built | `mc_top`, `data_selector` |
| ~492–570 | each output whose input phase changed commutates in four steps of 100 ns; the record is written as four words | `output_driver` ×3, `mem_writer` |

The work is done by about cycle 570, so the remaining 430 cycles are slack.

The 20 MHz rate of the ADC bitstreams and the memory writer is a clock
*enable* (one clock in five), not a second clock. The MUX toggle is a counter.

### Configuration numbering

`mc_pkg::conf_of(k)` holds the table. A configuration is six bits, two per
output (A in [5:4], B in [3:2], C in [1:0]), with a = `01`, b = `10` and
c = `11`. `00` never occurs.

- k = 1..18 are the pairs +1, −1, +2, −2, … +9, −9 of the classical
  matrix-converter table (for example k = 1 is `abb` and k = 4 is `cbb` = `111010`).
- k = 19..21 are the zero states `aaa`, `bbb` and `ccc`.
- k = 22..27 are the six rotating states `abc`, `acb`, `bac`, `bca`, `cab` and `cba`.

Lane L scores k = 9L+1 … 9L+9.

After reset, `k_sel` = 19, so every output sits on input a.

## The modulators (`ciff_modulator`)

Each modulator is a second-order modulator with a cascade of integrators and
feed-forward (CIFF). All coefficients are 1:

```
v1 = vdes − vact
v2 = sat(v1 + v2[n−1])          first integrator, no delay
v3 = sat(v2[n−1] + v3[n−1])     second integrator, one sample delay
vref = v2 + v3 + vdes           to the quantiser
```

Signal peaks are ±31250 counts, so `v1` can reach twice that. Both integrators
saturate at ±62500, which bounds the state when the demand cannot be met.

The quantised value `vact` fed back is different for the two kinds of
modulator:
- For the voltage modulators it is the ADC reading of the input phase that
  the chosen configuration puts on that output.
- For the reactive-power modulator it is the 16-bit reactive power that the
  datapath computed for the chosen configuration.

## The cost of one configuration (`dsp_datapath`)

For configuration k, `config_mux` prepares three sets of operands from the
ADC words:
- `vk[j]`: the input voltage that output j would see, i.e. S_k·V_s.
- `ik[i]`: the load current that input i would carry, i.e. S_kᵀ·i_L.
- The line-to-line voltages `vb−vc`, `vc−va` and `va−vb`.

These operands come from the configuration table, so no 27-entry operand
store is needed.

The datapath is a chain of small units. Each unit starts on a one-cycle
`en` pulse and hands on with a one-cycle `done` pulse:

```
addmacc_dsp (4)   q_adc = Σ (line voltage × current), 35-bit, saturating; q_act = q_adc[34:19]
error_handler (1) e_q = q_ref − q_act,  e_v[j] = v_ref[j] − vk[j]    (20-bit)
  ├ |e_q| → int2float (4) → fpau_mult × 1/Q_des (14) ───────────────┐
  └ e_v >>> 2 → addmacc_ev Σ e_v² (4) → int2float (4) → fpau_mult × 1/(V_des+V_s) (14) ─┴→ fpau_sum (2) → cost
```

The cost is `|e_q|/Q_des + ‖e_v/4‖²/(V_des+V_s)`. It is a non-negative
float32. The whole chain takes 29 cycles, which fits in one 50-cycle MUX slot.

The float units are built for this job, not general use:
- `int2float` normalises the integer with a three-stage pipelined
  leading-one detector (`lod`, made of 4-bit `lod4` cells) and then shifts.
- `fpau_mult` multiplies the 24-bit mantissas with three passes through one
  13×13 signed multiplier, using the Karatsuba–Ofman split. It then
  truncates the result. It has no rounding, no subnormals and no
  overflow/NaN handling.
- `fpau_sum` adds two non-negative numbers. It aligns them, adds, and
  normalises by at most one bit, with truncation.

These limits are enough here: all operands are non-negative magnitudes, and
the scale registers are chosen by the firmware.

`min_detector` compares the 27 costs as unsigned 32-bit patterns. This is
exact for non-negative floats. It compares them in a tournament
(27 → 14 → 7 → 4 → 2 → 1) with one register stage per round, so the
latency is 5 cycles. Ties go to the lower k.

## Commutation (`output_driver`)

Each bidirectional switch is two MOSFETs in anti-series. Bit `gate[6j+2i]` is
the "forward" MOSFET (input i → output j) and bit `gate[6j+2i+1]` is the
"reverse" one. When the selected input of an output changes, the driver
changes over in four steps, chosen by the sign of that output's load-current
word:

1. In the old switch, turn off the MOSFET that is not carrying current.
2. In the new switch, turn on the MOSFET that will carry the current.
3. In the old switch, turn off the remaining MOSFET.
4. In the new switch, turn on its second MOSFET.

The steps are `STEP_CYCLES` = 10 clocks apart. At no point can a forward
MOSFET of one input and a reverse MOSFET of another input be on together,
so two inputs are never shorted. The load always has a path.

If the target changes during a commutation, the new target is taken up
after the commutation ends.

## Logging

Once per sample, `data_selector` builds a 128-bit record.

| bits | format 1 (`CTRL[0]` = 0) | format 2 (`CTRL[0]` = 1) |
|---|---|---|
| 127:32 | V1 V2 V3 I1 I2 I3 | V1 V2 V3, ref1 ref2 ref3 |
| 31 | 0 | 0 |
| 30:25 | signs of V1..I3 | same |
| 24:22 | signs of ref1..ref3 | same |
| 21:16 | applied configuration (phase codes A, B, C) | same |
| 15:0 | memory word address the record goes to | same |

`mem_writer` writes the record to the dual-port RAM (`dpram`, 1024 × 32) as
four words, upper word first, one per 20 MHz enable. It has two modes:

- **COCO** (`CTRL[1]` = 0): continuous. The address wraps around. Events
  fire after the last word of each half has been written, so the CPU can
  read the half that is not being overwritten.
- **Snapshot** (`CTRL[1]` = 1): the memory fills once from address 0. An
  event fires at the end, and writing stops until the CPU re-arms it with
  `CTRL[3]`.

The CPU reads the memory through `ramc` on the other RAM port.

## CPU side

The AXI4-Lite requests and responses are packed structs
(`mc_pkg::axil_req_t` and `axil_rsp_t`). The PROT signals are omitted.

`axi_xbar` routes on address bits [19:12] and ignores everything above, so
the I/O region can sit at any base, for example 0xE000_0000. An unmapped
offset gets a DECERR response. Each direction has one transaction in
flight at a time.

| offset | block | registers |
|---|---|---|
| 0x0_0000 | `uart` | 0x0 data (write: send; read: `{valid, byte}` and pop), 0x4 status `{tx_full, tx_empty, rx_half, rx_avail}` / interrupt enables |
| 0x0_1000 | `intc` | 0x0 pending, 0x8 enable, 0xC acknowledge (write 1). Source 0 = UART, source 1 = `cpu_iface` |
| 0x0_2000 | `cpu_iface` | see below |
| 0x1_0000 | `ramc` | log memory, word n at 4n |

`cpu_iface` registers:

| offset | name | access | meaning |
|---|---|---|---|
| 0x00 | CTRL | rw | [0] record format, [1] mode (0 COCO, 1 snapshot), [2] logging enable; writing [3] = 1 re-arms a snapshot |
| 0x04 | FREQ | rw | phase step per sample: f = FREQ × 100 kHz / 2³² (reset value 2147484 gives 50 Hz) |
| 0x08 | AMPL | rw | reference amplitude, 0x8000 = 1.0 = 31250 counts |
| 0x0C | QDES | rw | desired reactive power, signed 16-bit |
| 0x10 | INV_QDES | rw | float32 1/Q_des (reset 1.0) |
| 0x14 | INV_VDES | rw | float32 1/(V_des+V_s) (reset 1.0) |
| 0x18 | IRQ_STAT | r, w1c | [0] COCO half, [1] COCO full, [2] snapshot done |
| 0x1C | IRQ_EN | rw | mask for IRQ_STAT |
| 0x20 | MEM_PTR | r | next memory word address |
| 0x24–0x2C | ADC | r | {V1,V2}, {V3,I1}, {I2,I3} |
| 0x30–0x34 | DAC | r | {ref1,ref2}, {ref3,0} |
| 0x38 | KSEL | r | configuration applied last |

The UART is 8N1 with 16-byte FIFOs. At the default of 10 clocks per bit it
runs at 10 MBd.

## Parameters of `mc_top`

| parameter | default | meaning |
|---|---|---|
| R | 200 | decimation ratio: 20 Mbps bitstreams → 100 kHz samples |
| CE_DIV | 5 | 100 MHz / 5 = 20 MHz bit enable |
| MUX_DIV | 50 | clocks per configuration slot (2 MHz) |
| MEM_DEPTH | 1024 | log memory words (256 records, 2.56 ms) |
| STEP_CYCLES | 10 | commutation step, clocks |
| CLKS_PER_BIT | 10 | UART bit time, clocks |

Two constraints link these parameters:
- MUX_DIV must be at least 34. That is the datapath's 29 cycles plus the
  mux and demux registers.
- 9·MUX_DIV + 20 must stay below R·CE_DIV, so the decision is made inside
  the sample.

## Where this design departs from its source

The design follows the structure of a published FPGA implementation. That
implementation was a VHDL design tried out in a QEMU/GHDL co-simulation and
then on a Xilinx board. Its block names, rates, widths, latencies,
saturation level, record formats and address map are kept here.

The following points are my own choices or deliberate differences:

- **Clocking.** The original used separate 100/120 MHz, 20 MHz and 60 MHz
  clocks. This design uses one clock with enables.
- **Cost formula.** The algorithm's formula squares both the
  reactive-power error and the voltage-error norm. The hardware
  description's datapath feeds the absolute value of the Q error to its
  float path, and that datapath is what is built here. Squaring e_q as well
  would need one more multiply in the Q branch.
- **Quantised voltage.** The voltage fed back to a voltage modulator is the
  measured input voltage of the selected phase. The source is not explicit
  on this point.
- **Operand preparation** comes from the configuration table at run time.
- **Tie-breaking** in the minimum search, **commutation timing**, **reset
  state** (all outputs on input a), **memory depth**, **event points**, and
  **every register layout** are not specified in the source. They are
  chosen here.
- **Sine table.** It is 1024 × 16, with entry i = round(31250·sin(2πi/1024)).
  It is loaded from `rtl/sine_rom.hex`. No phase dithering or interpolation
  is done.
- **Float units** truncate and do not flag overflow, as described above.

The following parts of the original system are **not included**. Each is a
CPU program, an analog device or vendor IP, not logic:
- the soft processor and its firmware and command-line protocol;
- the host program;
- the ADC chips;
- the file-driven bitstream player used in co-simulation;
- the power switches and gate drivers;
- the clocking IP;
- the SPI, I²C and GPIO peripherals.

The end-to-end testbench stands in for the processor, the ADCs and the
power stage.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog if
it hangs. They compare against models written independently of the RTL:

- **Arithmetic.** The testbenches model in software the sinc³ output,
  reactive-power MAC, error words, sum of squares, integer-to-float,
  float multiply and add (in `real`, within the truncation error), the tournament
  winner, and the DDS samples (from `$sin`).
- **Latencies.** They check the latencies stated above cycle by cycle.
- **Commutation.** Every cycle of every commutation, for both current
  directions, is checked for shorts and open loads.
- **Peripherals.** They are driven over AXI4-Lite. This covers reset
  values, write-1-to-clear, interrupt masking, UART loopback with bit
  timing, crossbar routing and DECERR.

`tb/tb_mc_top.sv` runs the full design at its default parameters for about
0.55 million clocks (5.5 ms). It closes the loop around the design:
- a 500 Hz, 28000-count three-phase source;
- an RL load fed by the selected phases;
- six first-order sigma-delta modulators producing the ADC bitstreams;
- a CPU model on AXI.

The test goes through these phases in order:
1. A UART byte is received and one is sent.
2. An unmapped access is made.
3. COCO logging runs in format 1 and then format 2, with a 1 kHz reference,
   until the buffer has filled.
4. The reference frequency is doubled.
5. A snapshot is taken with a reactive-power demand that cannot be met, so
   the modulators saturate.

On every sample it checks:
- that `k_sel` is the index of the smallest of the 27 costs;
- that the modulators got the right feedback;
- that each record has the right fields and reaches memory word for word;
- the gate patterns.

It counts each mechanism and fails if any of them never happened:
- configuration changes;
- commutations;
- saturation;
- both record formats;
- half, full and snapshot events;
- interrupts through `intc`;
- UART receive and transmit;
- DECERR;
- the frequency change, measured as 100 and then 50 samples per period.

A typical run makes 515 decisions, 247 configuration changes and 339
commutations. The 50-sample mean of (reference − applied voltage) stays
around 500 counts against a 15625-count reference.

`tb/tb_mc_cosim.sv` reproduces the original system's reference scenario at
default parameters:
- 5 kHz input sources;
- a 1 kHz synthesised reference;
- an on-line write that halves the frequency register.

It checks the following:
- the decimated input words have a 20-sample period and the expected peak;
- the reference period goes from 100 to 200 samples;
- every decision is the minimum cost;
- the feedback and the gates are correct.

It runs for about 7 ms of simulated time (700 samples).

Simulate any testbench with Verilator 5 from the repository root. Run it
from the root because the sine table is read by a relative path.

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/mc_pkg.sv tb/tb_mc_top.sv --top-module tb_mc_top -o sim
./obj_dir/sim
```

`tb/tb_check.svh` holds the check, watchdog and result macros. `tb/axil_tasks.svh`
holds the AXI4-Lite read and write tasks.

## Files

- `rtl/mc_top.sv`: the top level.
- `rtl/mc_pkg.sv`: configuration table, float and AXI types.
- Acquisition: `adc_bank`, `sinc3_decimator`.
- Reference: `dds_fs`, `sine_rom` (+ `sine_rom.hex`).
- Modulation: `ciff_modulator`.
- Cost lanes:
  - `config_mux`, `dsp_datapath` and `config_demux`;
  - the datapath's units `addmacc_dsp`, `error_handler`, `addmacc_ev`, `int2float` (with `lod`, `lod4`), `fpau_mult` and `fpau_sum`.
- Decision and drive: `min_detector`, `output_driver`.
- Logging: `data_selector`, `mem_writer`, `dpram`, `ramc`.
- CPU side: `axi_xbar`, `axil_slave_port` (shared AXI slave handshake), `cpu_iface`, `intc`, `uart`, `sync_fifo`.

Each file opens with a comment giving its function, interface and timing.
That comment also says which parts follow the source design and which are
choices made here.
