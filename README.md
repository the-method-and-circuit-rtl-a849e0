# FPGA test circuit for a 16-cell cellular neural network

A cellular neural network (CNN) chip computes in analog: each of its cells
holds its state as a voltage on a capacitor, and transconductors couple every
cell to its neighbours. Testing such a chip needs three things at once:
precise digital control lines, an analog voltage to preset every cell, and a
way to read every cell's analog state back. This design does all three from a
small FPGA board. It targets a one-dimensional CNN of 16 cells. It writes an
initial state into each cell through a 12-bit SPI D/A converter module. It
lets the network evolve for a programmed time. It then digitises every final
state with a 12-bit SPI A/D converter module and keeps the results in
registers, where they can be viewed on the board's display or read by a host.

One press of START runs one complete, uninterruptible test cycle. The LED
stays lit for the whole cycle.

## How the CNN chip is driven

The chip has four digital control inputs. It reacts to their edges:

| Signal | Active level | What it does |
|---|---|---|
| `INIT` (`cnn_init_n`) | low | falling edge resets the chip's cell selector to cell 0 for loading (LOAD0) |
| `clkCNN` (`cnn_clk`) | falling edge | steps the selector to the next cell, or to the next phase of the chip |
| `POWER_UP` (`cnn_power_up_n`) | low | switches all transconductors on; high keeps them off to save power |
| `FREEZE` (`cnn_freeze`) | high | connects the transconductor outputs to the state capacitors: the network evolves |

Inside the chip, the selector walks through these phases:

```
INIT falls          -> LOAD0
clkCNN falls x16    -> LOAD1 ... LOAD15, then WAIT   (each LOADx cell takes the D/A voltage)
clkCNN falls        -> SAVE0
clkCNN falls x15    -> SAVE1 ... SAVE15              (each SAVEx cell drives the A/D input)
clkCNN falls        -> IDLE
```

A full cycle therefore has one INIT pulse and 33 clkCNN falling edges.
`clkCNN` idles high. Each edge is a low pulse one controller period long.
The chip is clocked only while INIT is inactive and FREEZE is low.
FREEZE is raised only while POWER_UP is active. Assertions in
`stim_resp_ctrl` check both rules.

FREEZE polarity: high means "coupled, evolving". One passage in the original
description of the chip gives the opposite meaning. The edge description, the
evolution-phase description and the measured waveforms all agree on
high = evolving, so that is what is built. If your chip is the other way
round, invert `cnn_freeze` in the top.

## The test cycle

`stim_resp_ctrl` runs the cycle. It advances only on `tick`, a one-cycle
enable every `CTRL_DIV` cycles of the 100 MHz clock (1 us by default). All
durations are therefore whole controller periods. The 4-bit `state` output
shows the current phase:

| State | Code | What happens | Length (controller periods) |
|---|---|---|---|
| IDLE | 0000 | chip holds its state; waits for START | - |
| INIT | 0001 | INIT low | 1 |
| LOAD | 0010 | per cell: D/A write of `REG_IN_x`, settle, clkCNN pulse | per cell: conversion + `SETTLE_TICKS` + 1 |
| RUN1 | 0011 | wait after the last cell is charged | `RUN1_TICKS` |
| RUN2 | 0100 | POWER_UP low (transconductors on), wait | `RUN2_TICKS` |
| RUN3 | 0101 | FREEZE high: the network evolves | `REG_FREEZE` (0 counts as 1) |
| RUN4 | 0110 | FREEZE low, wait | `RUN4_TICKS` |
| RUN5 | 0111 | POWER_UP high (transconductors off), wait | `RUN5_TICKS` |
| SAVE | 1000 | per cell: clkCNN pulse, settle, A/D read into `REG_OUT_x` | per cell: 1 + `SETTLE_TICKS` + conversion |
| DONE | 1001 | last clkCNN pulse returns the chip to IDLE | 1 |

The RUN1 to RUN5 codes are those of the original design. The other codes are
this design's own.

Details that matter when you change the controller:

- During LOAD, the clkCNN edge for a cell comes only after that cell's D/A
  write has finished and `SETTLE_TICKS` periods have passed. The chip samples
  the D/A voltage on that edge.
- During SAVE, the edge comes first. It selects the cell. The A/D read follows
  after the settle time.
- `REG_FREEZE` is sampled when START is accepted. Editing it during a cycle
  affects the next cycle only.
- START pulses during a cycle are ignored.
- `cell_idx` is the cell being loaded or saved. It also indexes the register
  bank.

With all defaults, one cycle takes about 1.2 ms. Of that, 1 ms is RUN3 with
the reset value `REG_FREEZE` = 1000.

## Registers

`reg_bank` holds 33 registers. They are addressed the same way by the
selection switches and by the host port:

| Address | Register | Width | Buttons | Host |
|---|---|---|---|---|
| 0-15 | `REG_IN_00`..`REG_IN_15`: initial cell state, a D/A code | 12 | INC/DEC | read/write |
| 16-31 | `REG_OUT_00`..`REG_OUT_15`: final cell state, an A/D code | 12 | ignored | read only |
| 32 | `REG_FREEZE`: RUN3 length in controller periods | 16 | INC/DEC | read/write |
| 33-63 | unused | - | - | read 0 |

How the registers behave:

- Only the register selected by `sw_sel` is shown on the display and reacts to
  the buttons.
- INC and DEC saturate at the ends of the range instead of wrapping.
- INC and DEC are ignored while a test cycle runs, so the stimulus cannot
  change under a running cycle.
- After reset, every `REG_IN` holds 0x800. That is the mid-scale code, the
  1.65 V analog ground of a 3.3 V converter.

For example, 0x8BA gives 2234 × 3.3 V / 4096 = 1.80 V. That is a 150 mV pulse
above analog ground. Writing 0x8BA to `REG_IN_08` and leaving the other cells
at 0x800 gives the single-cell pulse stimulus used in `tb_cnn_tester_full`.

The host port (`host_we`, `host_addr`, `host_wdata`, `host_rdata`) is the
register side of a computer interface. A write takes effect at the next clock
edge. A read is combinational. No serial link or protocol is included.

## User interface on the board

| Port | Use |
|---|---|
| `clk` | 100 MHz oscillator |
| `btn_start` | START: run one test cycle |
| `btn_inc`, `btn_dec` | step the selected register up or down by one |
| `btn_reset` | reset everything: asynchronous assertion, release synchronised to `clk` |
| `sw_sel[5:0]` | register address shown on the display and adjusted by INC/DEC |
| `sw_power_force` | holds POWER_UP active whatever the controller does |
| `led` | on for the whole test cycle |
| `an[3:0]`, `seg[6:0]`, `dp` | four-digit 7-segment display, all active low |

The display shows the selected register as four hexadecimal digits.
Segments are ordered `{g,f,e,d,c,b,a}`. Digit 0 is the least significant
nibble.

START, INC and DEC each pass through `debounce_pulse`. That block is a
two-flip-flop synchroniser followed by a filter: the button must hold a new
level for `DEBOUNCE_CYCLES` (10 ms) before it is accepted. Each accepted press
gives exactly one pulse.

## Converter interfaces

Both converter controllers use a `start` / `busy` / `done` handshake. SCLK
runs at 100 MHz / (2 × `SPI_HALF`), which is 12.5 MHz by default, and idles
high.

- **D/A** (`spi_dac_ctrl`, DAC121S101-type converter). SYNC goes low for a
  16-bit frame `{0, 0, PD1=0, PD0=0, D11..D0}`, MSB first. DIN changes while
  SCLK is high, and the converter samples it on each falling edge. `done`
  comes 33 × `SPI_HALF` + 1 cycles after `start`.
- **A/D** (`spi_adc_ctrl`, AD7476A-type converter). CS falling starts the
  conversion. The converter sends four zeros and then D11..D0, and moves to
  the next bit on each SCLK falling edge. The controller samples at the end of
  each high phase. `done` and the data come 32 × `SPI_HALF` + 1 cycles after
  `start`. After that, CS stays high for one more SCLK period of quiet time.

The converter types follow the 12-bit Pmod D/A and A/D modules. Frame formats
come from those converters' data sheets. To use other converters, replace these
two blocks and keep the handshake.

## Files

| File | Contents |
|---|---|
| `rtl/cnn_tester_pkg.sv` | sizes, register map, state encoding, hex-to-7-segment function |
| `rtl/cnn_tester_top.sv` | the whole test circuit |
| `rtl/stim_resp_ctrl.sv` | test-cycle sequencer and CNN control lines |
| `rtl/reg_bank.sv` | REG_IN, REG_OUT, REG_FREEZE, selection, inc/dec, host port |
| `rtl/spi_dac_ctrl.sv`, `rtl/spi_adc_ctrl.sv` | converter SPI masters |
| `rtl/clk_enable_div.sv` | controller clock enable |
| `rtl/debounce_pulse.sv` | button synchroniser, filter and one-shot |
| `rtl/seg7_display.sv` | multiplexed display driver |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_cnn_tester_full` |
| `tb/cnn16_model.sv`, `tb/pmod_da2_model.sv`, `tb/pmod_ad1_model.sv` | behavioural models of the chip interface and converters |

The whole design is a single clock domain. Coarse synthesis gives about 440
word-level cells and 240 flip-flop bits. The 32 twelve-bit cell registers
come on top of that, kept as memory arrays.

## Parameters of `cnn_tester_top`

| Parameter | Default | Meaning |
|---|---|---|
| `CTRL_DIV` | 100 | clock cycles per controller period (1 us) |
| `DEBOUNCE_CYCLES` | 1,000,000 | button filter (10 ms) |
| `REFRESH_CYCLES` | 100,000 | display time per digit (1 ms) |
| `SPI_HALF` | 4 | clock cycles per SCLK half period |
| `RUN1_TICKS`, `RUN2_TICKS`, `RUN4_TICKS`, `RUN5_TICKS` | 8 | waits, in controller periods |
| `SETTLE_TICKS` | 2 | cell settling time before a clkCNN edge (LOAD) or an A/D read (SAVE) |
| `FREEZE_RESET` | 1000 | reset value of REG_FREEZE |

The original design fixes the number of cells (16), the 12-bit converters,
the 100 MHz clock, the signal polarities and the order of the cycle. None of
the parameter values above comes from it. They are reasonable choices for a
chip whose capacitors hold their charge for milliseconds. Adjust the waits
and the settle time to your chip's needs.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog. Build and run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cnn_tester_pkg.sv tb/tb_cnn_tester_top.sv --top-module tb_cnn_tester_top
./obj_dir/Vtb_cnn_tester_top
```

- `tb_cnn_tester_top` runs the whole circuit at short timing parameters. It
  connects the circuit to the chip and converter models and presses buttons
  with contact bounce. It runs two complete cycles: the single-cell pulse, then
  random stimuli with the minimum RUN3 and POWER_UP forced on. It checks every
  `REG_OUT` against the expected evolution, the frame counts, the 33 clkCNN
  edges, the FREEZE length, the state codes and the display. It also counts
  each mechanism (bounce suppression, INC, DEC, locked INC, ignored INC on a
  response register, ignored START, minimum RUN3, forced POWER_UP, display)
  and fails if one never happened.
- `tb_cnn_tester_full` runs one complete cycle with every parameter at its
  default. It simulates about 13 ms of board time, most of it the 10 ms
  button filter, and runs in under a second.
- The block testbenches check each block on its own. `tb_reg_bank` compares
  the bank with a reference model under 5000 cycles of random traffic.
  `tb_stim_resp_ctrl` checks the state order and every phase length for three
  REG_FREEZE values.

`cnn16_model` is not a model of the analog dynamics. When FREEZE falls with
the transconductors on, it replaces each cell with
(left + 2·self + right + 2) / 4. An edge cell uses its own value for the
missing neighbour. This gives the testbenches a known function of the loaded
states to check against. For a real chip, compare `REG_OUT` with your own
expectation of the network's behaviour.

## Limits and departures

- Only the register side of the computer interface is built: there is no
  link to a PC and no software to send stimuli or plot results.
- The chip lets you choose a predefined interconnection topology while it is
  idle. This circuit has no control for that choice.
- Each cell gets one constant D/A level per cycle. Time-varying stimulus
  waveforms are not generated.
- Several behaviours are this design's own choices: saturation of INC/DEC,
  the lock during a cycle, the reset values, the reset button, the switch
  assignment, all timing defaults and the converter handshakes.
