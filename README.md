# TDICCD sensor clock generator

A time-delay-integration CCD (TDICCD) is an area CCD used as a line sensor. As
the image moves across the array, the charge in each column is clocked down
in step with it, so one ground point is exposed once per row and the charges
add up. Every behaviour of such a sensor is set by its clock waveforms: the
vertical imaging clocks, the transfer gates into the horizontal register, the
horizontal readout clocks and the output reset. This RTL generates all of
those clocks from one master clock. On top of plain four-phase clocking it
adds four techniques from the method of Wan, Guo, Li and Liu ("Method of
Improved TDICCD Design Based on Sensor Clocking"):

| technique | what it buys | where |
|---|---|---|
| analog tap merging | several CCD outputs share one analog line and one ADC | `tap_merge_seq` |
| continuous transfer clocking | CI clocks never stop; only a short SCK/TCK window pauses CR | `vclk_gen`, `xfer_gate_gen`, `line_ctrl` |
| pixel binning | N×M charge summing on the chip, set at run time | `hclk_gen` (horizontal), `vclk_gen` (vertical) |
| area-array mode | static exposure of k line periods, then row readout | `line_ctrl` |

The conventional burst scheme is also available as a mode. In that mode the
CI clocks are held while the horizontal register is read out.

## Sensor clocks

| output | sensor clock | meaning |
|---|---|---|
| `ci[3:0]` | CI1–CI4 | vertical 4-phase imaging clocks |
| `sck` | SCK | storage clock: last vertical stage → transfer gate |
| `tck` | TCK | transfer gate: → horizontal register |
| `tap_cr[t][3:0]` | CR1–CR4 of tap t | horizontal 4-phase readout clocks |
| `tap_crlst[t]` | CRLST of tap t | last horizontal gate, used as a summing well |
| `tap_rg[t]` | RG of tap t | sense-node reset |
| `tap_en[t]` | TAPtEN | enable of tap t's analog switch |
| `adc_sample`, `adc_tap` | — | sample strobe of the shared ADC and the tap it belongs to |
| `hban` | — | SCK/TCK window, during which no CR clock moves |
| `fsyn`, `line_sync`, `integrating`, `active_mode`, `overrun` | — | status |

Every clock is active high and changes only on `clk`. A sensor that needs
the opposite polarity on some pin gets it from an inverting clock driver.

### Four-phase sequencing (`ccd_phase4`)

At any time two adjacent gates of a pixel are high and hold the charge. The
other two gates are low and act as barriers. One step raises the leading
barrier and lowers the trailing storage gate, which moves the packet one gate
width. Four steps move it one pixel. The sequencer keeps a state s = 0..3 and
drives phases s and s+1 high:

    state 0: ph = 0011  (phase 1,2 high; rest state)
    state 1: ph = 0110
    state 2: ph = 1100
    state 3: ph = 1001

Both the CI and the CR generators are built on this sequencer.

## How a line is built (`line_ctrl`)

The sensor must move its charge at exactly the image speed. Lines therefore
start on a fixed grid of `LINE_CLKS` master clocks, whatever the line
contains. At each line start, `line_ctrl` latches the configuration and
runs three phases, each one started a clock after the previous one reports
done:

```
 line start
   | burst  : VBIN CI periods, BURST_STEP_CLKS per step   (burst TDI, area rows)
   | xfer   : XFER_CLKS window, SCK pulse then TCK pulse  (hban high)
   | hread  : tap 0 readout, safe gap, tap 1 readout, ...
   | idle   : nothing moves until the next line start
```

In **continuous TDI** there is no burst phase. `vclk_gen` runs CI all the
time with 50 % duty, so a line is just transfer, readout and idle. The CI
clocks keep running while the taps are read. Only the short transfer window
keeps the horizontal clocks still. The rate generator is a phase accumulator
that adds 4·VBIN every clock and takes a step each time it passes
`LINE_CLKS`. It therefore makes exactly 4·VBIN steps (VBIN periods) per line
for any line length. Rows clocked during line L reach the storage stage just
after line L+1 starts and are moved by that line's SCK/TCK.

In **burst TDI** the CI clocks are still during readout. They run VBIN
periods at the start of the next line, just before the transfer.

In **area-array mode** a frame starts with `fsyn`. Then come `int_lines`
line periods in which every clock is static: this is the exposure, k = T_int/T
in line periods. After that, `frame_rows` lines are read, each with the burst
structure. The frame period is (int_lines + frame_rows)·LINE_CLKS. The rows
move while they are read out and keep collecting light as they move. For that
smear to be negligible against the exposure, k must be large: the method
calls for k > 1000. The configuration is held for the whole frame.

Inside an area frame, a new configuration waits until the frame ends.
Otherwise it takes effect at the next line start. Dropping `enable` stops the
generator at the next line (or frame) boundary. If a line start finds the
previous line's work unfinished, `overrun` is set and stays set. For the
default sizes this cannot happen: the worst line is about 662 of 1024 clocks.

## Tap merging (`tap_merge_seq`)

Each tap's video passes through an analog switch. The switch outputs are tied
together and feed one ADC. This only works if at most one tap drives the line
at a time, with a margin on both sides. The sequencer reads taps 0, 1, … in
turn through a single `hclk_gen`, so every tap group comes from the same
clock and the ADC samples all taps at one rate. For tap t:

```
tap_en[t]   ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_________ ... next tap
tap_cr[t]   ______|CR group: 4*NPIX clocks|_____________
               GUARD                     GUARD   SAFE
```

* The enable rises `GUARD_CLKS` before the first CR edge and falls
  `GUARD_CLKS` after the last sample, so it covers the whole CR group.
* All enables stay low for `SAFE_CLKS` between groups. This is the safe
  interval T, in which the analog switch changes over.
* The other taps' CR groups rest (CR in state 0, CRLST and RG low).

One merged readout takes NTAPS·(2·GUARD + 4·NPIX + 1) + (NTAPS−1)·SAFE clocks.
With the defaults that is 530 clocks.

## Binning

**Horizontal (`hclk_gen`).** Charge is summed under the last horizontal gate.
CRLST stays high through a group of HBIN pixels. It drops once, in the last
step of the group's last pixel, and that dumps the sum onto the sense node.
RG clears the node once per group, in step 1 of the group's first pixel. So
one RG and one CRLST pulse go with HBIN CR cycles. In the step-0 clock after
each dump, the node holds the group's signal and `adc_sample` is high. A
final tail clock samples the last group. A readout of NPIX pixels lasts
4·NPIX+1 clocks. A last group shorter than HBIN is dumped at the last pixel.

**Vertical (`vclk_gen`).** VBIN CI periods are applied per SCK/TCK transfer.
In continuous mode these are VBIN periods per line. In burst and area modes
they are VBIN periods in the burst. The rows add up in the horizontal
register.

HBIN and VBIN are independent 4-bit run-time inputs (1–15, 0 is read as 1).
They are latched at line starts, or at frame starts in area mode.

## Parameters (top: `tdiccd_timing_top`)

| parameter | default | meaning | origin |
|---|---|---|---|
| `NTAPS` | 2 | taps merged onto one ADC | the method's example |
| `NPIX` | 64 | pixels per tap | chosen |
| `LINE_CLKS` | 1024 | line period in master clocks | chosen |
| `GUARD_CLKS` | 2 | enable lead/trail around a CR group | chosen |
| `SAFE_CLKS` | 8 | safe gap T between tap groups | chosen |
| `XFER_CLKS` | 8 | SCK/TCK window length | chosen |
| `BURST_STEP_CLKS` | 2 | CI step length in bursts | chosen |
| `CNT_W` | 16 | width of `int_lines`, `frame_rows` | chosen (k up to 65535) |

An `initial` assertion in the top checks that the worst-case line fits in
`LINE_CLKS`. The SCK/TCK pulse positions inside the window are parameters of
`xfer_gate_gen`: SCK on window clocks 1–2 and TCK on 4–5.

## What is the method's and what is this design's

The method supplies the clocking rules, and this RTL follows them:

* two storage and two barrier gates per 4-phase step;
* the TAPxEN enable covers its CR group, with a safe gap T between groups
  and every group driven from one clock;
* continuous 50 % CI, with CR banned only while SCK/TCK act;
* burst mode holds CI until readout ends;
* one RG/CRLST per N CR cycles;
* N CI periods per SCK/TCK;
* area mode runs FSYN, then static integration of k line periods, then
  readout.

This design's own choices:

* the generator structure;
* every clock count (the method gives none, apart from two taps and k > 1000);
* the step positions of RG, CRLST, sample, SCK and TCK;
* SCK before TCK, both active high;
* the accumulator-based CI rate;
* the fixed line grid;
* latching at line and frame boundaries;
* tap order 0→N−1;
* reset behaviour (asynchronous, active low, all clocks at rest).

Known departures and limits:

* **CR is not continuous outside the readout.** The method allows CR to run
  at any time outside the SCK/TCK window. Here CR runs only while a tap is
  being read, because tap merging forbids moving one tap's register while
  another tap drives the shared line. After the last tap, the horizontal
  clocks rest until the next line.
* **Naming.** The output reset clock is called RST in places and RG in
  others, and the last gate CRLAST or CRLST. These ports use RG and CRLST.
* **Polarity and shape.** Every clock is an ideal logic level. The sensor's
  drive voltages, rise times and clock overlap are left to the analog
  drivers.
* **Sizes.** A long array with up to 20 outputs does not fit one default
  generator: merging 20 taps would need about 5372 clocks per line. Use
  several 2-tap generators, or raise `NTAPS` and `LINE_CLKS` together.
* The sensor, the analog switches and the ADC are outside this RTL. The
  testbenches model them behaviourally.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops through a watchdog if it hangs.

| testbench | checks |
|---|---|
| `ccd_phase4_tb` | phase table and period flag under random step/clear |
| `vclk_gen_tb` | continuous mode: 4·VBIN legal steps and VBIN periods per line, 50 % duty; burst mode: step spacing, length, done |
| `xfer_gate_gen_tb` | window length, SCK/TCK positions, start ignored mid-window |
| `hclk_gen_tb` | charge model: every binned sample equals its group sum; RG/CRLST counts; readout length |
| `tap_merge_seq_tb` | tap order, exclusivity, enable covers CR, exact safe gap, merged sample values, total time |
| `line_ctrl_tb` | line grid, phase order in each mode, area frame structure and period, mode change held to frame end, overrun |
| `tdiccd_timing_top_tb` | end to end at default sizes (see below) |
| `tdiccd_workload_tb` | default sizes, area mode with k = 1001 (±2×2 binning) and continuous TDI with 2×2 binning |

The two top-level benches drive a behavioural sensor, `tb/tdiccd_model.sv`.
Every full CI period adds one row of charge. SCK and TCK move the charge into
the horizontal register. CR, CRLST and RG move it to the sense node. A
switch/ADC model, `tb/analog_merge_model.sv`, sums the enabled taps and
samples on `adc_sample`. For each line the bench predicts, without looking
inside the generator, how many rows must have been summed. It then checks
every ADC sample's count, tap number and value. It also checks that:

* no CR clock moves during SCK/TCK;
* CI runs during readout in continuous mode and is still in burst mode;
* at most one switch is ever on;
* the frame period is right;
* no line overruns.

It counts each mechanism (continuous and burst lines, area frames and
integration lines, horizontal and vertical binning, tap change-overs,
transfer windows, CI activity during readout, mode switches) and fails if any
of them never happens.

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/tdi_pkg.sv tb/tdiccd_timing_top_tb.sv --top-module tdiccd_timing_top_tb
./obj_dir/Vtdiccd_timing_top_tb
```

`tdiccd_timing_top_tb` simulates about 42 000 clocks. `tdiccd_workload_tb`
simulates about 3.1 million clocks, a few seconds.
