# Full-frame CCD drive timing generator built from basic states

A full-frame area-array CCD needs a few dozen tightly phased clock
waveforms: three-phase vertical clocks that move rows down the image area,
three-phase horizontal clocks that move pixels along the output register, a
reset gate, a summing gate, and sampling strobes for the analog front end.
Writing a dedicated counter-and-comparator design for each sensor is tedious
and fragile. This generator uses another approach. Each group of waveforms
is cut into short, equal time segments, the **basic states**. Each basic
state is one state of a small Moore state machine, and its output is a fixed
bit vector. Every working phase of the sensor is then a walk through these
states. A control state machine decides which walk each group takes.

To change a waveform, you edit one output word. To add a signal, you widen
the word. To get finer timing resolution, you add states and raise the clock.

The RTL is set up for a Fairchild CCD485-class sensor: 4096 × 4097 pixels,
read through four outputs, so each port handles 2048 pixels per row and
2049 rows per frame. It runs at a 10 MHz pixel rate from a 120 MHz clock.

## Structure

```
              trg sub                        ┌────────────┐ hd vd clpob
                │  │          vcount,hcount  │ ccd_sgen   ├──────────────►
  3-wire bus ┌──▼──▼──────┐ ───────────────► └────────────┘
 ──────────► │ ccd_ctrl   │  v_go            ┌────────────┐ vout {V1,V2,V3,VTG}
 ┌─────────┐ │ 5-state FSM├────────────────► │ ccd_vgen   ├──────────────►
 │ccd_bus_ │ │ VCOUNTER   │  h_go            │ SS,S0..S6  │   │ V3
 │if       ├►│ HCOUNTER   ├─────────┐        └─────▲──────┘   │
 └────┬────┘ │ BCOUNTER   │◄────────┼──────────────┼──────────┘
      │ nhb  └─────▲──────┘         │   ce_line    │
      │            │ H3             ▼        ┌─────┴──────┐
      │            │         ┌────────────┐  │ ccd_clkgen │◄── clk (GCK)
      └───────────►│         │ ccd_hgen   │  └────────────┘
                   └─────────┤ S0..S12    ├──────────────► hout
                             └────────────┘   {H2,H1,H3,SG,RG,SHP,SHD,CLKADC}
```

| module | role |
|---|---|
| `ccd_tg_pkg` | state enums, output-word tables, control-state → Go-signal decode |
| `ccd_bus_if` | 3-wire serial receiver; registers SSTART, SSTOP, NVB, NHB |
| `ccd_clkgen` | divides the system clock to the vertical-segment enable `ce_line` |
| `ccd_ctrl` | working-state machine and its three counters |
| `ccd_hgen` | pixel-rate waveform generator (13 basic states) |
| `ccd_vgen` | row-transfer waveform generator (8 basic states) |
| `ccd_sgen` | HD, VD and CLPOB from the counters |
| `ccd_tg_top` | wiring of the above |

The whole design runs on one clock, `clk`. This clock is CLK12fpix, twelve
times the pixel rate. The slower vertical-segment clock (CLK6line) is a
clock enable produced by `ccd_clkgen`, not a second clock domain.

## Pixel clock generator (`ccd_hgen`)

One pixel period has 12 segments, S1..S12. S0 is a parking state for the
time when rows are being moved. The output word is
HOUT = {H2, H1, H3, SG, RG, SHP, SHD, CLKADC}:

| state | H2 | H1 | H3 | SG | RG | SHP | SHD | CLKADC |
|---|---|---|---|---|---|---|---|---|
| S0  | 1 | 1 | 0 | 0 | 0 | 0 | 0 | 0 |
| S1  | 0 | 1 | 0 | 0 | 0 | 0 | 0 | 1 |
| S2  | 0 | 1 | 0 | 0 | 0 | 0 | 0 | 1 |
| S3  | 0 | 1 | 1 | 1 | 1 | 0 | 0 | 1 |
| S4  | 0 | 1 | 1 | 1 | 1 | 0 | 0 | 1 |
| S5  | 0 | 0 | 1 | 1 | 0 | 0 | 0 | 1 |
| S6  | 0 | 0 | 1 | 1 | 0 | 1 | 0 | 1 |
| S7  | 1 | 0 | 1 | 1 | 0 | 1 | 0 | 0 |
| S8  | 1 | 0 | 1 | 1 | 0 | 0 | 0 | 0 |
| S9  | 1 | 0 | 0 | 0 | 0 | 0 | 0 | 0 |
| S10 | 1 | 0 | 0 | 0 | 0 | 0 | 0 | 0 |
| S11 | 1 | 1 | 0 | 0 | 0 | 0 | 1 | 0 |
| S12 | 1 | 1 | 0 | 0 | 0 | 0 | 1 | 0 |

Each phase is high for 6 of the 12 segments, and the rising edges come in
the order H1 → H3 → H2. This gives overlapping three-phase transfer. RG
resets the sense node in S3–S4. SHP samples the reset (reference) level in
S6–S7. SG dumps the charge at S9. SHD samples the video level in S11–S12.
CLKADC is high in S1–S6.

Transitions:
- From S0 or S12, the FSM goes to S1 if `go.pix_transfer` is set, otherwise to S0.
- S1 → … → S12 is unconditional, so a pixel that has started always finishes.

**Horizontal binning.** A counter counts the falling edges of H3 (one per
pixel) and wraps at NHB. SG keeps its table waveform only in the pixel where
the counter wraps. In the other NHB−1 pixels SG stays high, so their charge
collects under the summing gate and is dumped once per NHB pixels. The
counter restarts in S0, at the start of every row. NHB = 0 behaves as 1.

## Row transfer generator (`ccd_vgen`)

The output word is VOUT = {V1, V2, V3, V4}. V4 has the same waveform as V3
and drives the transfer gate VTG.

| state | V1 | V2 | V3 | V4 | used for |
|---|---|---|---|---|---|
| SS | 0 | 0 | 0 | 0 | idle |
| S0 | 1 | 1 | 0 | 0 | integration and pixel readout |
| S1 | 1 | 1 | 0 | 0 | row transfer |
| S2 | 0 | 1 | 0 | 0 | row transfer |
| S3 | 0 | 1 | 1 | 1 | row transfer |
| S4 | 0 | 0 | 1 | 1 | row transfer |
| S5 | 1 | 0 | 1 | 1 | row transfer |
| S6 | 1 | 0 | 0 | 0 | row transfer |

The FSM steps only on `ce_line`, so one row transfer takes 6 × LINE_DIV
clocks. Transitions:
- SS goes to S1 on `line_transfer` and to S0 on `pix_transfer`.
- S0 goes to SS on `idle` and to S1 on `line_transfer`.
- S1 → … → S6 is unconditional.
- S6 goes to SS on `idle`, to S1 on `line_transfer` (next row), and otherwise to S0.

If `line_transfer` stays on, rows follow each other back to back. This is
how NVB rows are merged in the horizontal register (vertical binning). A row
reaches the horizontal register when V3 and VTG fall, on the step from S5 to
S6.

## Control module (`ccd_ctrl`)

There are five working states. Each state fixes the Go-signals:

| state | H line | H pix | V idle | V line | V pix |
|---|---|---|---|---|---|
| IDLE          | 0 | 1 | 1 | 0 | 0 |
| INTEGRATION   | 0 | 1 | 0 | 0 | 1 |
| LINETRANSFER  | 1 | 0 | 0 | 1 | 0 |
| PIXELTRANSFER | 0 | 1 | 0 | 0 | 1 |
| FASTERASE     | 0 | 1 | 0 | 1 | 0 |

The horizontal clocks keep running whenever no row is being moved. In
FASTERASE the horizontal and vertical clocks run together, so unwanted rows
are flushed through the output register without being read.

The control module has three counters. All of them count falling edges of
waveforms fed back from the generators:
- **VCOUNTER** counts V3 edges: rows moved since the frame started. It is cleared in IDLE and INTEGRATION.
- **BCOUNTER** counts V3 edges within one LINETRANSFER visit: rows merged.
- **HCOUNTER** counts H3 edges within one PIXELTRANSFER visit: pixels read.

Transitions:

| from | to | condition |
|---|---|---|
| IDLE | INTEGRATION | `trg` = 1 |
| INTEGRATION | LINETRANSFER | `trg` = 0, `sub` = 0 |
| INTEGRATION | FASTERASE | `trg` = 0, `sub` = 1 |
| LINETRANSFER | PIXELTRANSFER | BCOUNTER = NVB |
| PIXELTRANSFER | IDLE | HCOUNTER = NP and VCOUNTER ≥ NL |
| PIXELTRANSFER | LINETRANSFER | HCOUNTER = NP and (`sub` = 0 or VCOUNTER < SSTOP) |
| PIXELTRANSFER | FASTERASE | HCOUNTER = NP, `sub` = 1, SSTOP ≤ VCOUNTER < NL |
| FASTERASE | IDLE | VCOUNTER ≥ NL |
| FASTERASE | LINETRANSFER | VCOUNTER = SSTART |

A frame therefore works as follows:
- `trg` high means the shutter is open and the sensor integrates.
- When `trg` falls, the module alternates between moving NVB rows and reading one row of NP pixels, until NL rows have been moved.
- With `sub` = 1, only rows SSTART … SSTOP−1 (counting from 0) are read. The rows before and after them are fast-erased.

## Hand-over timing

This is the part that needs the most care when the design is changed.

- **Latency of the counters.** An edge of V3 or H3 is detected one clock after it appears. The counter updates one clock later. The state and the registered Go-signals change one clock after that.
- **End of a row readout.** H3 falls at S8 → S9 of the last pixel. The generator then still has S9–S12 to run, where SHD samples that last pixel. It reaches the S12 decision 4 clocks after the edge. The Go-signals have already changed by then, so it parks in S0.
- **Start of a row transfer.** The vertical generator first goes to S1. S1 has the same word as S0, so no vertical clock moves until S2. That is one full CLK6line period after the transfer starts. After integration the horizontal clocks can be anywhere in a pixel and need up to 13 clocks to park. For this reason **LINE_DIV must be at least 13**, and `ccd_tg_top` asserts it.
- **Start of a row readout.** PIXELTRANSFER starts right after the row's V3/VTG edge. At that moment the vertical generator is still in S6, and it goes to S0 at its next step. The row is already in the horizontal register, so the readout can start at once.

**Frame time.** Each row costs 12·NP clocks of readout, plus about 5 to 6 ×
LINE_DIV clocks of transfer, plus a few clocks of hand-over. With the
defaults, a full frame is 51.6 million clocks. That is 0.43 s at 120 MHz.

## Image timing (`ccd_sgen`)

HD, VD and CLPOB are registered range decodes of the counters:
- **HD** is high while HCOUNTER is in [HD_START, HD_STOP) during a row readout. The default [0, 1) covers the first pixel.
- **CLPOB** is high while HCOUNTER is in [CLPOB_START, CLPOB_STOP) during a row readout. The default [0, 8) covers the eight leading optical-black pixels.
- **VD** is high while VCOUNTER is in [VD_START, VD_STOP) during row transfer or readout. The default [0, 1) covers the frame's first row transfer.

With a window that starts later than row 0, VD does not fire under the
default range. Set VD_START/VD_STOP accordingly if that matters.

## Configuration

Parameters of `ccd_tg_top`:

| parameter | default | meaning |
|---|---|---|
| NP | 2048 | pixels per row and output port |
| NL | 2049 | rows per frame and output port |
| LINE_DIV | 120 | clocks per vertical segment (≥ 13) |
| CW | 12 | counter and register width |

Run-time registers are written over the 3-wire bus:
- `bus_sen_n` goes low to frame a 16-bit word.
- The word is 4 address bits followed by 12 data bits, MSB first.
- Bits are sampled on rising edges of `bus_sck`.
- The word is written when `bus_sen_n` rises, but only if exactly 16 bits arrived.
- The bus lines are synchronised into `clk`, so the high and low times of `bus_sck` must each exceed two `clk` periods.

| address | register | reset value |
|---|---|---|
| 0 | SSTART, first row of the window | 0 |
| 1 | SSTOP, first row after the window | NL |
| 2 | NVB, rows merged vertically | 1 |
| 3 | NHB, pixels merged horizontally | 1 |

Inputs `trg` and `sub` must be synchronous to `clk`. Reset is synchronous
and active high.

## Where this design adds to, or departs from, its source method

The method fixes the following: the state tables, the transitions of the
three state machines, the Go-signal table, the counter definitions and the
module split.

This implementation adds its own choices:
- **One clock domain.** CLK6line is a clock enable, and all outputs are registered.
- **Bus protocol.** The word format and the register map.
- **SG gating.** How NHB gates SG.
- **Range defaults.** The default ranges of HD, VD and CLPOB, and the qualification of these outputs by the control state.
- **Frame end.** The frame ends on VCOUNTER ≥ NL rather than = NL, so NL does not have to be a multiple of NVB.
- **Zero settings.** NVB = 0 and NHB = 0 behave as 1.
- **No-Go fallback.** The S6 → S0 fallback when no Go-signal is set.

Points to check before use on hardware:
- **SHP timing.** Two published forms of the pixel table disagree on whether SHP is high in S6–S7 or in S7–S8. This RTL uses S6–S7. Moving it is a one-line change in `ccd_tg_pkg::hout_of`.
- **Quadrant fan-out.** The real sensor takes 132 driver inputs. These are the same waveforms fanned out to four quadrants (H, RG, SG) and two halves (V, VTG). The fan-out and the level shifting belong to the board's clock drivers, so only one copy of each waveform comes out here. A split-frame sensor may need the V1/V2 order swapped for the half that transfers in the other direction. This RTL does not do that.
- **Not generated.** CLKP (an extra front-end clock) and a horizontal window are not generated.
- **Outside the RTL.** A DCM/PLL ahead of the clock input, the clock drivers, the bias supplies and the analog front end are not part of this RTL.

## Verification

`ccd_hgen`, `ccd_vgen` and `ccd_ctrl` carry concurrent assertions. These
cover the Go-signal rules (at most one request at a time), the three-phase
rule of the horizontal clocks, and the counter bounds. Run with `--assert`
to enable them.

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_ccd_hgen` | HOUT every clock against a reference table model; the 12-clock pixel period; parking; SG dumps with NHB = 1, 3, 0; random Go-signals |
| `tb_ccd_vgen` | VOUT at and between enables against a model of the state diagram; the V3 period of back-to-back rows; random Go sequences |
| `tb_ccd_clkgen` | enable period and square-wave duty at LINE_DIV = 120 and 5 |
| `tb_ccd_ctrl` | state sequences and VCOUNTER at each readout, for full frame, binning by 2 and 4, two windows and NVB = 0; the Go-signal table every cycle |
| `tb_ccd_sgen` | range decodes for default and custom ranges |
| `tb_ccd_bus_if` | reset values, writes to each register, dropped short, long and unmapped frames, random writes |
| `tb_ccd_tg_top` | four exposures (full frame; NVB = 2 with NHB = 4; window 3..5; window to the end) at NP = 16, NL = 10 |
| `tb_ccd_tg_full` | one complete frame at the default size (2049 × 2048) |

`tb_ccd_tg_top` checks the following:
- rows moved and rows read;
- pixels, SG dumps and CLPOB pixels per row;
- HD and VD counts;
- frame time;
- horizontal clocks parked while a row enters the register;
- three-phase rules;
- that every mechanism occurred at least once.

`tb_ccd_tg_full` takes about 30 s in Verilator.

To simulate one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ccd_tg_pkg.sv \
          tb/tb_ccd_tg_top.sv --top-module tb_ccd_tg_top -o sim
./obj_dir/sim
```

The package must come first on the command line. Verilator finds the other
modules through `-y rtl`.

For lint: `verilator --lint-only -Wall -Irtl -y rtl rtl/ccd_tg_pkg.sv rtl/ccd_tg_top.sv`.
The remaining lint warnings are about unused package constants and unused
debug signals (generator states, BCOUNTER) that the top does not bring out.
