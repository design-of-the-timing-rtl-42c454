# Timing controller of a programmable peripheral interface, with gate-delay pulse generation

A programmable peripheral interface (PPI) sits between a CPU bus and the ports
of a machine, here an automatic magnetizing and inspection system for CRTs and
monitors. When the CPU writes a new control word, the PPI has to do three things
in a fixed order:

1. store the control word,
2. clear the previous values on its output ports,
3. make register contents readable on the data bus.

The chip has no clock of its own for this. Everything is timed from the edges of
the CPU's bus strobes. The clear has to come as a pulse about 20 ns after the
write ends and has to last about 20 ns. So the controller builds its time base
from gate delays. A chain of 50 small inverters delays the write strobe by about
20 ns. A second chain of 51 inverters delays and inverts that copy by another
20 ns. An AND of the two outputs is high only in the window between them.

Sizing such a chain before layout is the hard part of the design. This RTL
carries the sizing as a delay model. Every inverter in the chain is a simulation
model whose rise and fall delays come from a linear delay predict equation. The
equation uses the cell's own data and a wiring estimate. So the pulse timing you
see in simulation is the timing the chain was designed to have.

## Block structure

```
 WRN ─┐                          wr_y_n[3:0]  ┌───────────┐
 CSN ─┼─ bus_decode ─────────────────────────▶│           │── pa_o, pb_o, pc_o
 RDN ─┤  (inverters, NAND,       rd_y_n[3:0]  │ ppi_regs  │── ctrl_word
A1,A0 ┘   two 2-to-4 decoders) ──────────────▶│           │── d_out, d_oe
                    │ wr_y_n[3] (control word) │           │◀─ d_in, pa_i, pb_i, pc_i
                    ▼                          │           │
             ┌─────────────── edge_clk_gen ─┐  │           │
             │ delay_chain(50) ──D1──┬──────┤  │           │
             │                       ▼      │  │           │
             │          delay_chain(51) ─D2─┤  │           │
             │            P1 = D1 & D2 (1ns)├─▶│ clr_out   │
             └──────────────────────────────┘  └───────────┘
```

| Module | What it is | Kind |
|---|---|---|
| `ppi_timing_ctrl` | top: wires the three parts below | logic |
| `bus_decode` | inverts WRN/RDN/CSN, NAND-gates them, drives two `dec2to4` | logic |
| `dec2to4` | 2-to-4 decoder, active-low enable and outputs | logic |
| `ppi_regs` | control word register, port A/B/C output registers, read mux | logic |
| `edge_clk_gen` | two delay chains and an AND: the reset-of-data pulse P1 | timing model |
| `delay_chain` | N inverter cells in series | timing model |
| `inv_cell` | one IN01D0 (0.5X) or IN01D1 (1X) inverter with predicted delays | timing model |
| `delay_model_pkg` | cell data and the delay predict functions | package |
| `ppi_pkg` | register select encoding, default data width | package |

The timing models use `#` delays and initial processes. Synthesis cannot use
them: in silicon these are library inverters placed by hand. The rest is
ordinary synthesisable logic clocked by the bus strobes.

## The inverter delay model

Each inverter stage is modelled with the linear delay predict equation. The
delay of one output transition is

```
t = ( Dint + Clinear * ( C_ZN + C_driven + Cest * pins + Cap0 ) ) * derating
```

- `Dint` is the cell's internal delay and `Clinear` its slew rate in ns/pF. Both
  depend on the cell and on whether the output rises or falls.
- `C_ZN` is the cell's own output pin capacitance.
- `C_driven` is the input capacitance of the pins it drives.
- `Cest * pins + Cap0` estimates the wiring before layout, for the chosen gate
  array base. It is 0.096 pF per connected pin plus 0.029 pF per net.
- `derating` covers temperature, supply and process. Its typical value, used
  here, is 0.5.

The cell data, in `delay_model_pkg`:

| cell | drive | Dint rise | Clinear rise | Dint fall | Clinear fall | C_I | C_ZN |
|---|---|---|---|---|---|---|---|
| IN01D0 | 0.5X | 0.09 ns | 3.35 ns/pF | 0.07 ns | 1.43 ns/pF | 0.043 pF | 0.040 pF |
| IN01D1 | 1X | 0.11 ns | 1.68 ns/pF | 0.06 ns | 0.71 ns/pF | 0.087 pF | 0.043 pF |

Inside a chain, each cell drives one input of the next cell over a two-pin net.
For a 0.5X cell this gives:

- rise: (0.09 + 3.35 × (0.040 + 0.043 + 0.192 + 0.029)) × 0.5 = 0.5542 ns
- fall: (0.07 + 1.43 × 0.304) × 0.5 = 0.2524 ns
- one rise plus one fall (a pair): 0.80655 ns

A chain of N cells then delays an edge by about 0.80655 ns × N/2. The last
cell drives a 0.1 pF load over a one-pin net, so it is slightly faster. A check
of the model: a four-cell chain with a falling input gives
(1.1084 + 0.5047 + 1.1084 + 0.44895) × 0.5 = 1.585 ns.

Simulated delays for a rising input, against the pair prediction:

| cells | 0.5X chain | 0.80655 ns × N/2 | 1X chain | 0.514 ns × N/2 |
|---|---|---|---|---|
| 2 | 0.741 ns | 0.807 ns | 0.435 ns | 0.514 ns |
| 10 | 3.965 ns | 4.033 ns | 2.455 ns | 2.570 ns |
| 26 | 10.413 ns | 10.485 ns | 6.495 ns | 6.682 ns |
| 50 | 20.085 ns | 20.164 ns | 12.555 ns | 12.850 ns |
| 51 | 20.374 ns | 20.567 ns | 12.750 ns | 13.107 ns |

`tb_delay_chain` prints this table for every length from 2 to 51 used in the
study (2, 6, 10, … 50).

`inv_cell` computes both delays at elaboration from its parameters (`DRIVE`,
`LOAD_PF`, `N_PINS`, `DERATING`). `delay_chain` sets those parameters for inner
and last stages. The delay is inertial: an input change cancels an output change
that is still pending, so glitches shorter than a stage delay die out. At time
zero every cell settles to `~i` with no delay, so a simulation starts from a
consistent chain.

For 1X cells the same data give 0.504 ns per pair. The original predict
equation for 1X chains states 0.514 ns. The model follows the cell data, and the
chain testbench accepts the 0.514 ns figure within 3 %.

## The reset-of-data pulse

`edge_clk_gen` takes the control word write strobe `wr_y_n[3]`. It is low during
the write and rises when WRN rises.

| event (after WRN rises) | default timing | why |
|---|---|---|
| D1 rises | 20.09 ns | 50 cells: even count, so the sense is kept |
| P1 = D1 & D2 rises | 21.09 ns | plus the 1 ns AND delay |
| D2 falls | 40.46 ns | 51 cells after D1: odd count, so inverted; 20.37 ns |
| P1 falls | 41.46 ns | pulse width 20.37 ns |

When the strobe falls at the next write, D1 falls before D2 rises. So a falling
edge makes no pulse. The strobe must stay high for at least 20.4 ns after a
control word write, or the pulse is cut short. A CPU bus cycle easily meets this.

The two chains are 50 and 51 cells long. The choice comes from the pair delay:
20 ns / 0.80655 ns is about 24.8 pairs. One more cell makes the second chain
inverting, which the AND needs. To retune the pulse, change `N_INV1`, `N_INV2`
and `T_AND` on `edge_clk_gen`. Keep `N_INV1` even and `N_INV2` odd.

## Bus decode and registers

The bus is active low: WRN, RDN and CSN. WR and CS enable the write decoder.
RD and CS enable the read decoder. A1,A0 pick the register:

| A1,A0 | write (WRN low) | read (RDN low) |
|---|---|---|
| 0 | data bus → port A output | port A pins → data bus |
| 1 | data bus → port B output | port B pins → data bus |
| 2 | data bus → port C output | port C pins → data bus |
| 3 | data bus → control word | control word → data bus |

Registers load `d_in` on the rising edge of their write strobe, which is the end
of the CPU write. Data must be valid at that edge. A control word write
therefore stores the word at once. About 21 ns later, P1 clears `pa_o`, `pb_o`
and `pc_o` through their asynchronous clears. The control word itself is not
cleared. `rst` (active high, asynchronous) clears everything.

The data bus is split into `d_in`, `d_out` and `d_oe` (`d_oe` is high while a
read is active). A pad ring would join them into one tristate bus. Immediate
assertions in `ppi_regs` check that at most one write strobe and one read enable
are active at a time.

## What is this design's own choice

These points were not fixed by the source design and were chosen here:

- The data and port width is `DATA_W = 8`.
- Binary address mapping (A1,A0 = 3 is the control word). The decoder outputs
  are active low.
- Reading a port returns its input pins (`pa_i` …), not the output register.
- An `rst` input was added.
- Only the control word strobe drives the pulse generator, as in the block
  diagram. The pulse requirement is also stated for read edges, but clearing the
  ports on reads would destroy output data, so reads make no pulse.
- Delay model details: inertial delay, zero-delay settling at time zero, and
  stage delays rounded to 1 ps by the 1 ns/1 ps timescale.

## Not included

- **Control word decoding.** The meaning of the control word bits (port
  directions, operating modes, grouping ports into 12- or 16-bit words) is not
  specified. The word is stored and read back but controls nothing.
- **The full port count.** The target system needs about 72 bidirectional port
  lines. How they are grouped and addressed is not specified, so three 8-bit
  ports on a two-bit address are built.
- **Interrupt request logic** toward the CPU. It is only mentioned as needed.
- The CPU, memories, keyboards, displays and magnetizer I/O around the PPI. Their
  bus and port signals are the top's ports.
- Post-layout delays. Only the pre-layout predict model exists here. That model
  was reported within about 5 % of post-layout simulation.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and
has a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/delay_model_pkg.sv rtl/ppi_pkg.sv tb/tb_delay_ref_pkg.sv \
  tb/tb_ppi_timing_ctrl.sv --top-module tb_ppi_timing_ctrl
obj_dir/Vtb_ppi_timing_ctrl
```

Replace the testbench name to run another one:

| testbench | what it checks |
|---|---|
| `tb_inv_cell` | rise/fall delays of both cells against hand-computed values; short pulses are swallowed |
| `tb_delay_chain` | 0.5X and 1X chains of 2, 4, 10, 26, 50, 51 cells, both edges. Compared with a per-stage reference, with the 0.80655/0.514 ns-per-pair predictions and with the four-cell 1.585 ns example |
| `tb_edge_clk_gen` | pulse start, end and width for four strobe lengths, one short enough to cut the pulse; no pulse on falling edges; width above 4 ns |
| `tb_dec2to4`, `tb_bus_decode` | exhaustive truth tables |
| `tb_ppi_regs` | 400 random writes, reads, clears and resets against a reference model |
| `tb_ppi_timing_ctrl` | end to end at default parameters: port writes, control word writes, pulse timing, port clearing, reads of every register, deselected writes, reset. Each mechanism must occur |

`tb/tb_delay_ref_pkg.sv` holds the testbenches' own delay reference. It is
written separately from `delay_model_pkg`, so a wrong cell number shows up as a
mismatch. All testbenches run in well under a second.

The simulation uses two states. Anything a model reads is set at time zero. The
asynchronous reset is given a real rising edge at the start of each test.
