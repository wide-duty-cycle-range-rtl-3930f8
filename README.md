# Wide duty cycle range synchronous mirror delay (SMD)

A synchronous mirror delay removes the skew between an external clock
(`EXT_CLK`) and the clock that reaches the logic (`INT_CLK`) after the input
buffer and the clock driver. It does this without a feedback loop. If the
total delay from `EXT_CLK` to `INT_CLK` is exactly two clock periods, the two
clocks are in phase. The SMD measures one period with a forward delay line
and replays the measured delay in a backward delay line. That makes the path
delay 2·Tck, and it takes two cycles.

This SMD adds three things to the basic scheme:

* **Edge-trigger mirror delay cells (EMDC).** Each cell looks for a level
  change between neighbouring taps, not for a pulse. The input clock can
  therefore have any duty cycle from 20 % to 80 %, with no need to shape it
  into narrow pulses first.
* **A blocking edge-trigger scheme.** The blocking signal `BLK` lets exactly
  one clock edge into the forward line. Only one mirror cell can then fire,
  however long the line is made for low frequencies.
* **Delay matching and fine tuning.** A dummy delay line accounts for every
  delay outside the mirror lines. A 3-bit fine-tuning delay line, with
  digitally controlled varactors in 10 ps steps, removes the error left by
  the coarse delay cells. Locking ends after 2 + 2 × 4 = 10 clock cycles.

The repository holds SystemVerilog for the whole SMD. The control logic is
synthesizable: the EMDC row, the phase detector and the timing controller.
The analog parts are behavioural models with `#` delays: the buffers, delay
cells and varactor line. So the complete design simulates with its real
timing, but only the digital blocks are meant for synthesis.

## Block diagram

```
EXT_CLK ─► IB ─┬─► DDL (IB, EMDC, FTDL@0, CD copies) ─► FDL: DC─DC─DC─ … ─DC
   │           │        ▲ gated by BLK                    │F[0] │F[1]      │F[N-1]
   │           │                                          ▼     ▼          ▼
   │        IB_OUT ───────────────────────────────────►  MCC: EMDC EMDC … EMDC
   │           │                                          │M[0] │M[1]      │M[N-1]
   │           └─────────────────────────────────────►  BDL: DC◄─DC◄─ … ◄─DC
   │                                                      │
   │                       INT_CLK ◄── CD ◄── FTDL ◄──────┘
   │                          │             ▲ FTC[2:0]
   └──────► phase detector ◄──┘             │
                 │ UP/DN ──► timing controller ──► BLK (to DDL, FDL, MCC)
```

`IB` is the input buffer (delay Td1) and `CD` the clock driver (Td4). The
forward and backward delay lines (`FDL`, `BDL`) are chains of AND delay
cells. The mirror control circuit (`MCC`) is a row of EMDCs, one per tap. The
fine-tuning delay line (`FTDL`, Td3) sits between the BDL and the clock
driver. The dummy delay line (`DDL`) contains one copy of each of IB, EMDC,
FTDL and CD.

## How the lock works

### The delay equation

Let Tddl = Td1 + Td2 + Td3 + Td4, where Td2 is the EMDC delay. An edge
leaves the input buffer, crosses the DDL and then runs in the FDL for the
rest of the period, Tck − Tddl. The mirror cell there hands the clock to the
BDL, which takes the same time coming back. The clock then passes the FTDL
and the clock driver:

```
Td1 + Tddl + (Tck − Tddl) + Td2 + (Tck − Tddl) + Td3 + Td4 = 2·Tck
```

Each term outside the mirror lines appears once in the DDL and once on the
real path, so they cancel. This includes the EMDC and FTDL delays, which the
classic scheme ignores.

### Coarse locking: cycles 1 and 2

1. After reset, `BLK` is low and both the DDL input and the FDL are closed.
2. **First `IB_OUT` rising edge:** `BLK` goes high. That edge is the first
   rising edge the DDL ever passes, so it is the only edge in the FDL.
3. **Second `IB_OUT` rising edge:** every EMDC samples its tap. The edge
   launched one period earlier has reached tap k, where
   k + 1 = ⌊(Tck − Tddl) / Tdc⌋. Tap k is high and tap k+1 is low, so cell
   k alone pulls `M[k]` low. At the same edge `BLK` falls. This blocks the
   FDL, which then empties, and freezes the EMDC flip-flops so `M[k]` holds.
4. From then on every `IB_OUT` waveform enters the BDL at cell k, through a
   transfer gate with the EMDC delay. It runs back through k+1 cells. The
   first `INT_CLK` edge arrives at the third `EXT_CLK` edge, early by the
   rounding remainder r = (Tck − Tddl) − (k+1)·Tdc, with 0 ≤ r < Tdc.

The BDL carries the whole `IB_OUT` waveform, not a pulse, so `INT_CLK` keeps
the input duty cycle.

### Why the blocking matters

An EMDC fires wherever the sampled taps go from 1 to 0. In index order,
that is every rising clock edge still travelling in the line. A long line
at a high clock frequency holds several periods. Without blocking, several
cells fire and the BDL is fed at several points at once. Here, `BLK` is high
for exactly one period, and the DDL input is gated as well. As a result only
one rising edge ever enters the line. The FDL cells are gated too: cell n
passes only while `BLK` and `M[n-2]` are high, so the edge also stops two
cells after the mirror point. `smd_top` asserts that at most one `M[n]` is
low at any time.

### Fine locking: cycles 3 to 10

After coarse locking, `INT_CLK` is early by r, which is less than one delay
cell. The FTDL adds 10 ps for each unit varactor switched onto its driving
buffer. `FTC[2]` switches four units, `FTC[1]` two and `FTC[0]` one, so the
added delay is 10 ps × FTC. The DDL's own FTDL stays at code 0. The output
FTDL starts at code 4.

The phase detector samples `INT_CLK` on each `EXT_CLK` rising edge:

* `INT_CLK` already high means it is early, and the detector gives `UP`.
* `INT_CLK` still low means it is late, and the detector gives `DN`.

On `IB_OUT` edges 4, 6, 8 and 10 the timing controller moves `FTC` one step
in that direction, saturating at 0 and 7. Each decision is based on an
`INT_CLK` edge produced with the previous code. From code 4, four steps
reach any code from 0 to 7. `LOCKED` rises on edge 10, and `FTC` is frozen
from then on. The remaining error is at most one step (±10 ps).

Example, at defaults, with Tddl = 573 ps and Tdc = 70 ps:

| clock | cells used (k+1) | r | final FTC | phase error |
|---|---|---|---|---|
| 400 MHz (2500 ps) | 27 | 37 ps | 4 | +3 ps |
| 200 MHz (5000 ps) | 63 | 17 ps | 2 | +3 ps |
| 300 MHz (3331 ps) | 39 | 28 ps | 2 | −8 ps |

## Modules

| module | kind | what it is |
|---|---|---|
| `smd_top` | model (contains delays) | the complete SMD |
| `smd_timing_controller` | RTL | BLK, FTC sequencing, LOCKED |
| `smd_phase_detector` | RTL | UP/DN flip-flop detector |
| `smd_mcc` | RTL | row of `N_CELLS` EMDCs |
| `smd_emdc` | RTL | one EMDC: DFF on tap n, `M[n] = NAND(Q[n], QB[n+1])` |
| `smd_fdl` | model | forward line, cells gated by BLK and `M[n-2]` |
| `smd_bdl` | model | backward line with mirror transfer gates |
| `smd_ddl` | model | IB + EMDC + FTDL(code 0) + CD copies, BLK-gated input |
| `smd_ftdl` | model | driving buffer with a binary-weighted varactor bank |
| `smd_delay_cell` | model | 3-input AND gate with delay `T_DC_PS` |
| `smd_delay_buffer` | model | fixed-delay buffer (IB, CD) |
| `smd_pkg` | package | FTC width, lock-sequence constants, controller states |

`smd_top` ports: `ext_clk` and `rst_n` (asynchronous, active low) in;
`int_clk` out. The outputs `ftc[2:0]`, `blk`, `up`, `dn`, `m_sel[N_CELLS-1:0]`
(active low) and `locked` are for observation. Hold `rst_n` low for a few
clock cycles with the clock running or stopped. Locking starts at the first
`IB_OUT` edge after release.

### Parameters of `smd_top` (times in ps, `timescale 1ps/1ps`)

| parameter | default | meaning |
|---|---|---|
| `N_CELLS` | 72 | FDL/BDL/MCC length |
| `FTC_W` | 3 | fine-tuning code width |
| `T_DC_PS` | 70 | delay cell (coarse resolution) |
| `T_IB_PS` | 153 | input buffer Td1 |
| `T_EMDC_PS` | 97 | EMDC / transfer gate Td2 |
| `T_FTDL_BASE_PS` | 118 | FTDL delay at code 0 |
| `T_FTDL_STEP_PS` | 10 | FTDL step per unit varactor |
| `T_CD_PS` | 205 | clock driver Td4 |

The lock works when the fine range covers one cell:
(2^FTC_W − 1) · T_FTDL_STEP_PS ≥ T_DC_PS. The line must also be long enough
for the slowest clock: N_CELLS ≥ ⌊(Tck − Tddl)/T_DC_PS⌋. With the defaults,
72 cells reach down to about 178 MHz. If the clock period is shorter than
Tddl plus one cell, no mirror cell can fire.

## Where this design departs from the published one

The 3-bit code width, the 10 ps step, the four-step and two-cycle fine
sequence, the 10-cycle lock, the EMDC circuit and the gating of FDL cells by
`M[n-2]` and `BLK` follow the original design. The following are this
implementation's own choices:

* **Delay values and line length.** None are published. The original
  describes a delay cell of "several hundred picoseconds", but a 3-bit,
  10 ps fine line spans only 70 ps and could not make up such an error.
  The model therefore uses a 70 ps cell. The odd values of the other delays
  keep clock edges from coinciding exactly with delay-line edges in the
  simulations.
* **Holding the mirror point.** `BLK` is also the capture enable of the EMDC
  flip-flops. Without it, the next `IB_OUT` edge would sample an empty,
  blocked line.
* **BLK before the first edge, and the gated DDL input.** `BLK` is low until
  the first `IB_OUT` edge, and it also gates the DDL input. This way, a clock
  that happens to be high when the line opens (as at 80 % duty) cannot look
  like an extra edge.
* **BDL transfer.** The clock enters through `NAND(IB_OUT, ~M[n])`, with the
  EMDC delay. The line carries the clock active low and is inverted once at
  its output. The dummy EMDC loading of the BDL is not modelled.
* **Phase detector.** The detector is a single sampling flip-flop.
* **FTC search.** The search is a saturating ±1 step from mid-scale.
* **Reset.** The asynchronous reset was added.
* **What is not modelled.** PVT variation, jitter and varactor
  non-linearity. All delays are fixed, so the published phase errors over
  process corners cannot be reproduced here. Only the nominal behaviour can.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/smd_pkg.sv tb/tb_smd_top.sv \
          --top-module tb_smd_top -o sim && ./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_smd_top` | the full SMD at defaults, at 200–400 MHz and 20–80 % duty: the mirror cell, the first `INT_CLK` edge, blocking, the FTC sequence, LOCKED after 10 cycles, the phase error and the duty cycle; counts each mechanism |
| `tb_smd_duty_sweep` | the same checks over 5 frequencies × 7 duty cycles (35 locks) |
| `tb_smd_timing_controller` | BLK, FTC updates only on edges 4/6/8/10, saturation, LOCKED |
| `tb_smd_phase_detector` | UP/DN for random phase offsets of ±400 ps |
| `tb_smd_emdc`, `tb_smd_mcc` | capture, enable, reset, and `M` against a reference |
| `tb_smd_fdl`, `tb_smd_bdl` | edge timing per tap, the stop at `M[k]`, blocking, and entry/exit delay |
| `tb_smd_ftdl`, `tb_smd_ddl`, `tb_smd_delay_cell`, `tb_smd_delay_buffer` | model delays |

The simulator used is two-state, so every flip-flop that is read gets reset.
All full-design tests run in well under a second.

## Extending

* **A different technology.** Change the `T_*` parameters. Keep
  7 × `T_FTDL_STEP_PS` ≥ `T_DC_PS`, or widen `FTC_W`. If `FTC_W` grows, give
  the timing controller more `FINE_STEPS`, or use a binary search, so that
  the whole code range stays reachable.
* **A wider frequency range.** Increase `N_CELLS`. The blocking scheme keeps
  a long line safe at high frequencies.
* **Synthesis.** To build a real circuit, replace the delay models with
  hand-placed cells. `smd_timing_controller`, `smd_phase_detector`,
  `smd_mcc` and `smd_emdc` synthesize as they are.
