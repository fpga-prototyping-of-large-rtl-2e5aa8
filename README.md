# Coupled ADPLL network for distributed clock generation

A large synchronous chip normally needs one clock tree. This design does without
one. Every synchronous clock area (SCA) of a 10 x 10 grid has its own
oscillator. Each oscillator sits in an all-digital PLL whose phase detectors
look only at the clocks of its immediate neighbours. The network pulls every
local clock to the same frequency and phase as one external reference, which
enters at the upper-left corner. All links are local, and the loop arithmetic
is digital, so the whole network can be reprogrammed while it runs.

The RTL is an FPGA-style prototype of such a network. It has the same
architecture and word widths as the intended ASIC, but the oscillator and the
time-to-digital converter are built from counters instead of delay lines.
Every frequency is therefore scaled down, with a nominal local clock of about
50 kHz derived from a 62.5 MHz counter clock.

## The grid and its phase detectors

```
 ref ─PFD─ (1,1) ─PFD─ (1,2) ─PFD─ ... ─PFD─ (1,10)
             │           │                     │
            PFD         PFD                   PFD
             │           │                     │
           (2,1) ─PFD─ (2,2) ─PFD─ ... ─PFD─ (2,10)
             ...
```

- `adpll_network` instantiates `ROWS x COLS` nodes (`fo_node`, filter plus
  oscillator).
- It places one `pfd` on every border between two neighbours: 90 horizontal
  and 90 vertical in the 10 x 10 case.
- One more PFD compares node (1,1) with the reference.
- A single PFD serves both nodes on its border. Its "+" input is the left (or
  upper) node and its "-" input the right (or lower) node. Its code `e` is
  positive when the "+" clock leads.
- The right/lower node uses `+e` and the left/upper node uses `-e`. In every
  node, an input is therefore positive when that neighbour is ahead, and a
  positive total makes the node speed up.
- Node inputs are numbered e_r1 = west (the reference, for node (1,1)),
  e_r2 = north, e_r3 = east and e_r4 = south. Inputs on the edge of the grid
  are tied to zero.

## Inside a node

```
 e_r1..4 (5b) ─► error_combiner ─► total (9b) ─► loop_filter ─► code (10b) ─► dco ─► local clock
                   × Kw1..Kw4                    PI, +512                        │
                       ▲                            ▲ K1, K2                     │
                       └──── spi_cell (25 programming bits) ────┘                └─► PFDs, filter enable
```

**PFD** (`pfd` = `bb_pfd` + `tdc` + sign logic):
- The bang-bang detector is a small automaton driven by rising edges. The first
  edge opens an interval (MODE) and records which input led (SIGN). The edge of
  the other input closes it.
- The TDC is a chronometer. It counts ticks of a separate TDC time base while
  MODE is high, restarting for each interval and saturating at 15.
- The result is a 5-bit signed code in -15..+15, updated two fast-clock
  cycles after the closing edge and held until the next measurement.
- If the leading clock fires again before the lagging one arrives (a
  frequency error), the interval stays open and the code saturates. This is
  the detector's frequency-acquisition behaviour.
- Because the TDC ticks are not aligned to the start of the interval, an
  interval shorter than one step can read 1. Codes therefore flicker by
  ±1 step, and the flicker has the sign of the error. This is inherent to a
  counter TDC.

**Error combiner**:
- Each input is multiplied by its link weight Kw, which is 0, 1, 2 or 4. The
  two-bit codes are 0, 1, 2 and 3; weights are applied as shifts.
- The four products are summed into the 9-bit total error.
- A zero weight cuts a link. The weights alone therefore define the topology:
  a single PLL, a chain, a comb, or the full bidirectional mesh, at any size
  from 1 x 1 up to the built grid.

**Loop filter** (`loop_filter`), a PI filter:

```
x     = total error, registered              (first delay)
p     = (K1 · x) >>> 5                       Kp = K1/32,   K1 = 0..31
s     = acc + K2 · x ; acc <= s              Ki = K2/4096, K2 = 0..4095, 21-bit integrator
code  = 512 + p + (s >>> 12), registered     (second delay)
```

- This is H(z) = (Kp + Ki/(1 − z⁻¹))·z⁻².
- The offset 512 starts every oscillator in the middle of its code range.
- With these widths, p and s >>> 12 are each in −256..255, so the code can
  never leave 0..1023.
- The integrator saturates at its 21-bit limits instead of wrapping.
- The filter advances once per local clock period. It samples `EN_DELAY` = 4
  fast cycles after the node's own edge (see "Timing and clocking").

**DCO** (`dco`):
- An 11-bit counter runs on the fast clock.
- When it reaches 2047 it reloads with the code and emits the local clock
  edge. The period is therefore (2^11 − code) fast cycles.
- The code sets the period, not the frequency. One step changes the frequency
  by about T_clk/T_o² near the nominal period T_o: about 40 Hz at 50 kHz
  with a 16 ns clock.
- `clk_out` is a clock-shaped copy of the output, high for the first half of
  each period.

## Programming: one serial line for the whole grid

Each node holds 25 bits:

| bits  | 24..13 | 12..8 | 7..6 | 5..4 | 3..2 | 1..0 |
|-------|--------|-------|------|------|------|------|
| field | K2 (Ki)| K1 (Kp)| Kw1 | Kw2  | Kw3  | Kw4  |

In `adpll_pkg` this is the packed struct `node_cfg_t`, MSB first. `spi_cell`
has three registers:

- **X10**, a 25-bit shift register clocked by `sck`.
- **X11**, a flip-flop on the falling edge of `sck` that feeds the next cell.
  Each cell therefore adds exactly 25 bits to the chain.
- **X12**, a 25-bit holding register loaded on the rising edge of `upd`. Only
  X12 drives the node, so the node never sees the partial values that pass
  through X10 while data shifts in.

The cells are chained row by row: node (1,1) is first after `sda_in`, and node
(ROWS,COLS) is last before `sda_out`. To program the grid:

1. Shift in 25·ROWS·COLS bits: the word of the last node first, each word MSB
   first.
2. Pulse `upd`. Every node switches to its new coefficients at the same time,
   and the network keeps running.

The whole interface needs three pins: `sck`, `sda_in` and `upd`. `sck` and
`upd` are clocks of their own. The coefficients are quasi-static values seen
by the fast clock domain, and they change only at `upd`.

## Start-up: steering away from mode-locks

The PI loop only drives each node's total error to zero. In a mesh with loops,
the total can be zero (modulo 2π) while the individual errors stay large. Such
a state is stable: all clocks share the frequency but keep fixed, large phase
offsets (a "mode-lock"). Which state the network settles into depends on where
it starts.

The network is therefore started in two steps, using only reprogramming:

1. **Unidirectional.** Each node listens to exactly one neighbour, so there
   are no loops and no mode-locks.
   - Node (1,1) follows the reference.
   - Column 1 follows the node above.
   - Every other node follows its left neighbour (the "comb").

   Errors accumulate along each chain, so the chains should be short. In the
   comb, the longest path is the Manhattan distance to the far corner (18
   borders). A serpentine "zigzag" through all nodes would be 99 borders long.
2. **Bidirectional.** Once the comb has locked, one update switches every node
   to all its neighbours, while it runs. Starting from near-zero phase errors,
   the mesh settles into the state where all errors are near zero.

## Timing and clocking in this implementation

- **One fast clock.** The DCO counters, PFDs, TDCs and filters all run on one
  fast clock `clk` (62.5 MHz nominal). Local clocks exist as one-cycle edge
  strobes plus the clock-shaped `sca_clk` outputs.
- **Reference input.** `ref_clk` is synchronised with two flip-flops and
  edge-detected.
- **TDC time base.** `tdc_tick_gen` is a 16-bit phase accumulator that gives
  the TDC a tick every 2^16/`TDC_INC` fast cycles on average. `TDC_INC` = 6996
  gives 149.9 ns. For a 100 ns step use 10486; for 50 ns use 20972.
- **Filter sampling point.** The filter does not sample at the node's own
  edge. If it did, the errors of the intervals closed by that very edge would
  not yet be published, which costs one more period of loop delay. With that
  extra delay and Kp ≈ 1, the bidirectional mesh broke into a growing
  checkerboard oscillation. Sampling four fast cycles after the edge
  (`EN_DELAY`) removes the extra delay.
- **Latency from edge to control.** An edge closes a PFD interval, and the code
  is valid two cycles later. The filter registers it at edge + 4 cycles and
  produces the new code one period later. The DCO loads that code at its next
  reload.

## Frequency plan and its limits

| quantity                  | value used here                     |
|---------------------------|-------------------------------------|
| counter clock             | 62.5 MHz (16 ns)                    |
| PFD step (TDC tick)       | 149.9 ns (TDC_INC = 6996)           |
| DCO period                | (2048 − code) · 16 ns, code 0..1023 |
| start-up code 512         | 1536 cycles, 40.7 kHz               |
| frequency range           | 30.5 kHz … 61.0 kHz                 |

The nominal prototype frequency is 50 kHz, a period of 1250 cycles, which
needs code 798. The integral path can contribute at most +255 (code 767), so a
node can hold 50 kHz only with a standing phase error that feeds the
proportional path. It cannot lock there with zero error.

The testbenches therefore use a 1500-cycle reference (41.7 kHz, code 548).
There the DCO gain is 16 ns/(24 µs)² ≈ 28 Hz/LSB instead of 40. A larger
counter or an offset in the reload would move the centre, but the equations
this design follows give neither.

## What is taken as given, and what is chosen here

These points follow the source architecture:
- the grid and PFD placement;
- the 5-bit PFD code;
- the weights 0/1/2/4;
- all filter widths, gains and the 512 offset;
- the counter DCO law;
- the 25-bit word and its field positions;
- the X10/X11/X12 interface with the UPD load;
- the comb start-up.

These points are this design's own choices:
- the automaton details, including coincident edges and the repeated leading
  edge;
- saturation at ±15;
- the two-bit weight coding;
- integrator saturation;
- Nc = 11;
- the DCO output shape;
- X11 on the falling SCK edge;
- which bit of each field is the MSB;
- the chain order;
- the link numbering and PFD signs;
- single-clock operation with the phase-accumulator TDC time base;
- `EN_DELAY`;
- the asynchronous active-low reset, which clears all coefficients to zero.
  After reset, every node free-runs at code 512 until it is programmed.

The divider "/N" between oscillator and PFDs, found in generic ADPLL nodes, is
not built. In this prototype the oscillator already runs at the comparison
frequency, so N = 1.

**Known departures:**
- Kp can reach only 31/32, so "Kp = 1" is run as 31/32, and Kp = 2 or 4
  cannot be programmed.
- The TDC step is a synthesis-time parameter (`TDC_INC`), not a run-time
  setting.
- The DCO gain follows from the counter clock and cannot be changed without a
  different clock and counter width.
- The limited lock range at 50 kHz is described in the frequency plan above.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/adpll_pkg.sv rtl/*.sv \
          tb/tb_adpll_network.sv --top-module tb_adpll_network -Mdir obj
./obj/Vtb_adpll_network
```

| testbench               | what it shows |
|-------------------------|---------------|
| `tb_bb_pfd`             | interval length and sign in both orders; repeated leading edge; coincident edges |
| `tb_tdc`                | tick counts against random intervals and tick rates; saturation |
| `tb_pfd`                | signed codes against a tick-counting model, both signs, saturation |
| `tb_error_combiner`     | weighted sums for random errors and weights |
| `tb_loop_filter`        | codes against an integer model of H(z), including integrator saturation |
| `tb_dco`                | period = 2048 − code and half-period high time; code changes only at reload |
| `tb_spi_cell`           | three cascaded cells: outputs held while shifting, simultaneous update, 25-bit delay per cell |
| `tb_fo_node`            | a node programmed over its serial port, code and period checked at every edge, reprogrammed while running |
| `tb_adpll_network`      | 4 x 4 grid: comb start-up, on-the-fly switch to bidirectional, frequency lock of every node, link errors within ±3 steps |
| `tb_adpll_network_full` | the same at the default 10 x 10 size (about 20 s) |
| `tb_topology_compare`   | 10 x 10: zigzag versus comb unidirectional start-up, offset of node (10,10) from the reference |
| `tb_tdc_step_sweep`     | three 10 x 10 networks side by side with 149.9, 100 and 50 ns TDC steps (about 1 min) |

**Observed results** (K1 = 31, K2 = 64, 149.9 ns TDC step):
- **Comb start-up.** The 10 x 10 comb locks every node, and after 2000
  reference periods every active link reads 0 steps.
- **Bidirectional switch.** After the switch, every link also reads 0 steps.
- **Zigzag start-up.** The zigzag chain does not settle in the same time:
  disturbances grow along the 99-node chain, and about half of the nodes lose
  lock at its far end.
- **Finer TDC steps.** A finer step raises the loop gain, because the same
  phase error reads as more steps. At 100 ns the link codes reach full scale,
  although every node stays frequency-locked. At 50 ns about a third of the
  nodes lose lock. A finer step should go with a lower Kp.
- **Direct bidirectional start.** Starting the mesh directly in bidirectional
  mode from reset did not settle within 3000 reference periods: link codes
  stayed at full scale.
- **Comb settling.** With only 900 periods in comb mode, a travelling
  disturbance was still present near the far corner. Switching to
  bidirectional at that point left a mode-locked mesh with saturated link
  errors. This is the failure the two-step start-up is meant to avoid, so
  leave the comb enough time.

## Files

- `rtl/adpll_pkg.sv`: widths, `node_cfg_t`, the weight codes.
- `rtl/bb_pfd.sv`, `rtl/tdc.sv`, `rtl/pfd.sv`: the phase detector.
- `rtl/error_combiner.sv`, `rtl/loop_filter.sv`, `rtl/dco.sv`: the node data
  path.
- `rtl/spi_cell.sv`: the programming interface.
- `rtl/fo_node.sv`: one node.
- `rtl/tdc_tick_gen.sv`: the TDC time base.
- `rtl/adpll_network.sv`: the top level, with parameters `ROWS`, `COLS`, `NC`
  and `TDC_INC`.
- `tb/`: the testbenches listed above.
