# DLA engine: diffusion-limited aggregation grown in block RAM

Diffusion-limited aggregation (DLA) grows a branching, fractal cluster. A
seed particle sits in the middle of a lattice. A second particle is released
far away and takes random unit steps until it lands next to the cluster, where
it sticks. Then the next particle is released, and so on. Almost all the work
is random stepping far from the cluster, and that is slow in software.

This RTL builds the whole process in hardware for an FPGA. It follows the
machine described in the article *Simulation of diffusion limited aggregation
in field programmable gate arrays*: one Spartan-3 block RAM, two LFSR random
number generators and a small sequencer. The design rests on three ideas:

* **One bit per lattice cell.** A 128 × 128 lattice is 16,384 bits, which is
  one block RAM: 1 means occupied, 0 means empty.
* **No address arithmetic.** Cell `(x, y)` sits at address `{y, x}`: y fills
  the upper 7 bits and x the lower 7. Cell (10, 5) is at
  `14'b0000101_0001010`. No multiplier is needed. Stepping a walker is a 7-bit
  increment or decrement. The same 7-bit wrap carries a walker that leaves one
  edge back in at the opposite edge.
* **One walker at a time, one memory access per clock.** The four neighbour
  reads happen in four consecutive clocks. A step costs five clocks.

When the run ends, a host PC reads the lattice out bit by bit. It supplies
the clock for this read-out over a slow parallel port.

## Top level

```
            reset  dla_dt  master_clk        pc_clk (host)
              │      │        │                 │
        ┌─────▼──────▼────────▼─────────────────▼──────────┐
        │ control_unit                                      │
        │   walker_ctrl ── cycle_counter                    │──► seg[6:0], done
        │   transfer_counter (pc_clk)                       │──► pc_data (host)
        │   ram_clk_mux:  dla_dt ? pc_clk : master_clk      │
        │   address mux:  dla_dt ? transfer addr : walker   │
        └──▲──────────────▲───────┬────┬────┬────┬──────────┘
       rng_a[29:0]   rng_b[29:0]  │addr│we  │din │ram_clk  ▲ dout
        ┌──┴───┐      ┌───┴──┐   ┌▼────▼────▼────▼─────────┴┐
        │lfsr  │      │lfsr  │   │ lattice_ram 16384 x 1     │
        │rng A │      │rng B │   └───────────────────────────┘
        └──────┘      └──────┘   (both LFSRs clocked by master_clk)
```

`dla_system` ports:

| port | dir | meaning |
|---|---|---|
| `master_clk` | in | process clock, 100 MHz in the original |
| `reset` | in | active high. Clears the sequencer, counters and LFSRs. Asynchronous for the transfer counter. |
| `dla_dt` | in | 0: grow the cluster. 1: stop, and hand the RAM to the host. |
| `pc_clk` | in | host transfer clock, one pulse per lattice bit |
| `pc_data` | out | lattice bit for the host |
| `seg[6:0]` | out | seven-segment display {g,f,e,d,c,b,a}, active high: `0` idle, `1` running, `E` ended |
| `done` | out | the run has ended |

How to use it:

1. Hold `dla_dt` low and pulse `reset`. The machine clears the lattice, sets
   the centre cell and releases walkers until `MAX_CYCLES` master clocks have
   been used. It then raises `done` and shows `E`.
2. Raise `dla_dt`. This also ends a run early.
3. Give 16,384 rising edges on `pc_clk`. After edge *k*, `pc_data` holds cell
   *k−1*, in address order: x varies fastest, row y = 0 comes first.

After a run ends the machine stays done. Pulse `reset` (with `dla_dt` low) to
start the next run.

## The walker sequencer (`walker_ctrl`)

This is the heart of the design. States and RAM traffic, one line per clock:

| state | RAM access | next |
|---|---|---|
| `CLEAR` | write 0 to cell `clr_addr`, increment | `SEED` after the last cell (16,384 clocks) |
| `SEED` | write 1 to the centre (64, 64) | `START` |
| `START` | none. Load the walker position from the two RNG words. | `CHK_T` |
| `CHK_T` | read (x, y−1) and clear `sum` | `CHK_B` |
| `CHK_B` | read (x, y+1); `sum += top` | `CHK_R` |
| `CHK_R` | read (x+1, y); `sum += bottom` | `CHK_L` |
| `CHK_L` | read (x−1, y); `sum += right` | `EVAL` |
| `EVAL` | `total = sum + left`. If `total > 0`, write 1 at (x, y). | `START` if the walker stuck, else move and go to `CHK_T` |

The RAM has one clock of read latency. So the value of each neighbour
arrives one state after its address, and the left neighbour arrives in
`EVAL` itself. `sum` is a 3-bit register. A walker that is not stuck takes one
step every five clocks.

**Moves.** The move in `EVAL` comes from bits [1:0] of RNG A:

| bits | move |
|---|---|
| 00 | top (y − 1) |
| 01 | bottom (y + 1) |
| 10 | left (x − 1) |
| 11 | right (x + 1) |

The LFSR shifts in one new bit per clock. Five clocks apart, these two bits
are therefore fresh.

**Starting on the boundary.** In `START`:

* x comes from RNG A bits [6:0] and y from RNG B bits [6:0].
* RNG A bit 7 picks which of the two is forced onto an edge: 0 forces y,
  1 forces x.
* RNG B bit 7 picks which edge: 0 gives coordinate 0, 1 gives coordinate 127.

All four edges are equally likely, and so is every position along an edge.

**Edges.** Coordinates are 7-bit values, so the lattice is a torus.
Stepping off one edge re-enters at the opposite edge. The neighbour test
wraps the same way, so a cell on row 0 sees row 127 as its top neighbour.

**Stopping.** `cycle_counter` counts every clock in which the sequencer is
active, from the first `CLEAR` clock on. In the clock where the count reaches
`MAX_CYCLES`, `limit` is high, and the sequencer goes to `DONE` at that edge.
A run therefore uses exactly `MAX_CYCLES` clocks. With the default
51,005,100 clocks that is 510 ms at 100 MHz.

`dla_dt` is asynchronous. It passes a two-flop synchroniser, so raising it
stops the sequencer two to three clocks later. After reset, the process starts
three clocks after `dla_dt` is seen low.

**What long runs look like.** Once the cluster reaches the boundary, walkers
begin to start on or beside occupied boundary cells and stick at once. The
boundary then fills quickly, as the original design also observed. A walker
that starts on an occupied cell with an occupied neighbour rewrites a 1. The
cluster stays correct but stops growing inward. After 80 million clocks the
whole boundary is lined (see `tb_dla_system_80m`).

## Read-out to the host (`control_unit`, `transfer_counter`, `ram_clk_mux`)

The RAM has two masters in two clock domains, and `dla_dt` selects between
them:

* **`dla_dt = 0`:** the RAM clock is `master_clk`. The address, write enable
  and data come from the sequencer.
* **`dla_dt = 1`:** the RAM clock is the host's `pc_clk`. The address comes
  from a 14-bit counter clocked by `pc_clk`. Writes are blocked.

The counter wraps after 16,384 pulses, so a complete read-out leaves it at 0
for the next one. Because of the read latency, the bit the host samples after
pulse *k* is cell *k−1*.

The clock selector is a plain combinational multiplexer. A switch can make a
short pulse on the RAM clock. Writes are blocked whenever the select is high,
and the sequencer has already stopped, so such a pulse can only cause an
extra read. On an FPGA, map `ram_clk_mux` to a clock-multiplexer primitive
such as BUFGMUX.

## Random numbers (`lfsr_rng`)

Each generator is a 30-bit Fibonacci LFSR. It shifts left every clock and
feeds back the XOR of stages 30, 6, 4 and 1: the polynomial
x³⁰ + x⁶ + x⁴ + x + 1, tap mask `30'h2000_0029`. Its period is the maximal
2³⁰ − 1 = 1,073,741,823 clocks; running the recurrence in software confirms
this. The seeds `SEED_A = 30'h2AB1F00D` and `SEED_B = 30'h1C3E5A97` are
arbitrary non-zero values. Change them to grow a different cluster. An LFSR is
a weak random source: neighbouring bits of one word are shifted copies of
each other. Long straight arms do show up now and then in the clusters it
grows.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `COORD_W` | 7 | `dla_system`, `control_unit`, `walker_ctrl` | bits per coordinate. The lattice is 2^COORD_W squared. |
| `MAX_CYCLES` | 51,005,100 | `dla_system`, `control_unit`, `cycle_counter` | length of a run in master clocks (must be below 2³²) |
| `SEED_A`, `SEED_B` | see above | `dla_system` | LFSR seeds (non-zero) |
| `WIDTH`, `TAPS`, `SEED` | 30, `30'h2000_0029`, 1 | `lfsr_rng` | generator width, feedback mask and reset value |
| `ADDR_W` | 14 | `lattice_ram`, `transfer_counter` | 2 × `COORD_W` |

`COORD_W` scales everything together: the RAM depth, the transfer length and
the centre cell. The RNG words must be wider than `COORD_W`.

## Files

| file | contents |
|---|---|
| `rtl/dla_pkg.sv` | shared constants, the move-direction and phase enums |
| `rtl/dla_system.sv` | top level |
| `rtl/control_unit.sv` | sequencer, counters, clock and address multiplexers, display |
| `rtl/walker_ctrl.sv` | DLA sequencer |
| `rtl/cycle_counter.sv` | run-length counter |
| `rtl/transfer_counter.sv` | read-out address counter |
| `rtl/ram_clk_mux.sv` | RAM clock selector |
| `rtl/lattice_ram.sv` | 2^ADDR_W × 1 single-port RAM, read-first |
| `rtl/lfsr_rng.sv` | LFSR generator |
| `rtl/seg7_display.sv` | hexadecimal seven-segment decoder |

## Where this RTL fills gaps or departs from the original

The original gives the block structure and the algorithm. It does not give a
cycle-level design. These points are choices made here:

* **RNG width.** The original describes its generators once as 32-bit and
  elsewhere as 30-bit. 30 bits is used here. The tap set and the seeds are not
  given; the ones used here are this design's own.
* **Boundary start.** The rule that maps two random words onto a boundary
  cell is this design's own.
* **Neighbour order.** The reads go top, bottom, right, left, in the order
  the original lists the neighbours. The order does not change the result.
* **Clock budget.** The five-clock step and the one-clock `START` are this
  design's own. So is the one-clock-per-cell clear, which counts against
  `MAX_CYCLES`.
* **Torus neighbours.** Wrap-around for walkers is in the original. Using it
  for the neighbour test as well is this design's choice.
* **Data line.** The RAM's single bidirectional data line is split into `din`
  and `dout`.
* **Control inputs.** The `dla_dt` synchroniser, blocking writes in transfer
  mode and holding in `DONE` until reset are additions.
* **Display.** The digits on the display (0/1/E) are this design's own. The
  original only says that the display signals the end of the run.
* **RNG clock.** The original routes the RNG clocks through the control
  unit. Here they are simply `master_clk`.
* **Size.** Generic synthesis gives 149 flip-flop bits and 16,384 memory
  bits, plus a 112-bit display table that becomes logic on an FPGA. The
  original reports 160 flip-flops, 271 LUTs and one block RAM on an XC3S1000.
  LUT counts here are not measured.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_walker_ctrl` | Runs on a 16 × 16 lattice. The testbench plays the RAM, both RNGs and the counter. A reference model written as a plain sequence compares address, write enable and data every clock. Covered: clear, seed, boundary start, the four reads, stick or move, wrap, start latency, and exactly `LIMIT` clocks. Also a second run stopped by `dla_dt`. It counts each move direction, each start edge, the wraps and both stop causes, and fails if any never happened. |
| `tb_control_unit` | Display codes, the RAM clock in each mode, the clear and seed writes, and that every stuck walker had an occupied neighbour. Also exactly `MAX_CYCLES` clocks, no writes during transfer, and that the host receives every cell in order. |
| `tb_dla_system` | End to end on a 32 × 32 lattice, 400,000 clocks. Then a second run stopped by `dla_dt`. Both are read out through `pc_clk`/`pc_data`. Checks: the seed is set; the count of set cells matches the sticks; every set cell is joined to the seed through set neighbours; timing and display. Prints the cluster. |
| `tb_dla_system_full` | The same checks at the default size: 128 × 128 and 51,005,100 clocks, about 30 s of simulation. The cluster has about 2,000 cells. |
| `tb_dla_system_80m` | 128 × 128 and 80,000,000 clocks, about 40 s. The cluster lines the boundary. |
| `tb_lfsr_rng`, `tb_lattice_ram`, `tb_cycle_counter`, `tb_transfer_counter`, `tb_ram_clk_mux`, `tb_seg7_display` | Each unit against an independent model. This includes the 31-step period of a 5-bit LFSR, read-first RAM behaviour, counter limit timing and the wrap of the transfer counter. |

The simulator used has two states and no x or z. The testbenches do not
depend on initial values, apart from starting `reset` low and raising it, so
that the asynchronous reset sees an edge.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl +libext+.sv \
    rtl/dla_pkg.sv tb/tb_dla_system.sv --top-module tb_dla_system
./obj_dir/Vtb_dla_system
```

To lint the design:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/dla_pkg.sv rtl/dla_system.sv
```

The remaining lint warnings are expected:

* **Unused package constants.**
* **The unconnected `cycles` output of `control_unit`.** It is there for
  testbenches and debugging.
* **Mixed synchronous and asynchronous use of `reset`.** The transfer counter
  is clocked by the host and must be cleared while that clock is stopped.
* **`dla_dt` used both as a clock select and as a synchronised data input.**
