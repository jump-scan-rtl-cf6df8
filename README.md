# Jump scan: a scan chain that shifts two bits per clock

A mux-scan chain shifts one bit per clock cycle, so loading a pattern into N
flip-flops takes N clock cycles. Every one of those cycles toggles the clock
network and every scan cell, and the shifting pattern also toggles the logic
the flip-flops drive. As a result, test power is usually well above
functional power.

Jump scan (J-scan) keeps the test time and halves the scan clock. Each
flip-flop is already a master-slave pair of latches. In scan mode the two
latches are decoupled so that each acts as its own one-phase shift stage:
the negative latch shifts during the low phase of the clock, and the positive
latch during the high phase. The chain therefore moves one bit per clock
*phase*, or two bits per clock *cycle*. The price is one extra mux per cell
and one extra wire between neighbouring cells, the *jump path*.

The J_QN variant adds quiet-noisy toggle suppression. While a pattern shifts
in (quiet scan), every data output is held at 0, so the logic under test sees
no activity. A single one-bit shift at the end (noisy scan) then launches the
second vector of a launch-on-shift (skew-load) delay test.

This repository holds synthesizable SystemVerilog for both cells, both
chains, and a top level that contains one chain of each kind. The circuit
under test is not included: each chain brings out its flip-flops' functional
inputs and outputs as ports.

## The J-scan cell (`rtl/jscan_dff.sv`)

```
            se                         se
            |                          |
  di --0\   |                 nl --0\  |
         Mux1 --> NL (clk low) -+--  Mux2 --> PL (clk high) --> q (DO/SO)
  si --1/                       |   ji --1/
                                +--> jo
```

| se | Mux1 | Mux2 | behaviour |
|----|------|------|-----------|
| 0  | di   | NL   | ordinary rising-edge D flip-flop |
| 1  | si   | ji   | NL: si -> jo while clk is low; PL: ji -> q while clk is high |

With `se = 0` the cell is an ordinary flip-flop. The only cost in function
mode is Mux2's delay between the two latches, which adds to clock-to-q. Setup
time is unchanged.

## The chain (`rtl/jscan_chain.sv`)

Cells are numbered 1..N from the scan-in end. Each neighbouring pair is joined
by two wires:

* the **scan path**, `q` of cell k to `si` of cell k+1;
* the **jump path**, `jo` of cell k to `ji` of cell k+1.

`scan_in` drives both `si` and `ji` of cell 1. Apply one bit per clock phase,
just after each clock edge. Each phase works as follows:

* **Low phase.** Every NL copies the PL of the cell before it. NL1 takes
  `scan_in`.
* **High phase.** Every PL copies the NL of the cell before it. PL1 takes
  `scan_in`.

So a bit alternates between the two paths as it travels: it moves one latch
per phase and one cell per phase. Loading four bits A, B, C, D in four
phases (two clock cycles):

| phase | scan_in | NL1 | PL1 | NL2 | PL2 | NL3 | PL3 | NL4 | PL4 |
|-------|---------|-----|-----|-----|-----|-----|-----|-----|-----|
| I (low)   | A | A |   |   |   |   |   |   |   |
| II (high) | B | A | B |   | A |   |   |   |   |
| III (low) | C | C | B | B | A | A |   |   |   |
| IV (high) | D | C | D | B | C | A | B |   | A |

After phase IV the flip-flops (the PL outputs) hold D, C, B, A in cells 1..4.
The first bit in ends furthest from `scan_in`, as in any shift register.

**Mux3 (scan out).** The last cell's bit is in PL during the low phase and in
NL during the high phase. Mux3 therefore uses the clock itself as its select:

* clk low: `scan_out` = `q` of the last cell;
* clk high: `scan_out` = `jo` of the last cell.

`scan_out` changes only at clock edges and gives one bit per phase. The last
cell comes out first, then the cell before it, and so on.

**Odd lengths.** The chain must have an even number of cells. If `N_FF` is
odd, a dummy cell is placed at the scan-in end. Its functional input is tied
to 0 and its output is not used. The tester shifts one padding bit, which is
the last bit of each load. `jscan_pkg::num_cells()` gives the chain length.

`di[i]` and `dout[i]` belong to flip-flop i, with i = 0 nearest `scan_in`.

## The J_QN cell and chain (`rtl/jqn_dff.sv`, `rtl/jqn_chain.sv`)

The J_QN cell is the J-scan cell with three changes:

* a `rst` pin;
* a scan output `so`, taken from PL, kept separate from the data output `do_o`;
* two NOR gates and an inverter:
  * `Nor1 = NOR(~di, rst)` feeds Mux1's functional input;
  * `do_o = NOR(PL_bar, rst)`.

Mux2 is steered by `rst`, not by `se`. This is what separates the two scan
modes:

| rst | se | mode | bits per clock | do_o |
|-----|----|------|----------------|------|
| 1 | 1 | quiet scan | 2 (as J-scan) | 0 |
| 0 | 1 | noisy scan | 1 (plain master-slave shift) | cell value |
| 0 | 0 | function | rising-edge capture of di | cell value |
| 1 | 0 | reset | NL loads 0; PL loads ji | 0 |

The chain is wired exactly like the J-scan chain. It has one `rst` shared by
all cells and the same clock-selected Mux3. In noisy mode, `jo` and `so` of
the last cell hold the same bit during the high phase, so Mux3 needs no mode
input.

### Skew-load delay test with a chain of N cells

1. **Reset**, one cycle: `rst=1`, `se=0`, `scan_in=0`. Every latch clears.
   PL1 clears only because `scan_in` is 0.
2. **Quiet load**, N/2 cycles: `rst=1`, `se=1`. P1 shifts in at two bits per
   cycle. `dout` stays 0 throughout.
3. **Noisy cycle**, one cycle: set `rst=0` just after the falling edge and
   keep `se=1`. During the low phase `dout` shows P1. At the rising edge the
   chain shifts by one cell, and `dout` shows P2. `se` may drop during this
   high phase.
4. **Capture**, one cycle: `rst=0`, `se=0`. The logic's response to P2 is
   captured at the rising edge.
5. **Quiet unload**: set `rst=1` and `se=1` just after the falling edge, then
   shift the response out while the next P1 goes in.

Change `rst` only while clk is low. If it changes while PL is open, Mux2
switches under a transparent latch. `jqn_chain` checks this rule with a
concurrent assertion, and the testbenches follow it.

## Top level (`rtl/jscan_top.sv`)

`jscan_top` holds a J-scan chain (`j_*` ports) and a J_QN chain (`q_*`
ports), side by side, each with its own clock. These are the two scan styles
one would choose between for a given circuit. `N_FF` (default 1636) is the
flip-flop count of the circuit. Every flip-flop's functional input and output
are ports (`*_di`, `*_dout`), so the combinational logic of a real design
connects there.

The **double-data-rate** use of J_QN needs no hardware change. Running the
chain at the mux-scan clock rate moves two bits per mux-scan period, which
halves the test time. The tester must then drive and sample one bit per
clock phase, and the scan and jump paths must meet half-cycle timing.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `jscan_chain`, `jqn_chain` | `N_FF` | 4 | flip-flops in the chain, without the dummy cell |
| `jscan_top` | `N_FF` | 1636 | flip-flops per chain |

Published flip-flop counts of the benchmark circuits this technique was
evaluated on are 6, 21, 179, 211, 534 and 1636. Use one of these as `N_FF`
to get a chain of that length.

## How far to trust it, and where it departs

* **Latch-level model.** Both latches are written with `always_latch`, and
  Mux3 uses the clock as a data select. Synthesis gives two latches per cell
  (6544 latch bits at the default top size) plus muxes. Timing is not
  modelled:
  * the extra Mux2 delay in function mode;
  * hold margins between neighbouring latches;
  * the half-cycle paths of DDR scan.

  Cell area and the power savings are properties of the library and layout,
  and cannot be reproduced in RTL.
* **Design choices of this implementation.** These are:
  * the dummy cell's functional input is tied to 0;
  * one shared `rst` net per J_QN chain;
  * Mux3 has no mode input;
  * the top combines both chain styles;
  * the ordering of the `di`/`dout` bits.
* **Stated load order.** The published prose says the four example bits end
  in cells 1..4 in order A..D. The published load table, and the latch
  behaviour itself, put A in cell 4 and D in cell 1. The RTL and testbenches
  follow the table.
* **Reset mode.** The behaviour of `rst=1, se=0` follows from the cell's gate
  wiring. Beyond that, the source only says that the circuit is reset first.
* **Not included:**
  * the mux-scan baseline cell;
  * the combinational logic of the benchmark circuits;
  * the test equipment.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. A watchdog ends a run that hangs.

| testbench | what it covers |
|-----------|----------------|
| `tb/tb_jscan_dff.sv` | J-scan cell in both modes, phase by phase |
| `tb/tb_jqn_dff.sv` | J_QN cell in all four (rst, se) modes, including DO suppression |
| `tb/tb_jscan_chain.sv` | 4- and 5-flip-flop chains: the load table above, Mux3 in every phase, dummy cell, capture, clock count per load |
| `tb/tb_jqn_chain.sv` | 4- and 5-flip-flop J_QN chains through the full delay-test sequence, with no `dout` toggles during quiet scan |
| `tb/tb_jscan_top.sv` | top at 21 flip-flops (odd, so with a dummy cell), both chains, 12 test rounds; counts each mechanism and fails if any never occurs |
| `tb/tb_jscan_top_full.sv` | top at its default 1636 flip-flops, two complete test rounds per chain |
| `tb/tb_jscan_activity.sv` | toggle counts while loading patterns into chains of each benchmark size (below) |

`tb_jscan_activity` loads eight random patterns into a J-scan chain and a
J_QN chain of each size. For 534 flip-flops, 4272 bits load in 2136 clock
cycles. The J-scan chain's outputs toggle about 537 000 times, and the J_QN
chain's outputs, held quiet, not once. These figures count scan-cell
switching only. The power reductions claimed for the technique also include
the logic under test and the clock tree, which are not modelled here.

The top-level testbenches share `tb/jscan_harness.sv`. It is the tester,
together with a stand-in for the logic under test:
`di[i] = dout[i] ^ dout[i+1] ^ (i odd)`.

Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/jscan_pkg.sv rtl/jscan_dff.sv rtl/jqn_dff.sv rtl/jscan_chain.sv \
  rtl/jqn_chain.sv rtl/jscan_top.sv tb/jscan_harness.sv tb/tb_jscan_top.sv \
  --top-module tb_jscan_top -Mdir obj_top
./obj_top/Vtb_jscan_top
```

The full-size testbench builds in about three and a half minutes and runs in
under two seconds. Verilator reports combinational-loop warnings
(UNOPTFLAT) for the latch chains. The latches are level-sensitive and are
seen as combinational logic with memory, so the warning is expected. Because
the two latch phases never overlap, the simulation settles.
