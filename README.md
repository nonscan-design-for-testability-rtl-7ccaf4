# Nonscan testable filter data paths

Scan design makes a sequential circuit testable by chaining its flip-flops into shift
registers. That costs area, makes every test vector take as many cycles as the chain is
long, and rules out applying vectors at the circuit's own clock rate. This library takes
the other route for register-transfer-level data paths such as digital filters. It adds
no scan registers. Instead it places a few small multiplexors, all steered by one test
pin `ntest`, at points chosen from the RT-level structure. With those points every loop
in the data path can be driven from the ordinary primary input, and seen at the ordinary
primary output, within a few clock cycles. Test vectors can then be applied on
consecutive clock cycles, i.e. at speed.

The RTL contains three data paths, each in the test-point configuration chosen for it:

| data path | module | test hardware | testability |
|---|---|---|---|
| fourth-order IIR cascade filter | `iir_cascade_dp` | 2 constants (default); 1 constant + 1 control + 1 observation point; or 2 control + 1 observation points | two-, one- or zero-level |
| fourth-order IIR parallel filter | `iir_parallel_dp` | 2 constants + 2 dual points (default); 2 constants + 1 control + 2 observation points; or 3 control + 2 observation points. The last two need a second test pin | three-, one- or zero-level |
| one adder of an elliptic-wave-filter data path | `ewf_a2_slice` | 1 control point from the input + 1 constant, both in its register files | output controllable in one cycle |

`nonscan_dft_top` places the three side by side.

## The testability idea: k-level loops

The data paths use the dedicated register-file model. Each register feeds exactly one
execution unit (EXU: an adder or a multiplier). An EXU's output bus may load any number of
registers. Loops run from EXU output buses through registers back to EXUs. These loops are
what make sequential test generation hard.

An EXU output is **k-level controllable** when any value can be forced onto it from the
primary inputs within k+1 clock cycles. It is **k-level observable** when any value on it
can be brought to a primary output within k+1 cycles. A loop is k-level controllable or
observable when at least one of its EXUs is. A data path is **k-level testable** when
every loop is at most k-level controllable and at most k-level observable.

Scan and classic test-point insertion aim at zero-level: every loop broken directly. Here
k = 1, 2 or 3 is accepted. That lets much cheaper hardware do the job:

* **Controllability point** (`test_mux`): a 2:1 multiplexor on an EXU output bus or on a
  register input. With `ntest = 1` it selects a primary input. That node becomes
  zero-level controllable.
* **Observability point** (`test_mux`): a 2:1 multiplexor in front of a primary output.
  With `ntest = 1` it shows the probed EXU output instead of the normal output.
* **Constant** (`const_point`): forces a register input to a constant while `ntest = 1`.
  The constant is normally the identity of the EXU the register feeds, 0 for an adder.
  The EXU then passes its other operand through unchanged. If that operand is
  (k-1)-level controllable, the EXU output becomes k-level controllable. The same holds
  for observability of what arrives on the other operand. A constant multiplexor reduces
  to one AND (or OR) gate per bit, much cheaper than a full controllability point.
* **Dual point** (`test_mux`): the output of an EXU on one loop is multiplexed into a
  register on another loop. The first loop gains observability through the second, and
  the second gains controllability from the first. The hardware is the same as a single
  control or observation point.

Every test multiplexor passes its functional input when `ntest = 0`. With `ntest` held at
0 each data path behaves exactly as it would without test hardware. In test mode, `ntest`
may change from cycle to cycle. For example, a value can be built up with `ntest = 1` and
then read from the normal output register with `ntest = 0`.

One pitfall shapes where the points go. Feeding two registers of the same EXU from one
primary input, through paths with the same number of registers, ties their values
together. An adder fed that way can only produce even sums. The designs avoid this by
accepting one more level instead: the two paths then differ in length, and the two
operands are set from the input in different cycles. The parallel filter below relies on
this.

## IIR cascade data path (`iir_cascade_dp`)

### Structure

The 20-bit data path has three multipliers, two adders and twelve registers.

* `M3 = LM3 * K4`, where LM3 is loaded from the filter input `din` ("In").
* `M2 = LM2 * (K2 or K4)`, where LM2 is loaded from TU2 or TU4.
* `M1 = LM1 * (K1 or K3)`, where LM1 is loaded from TU1 or TU3.
* `A2 = LA2 + RA2` and `A1 = LA1 + RA1`. Each of the four operand registers is loaded
  through a 4-input multiplexor:

  | register | select 0 | 1 | 2 | 3 |
  |---|---|---|---|---|
  | LA2 | M3 | M1 | A1 | A2 |
  | RA2 | M2 | M1 | A1 | A2 |
  | LA1 | M2 | M1 | A2 | A1 |
  | RA1 | M2 | M1 | A1 | A2 |

* The transfer units TU1 (from A2) → TU2 and TU3 (from A1) → TU4 carry values from one
  filter iteration to the next. Each holds its value until its load bit is set.
* The output register `Out` is loaded from A2 and drives `dout`.

Altogether there are 8 operand multiplexors, 4 hold multiplexors and 12 registers.

The controller is not part of the RTL. Its outputs form the control word
`ndft_pkg::cas_ctrl_t`: one load bit per register (`ld_*`, `ld_tu[3:0]`) and the
multiplexor selects (`sel_*`). The selects are enums named after the sources above. The
coefficients `k1..k4` are inputs. Multipliers use signed fixed point with `FRAC`
fractional bits (default 10), so the value one is `1 << FRAC`. Every register loads on
the rising clock edge when its load bit is set. The EXUs are combinational. `rst_n`
clears all registers asynchronously.

### Test hardware by `DFT_LEVEL`

All loops pass through A1 or A2, so those two adders are where test hardware goes.

* **`DFT_LEVEL = 2`** (default): constant 0 into RA1 and into RA2. There is no
  multiplexor on any bus and no extra output.
  * *Justifying v at A1*, with `ntest = 1` and K4 = one:
    * cycle 1: `din = v`, load LM3;
    * cycle 2: load LA2 from M3, with RA2 = 0;
    * cycle 3: load LA1 from A2, with RA1 = 0.

    A1 now shows v: three cycles, so A1 is two-level controllable.
  * *Observing A1*: load LA2 from A1 (RA2 = 0), then load Out from A2. The value is on
    `dout` after the next edge, so A1 is two-level observable. A2 is one level better in
    both directions.
* **`DFT_LEVEL = 1`**: constant 0 into RA2. A controllability point puts `din` on the A1
  bus. An observability point shows the raw A1 sum on `dout` while `ntest = 1`.
* **`DFT_LEVEL = 0`**: controllability points put `din` on the A1 bus and on the A2 bus,
  plus the A1 observability point. Every loop is broken directly.

Level 2 needs the least hardware. Zero-level buys only a little more fault coverage at
several times the overhead.

## IIR parallel data path (`iir_parallel_dp`)

### Structure

This filter shares no hardware. Each of the twelve EXUs has its own two operand
registers, and those registers load every cycle. Only the four transfer units have a load
enable (`tu_ld[3:0]`, from the absent controller). The coefficient inputs `k1..k6` are
registered like any operand. `po` is the combinational output of adder 6+.

```
1* = PI*k1      1+ = 1* + 2+      TU1 <- 1+     TU2 <- TU1
2* = TU1*k2     3* = TU2*k3       5* = TU1*k5   2+ = 2* + 3*
4+ = 1+ + 5*    3+ = 1* + 4*      TU4 <- 3+     4* = TU4*k4
5+ = 4+ + 3+    6+ = 5+ + 6*      TU3 <- 6+     6* = TU3*k6     po = 6+
```

The loops are 1+→TU1→2*→2+→1+ and 1+→TU1→TU2→3*→2+→1+ (a second-order section), then
3+→TU4→4*→3+ and 6+→TU3→6*→6+ (two first-order sections).

### Test hardware

All four points are steered by `ntest`:

1. Constant 0 into the operand register of 1+ that comes from 2+. The loops through 1+
   become controllable from PI through 1*.
2. Dual point: 1+ replaces 4* as the second operand of 3+.
3. Constant 0 into the operand register of 6+ that comes from 5+.
4. Dual point: 3+ replaces 6* as the second operand of 6+.

In test mode (with k1 = one), `po` is the sum of two consecutive input values: the one
sampled four clock edges earlier and the one sampled three edges earlier. 3+ sees
the input through two paths of different length: 1* directly, and 1* through 1+. So any
target T is justified at 6+ from two consecutive input values. For example, 6 then 5 give
11, which a single shared input could never give over paths of equal length. That makes
6+ three-level controllable. Along the same route, 1+ and 3+ become observable at `po`.
The whole data path is three-level testable, with two constants and two dual points in
place of three control points, two observation points and their wiring.

### The zero- and one-level alternatives (`DFT_LEVEL = 0`, `1`)

Setting `DFT_LEVEL = 0` (default 3) builds the direct version for comparison. It breaks
every loop directly and needs more hardware:

* `ntest = 1` puts `pi` on the output buses of 1+, 3+ and 6+, so all three are set in the
  same cycle. `po` follows the 6+ bus.
* Two probe points, the raw sums of 1+ and 3+, share one multiplexor. `ntest = 0` selects
  1+ and `ntest = 1` selects 3+.
* A second test pin, `ntest_po`, switches `po` from the normal output to that probe.

Only one probe can be seen per cycle, which is the price of sharing the output. The
three-level version needs about 40% less test hardware than this one.

`DFT_LEVEL = 1` keeps the probes and the 6+ control point. It replaces the control points
on 1+ and 3+ with constants 0 in their feedback operand registers, from 2+ and from 4*.
Each sum then follows 1*, so a value at `pi` appears on both two edges later. That is
one-level controllability at the price of two AND gates per bit instead of two
multiplexors.

`ntest_po` is unused at level 3, and the top ties it to 0.

## EWF adder slice (`ewf_a2_slice`)

This is one adder (A2) of an elliptic-wave-filter data path with its two register files.

* RF1 holds L1 (loaded from A1, A2, A3 or M2) and L2 (from A2).
* RF2 holds R1 (from A1 or A2), R2 (from A1), R3 (from A2) and R4 (from A2).

Rather than a controllability point on the adder's output bus, the register-file scheme
makes one register of each file controllable:

* L2 loads from `pi` when `ntest = 1`;
* R4 loads constant 0 when `ntest = 1`.

Reading L2 and R4 (`lsel`, `rsel`) puts any `pi` value on `z` one cycle after the load.
The other EXUs' buses (`bus_a1`, `bus_a3`, `bus_m2`) are inputs.

The alternative, a controllability point directly on `z`, would set it in the same cycle.
It costs a full multiplexor on the bus where this scheme needs one multiplexor and one
constant in front of registers. That direct form is what the cascade's level-0/1 and the
parallel filter's level-0 versions use.

## Top level (`nonscan_dft_top`)

The three data paths share `clk` and `rst_n` only. Each has its own `ntest` and its own
ports, prefixed `cas_`, `par_` and `ewf_`. The control words stand in for the controllers
and are ports. The parameters are `WIDTH` (20) and `FRAC` (10). Each data path is
instantiated at its default configuration:

* the cascade at `DFT_LEVEL = 2`;
* the parallel filter at `DFT_LEVEL = 3`, with its unused second test pin tied to 0.

## Choices made here, and limits

These points are not fixed by the structure described above. They are this RTL's own
choices and are the first places to look when matching it to another description:

* **Operand multiplexor sources of the cascade adders.** The table above is partly
  chosen. Fixed by the design's testability argument: M3→LA2, A1→LA2 and A2→LA1. Also
  chosen: which adder feeds which transfer-unit chain (A2→TU1, A1→TU3) and the TU sources
  of LM1 and LM2.
* **Controller.** No schedule is included. Selects and loads are ports. Every cascade
  register has a load enable. The parallel filter's operand registers load every cycle.
* **Operand choice in the parallel filter.** The constant on 1+ and the dual point on 3+
  sit on the feedback operand (from 2+ and from 4*). Only that placement gives the stated
  controllability.
* **Probe selection in the zero- and one-level parallel filters.** Which probe each
  value of `ntest` selects is chosen here. The 6+ controllability point uses the same pin
  as the other test points. The one-level version is described only in words, so its
  layout follows the zero-level one.
* **Controllability-point source at cascade levels 0 and 1.** It is `din`, the only
  primary input. The observability point taps the raw A1 sum, ahead of its
  controllability multiplexor.
* **EWF slice interface.** The register-file read selects (`lsel`, `rsel`) and the
  separate load enables are chosen here.
* **Number format.** Two's-complement adders wrap. Multipliers are fixed point with
  `FRAC = 10`, arithmetic shift and truncation. The coefficients are inputs, since no
  filter coefficients are specified.
* **Reset.** Asynchronous, active low, to zero. No reset behaviour is specified.
* **Word size.** 20 bits for all three data paths. A 16-bit word is a common choice for
  an elliptic wave filter; `WIDTH` sets it.
* **Not included.**
  * The controllers. No schedule is defined for them, so their outputs are ports.
  * The rest of the EWF data path, and the speech-filter and high-sharing EWF data paths.
    Their structure is not defined.
  * The algorithm that chooses test points. It is a design-time program, not hardware.

## Simulating

All files are SystemVerilog-2017 and use no vendor primitives. `rtl/ndft_pkg.sv` must be
read first. Every testbench in `tb/` prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Example with plain Verilator:

```
verilator --binary --timing -Irtl rtl/ndft_pkg.sv tb/tb_nonscan_dft_top.sv \
          --top-module tb_nonscan_dft_top -Mdir obj && ./obj/Vtb_nonscan_dft_top
```

Each block has its own testbench (`tb_<module>.sv`):

* **Leaf cells**: directed and random checks against values computed in the testbench.
* **`tb_iir_cascade_dp`**:
  * the two-level justification and observation sequences, with value and cycle-count
    checks;
  * normal-mode transparency of the constants;
  * 3000 random cycles against a register-level reference model;
  * all three DFT levels against the model in normal mode;
  * the level-0/1 control and observation points.
* **`tb_iir_parallel_dp`**:
  * justification of random targets at 6+ from two input values (value and cycle
    count);
  * 3000 random cycles of all three DFT levels against a reference model;
  * the level-0 and level-1 control and observation points, with value and cycle
    count;
  * observation of the sums left on 1+ and 3+, one and two edges after entering test
    mode.
* **`tb_ewf_a2_slice`**: control through L2/R4, normal-mode behaviour, and random cycles
  against a model.
* **`tb_nonscan_dft_top`**: runs at the default sizes. It exercises and counts:
  * cascade justification and observation;
  * transfer-unit hold across iterations;
  * normal-mode operation;
  * justification at 6+ through the unequal-length paths;
  * recirculation of the 6+ loop in normal mode, and that the test points cut it;
  * the EWF control point;
  * `ntest` mode switches.

  It fails if any of these never happens.

All testbenches pass. Each one also fails on a deliberately broken copy of its module.
