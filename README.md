# Runtime accuracy-configurable datapaths: precision-scaled copies plus LSB clock gating

Approximate hardware saves energy by computing less exactly. How much error is
acceptable changes at run time, with the input data and the application's
phase. So a datapath should offer several accuracy levels and switch between
them from one cycle to the next. There are two classic ways to do that:

* **Gating**: keep one exact circuit and clock-gate the registers that hold
  the operands' least significant bits. That is cheap in area, but it only
  saves toggling energy, because the circuit itself stays as large and as
  fast as the exact one.
* **Instantiating**: build extra copies of the circuit whose operand LSBs are
  removed at design time. Synthesis then deletes the logic those bits fed and
  can build the rest with slower, smaller gates. These copies use much less
  power at their accuracy, but every copy costs area and leakage.

This RTL combines the two. A block holds a small set of precision-scaled
copies of one kernel ("instantiations"). Any accuracy level that has no copy
of its own is served by the nearest more accurate copy, with its surplus LSB
columns clock-gated. A constant look-up table maps each accuracy level to a
copy and a gating depth. An output multiplexer returns the active copy's
result. The accuracy can change every cycle.

The approach follows the cross-layer synthesis method of T. Alan,
A. Gerstlauer and J. Henkel ("Cross-Layer Approximate Hardware Synthesis for
Runtime Configurable Accuracy"). In that method a design-time search picks the
set of copies. This RTL takes the result of such a search as a parameter.

## Accuracy levels and circuit sets

There are four accuracy levels, indexed 0 to 3. They are nominally 100 %,
98 %, 96 % and 90 %. Each level is reached by discarding LSBs from every 8-bit
operand (`acc_pkg::DROP_LSBS`):

| level | nominal accuracy | LSBs discarded |
|-------|------------------|----------------|
| 0     | 100 % (exact)    | 0              |
| 1     | 98 %             | 1              |
| 2     | 96 %             | 2              |
| 3     | 90 %             | 3              |

`INST_MASK` (4 bits, bit *a* = level *a*) says which levels get a copy of
their own. Bit 0 must be set: the exact circuit is always present, and
elaboration stops with an error otherwise. `acc_control` builds its table at
elaboration with this rule:

* If level *a* has its own copy, use that copy with no gating.
* Otherwise, use the copy of the nearest lower-numbered (more accurate)
  level *s* that has one. Clock-gate `DROP_LSBS[a] - DROP_LSBS[s]` further
  LSB columns in it.

The default is `INST_MASK = 4'b0101`, meaning an exact copy and a 96 % copy.
That gives this table:

| requested level | copy used | extra gated LSBs |
|-----------------|-----------|------------------|
| 100 %           | exact     | 0                |
| 98 %            | exact     | 1                |
| 96 %            | 96 %      | 0                |
| 90 %            | 96 %      | 1                |

This is how the default reads the solution reported as energy-optimal for
the Sobel filter under an even mix of the four levels at twice the exact
area. The source shows that solution only as a point in a plot, at about
1.65 times the exact area. That matches the exact circuit plus a 96 % copy
(about 0.59 times the exact area) plus two 3 % gating overheads. Other
sets, such as `4'b1001` (exact plus 90 %), only need a different parameter.

## Timing of an operation

Every signal below belongs to one block. All registers have an asynchronous
active-low reset, `rst_n`. The testbenches drive it with a falling edge; a
reset held low from time zero is never seen by an edge-triggered simulator.

```
edge k    : acc_req (accuracy of the NEXT operation) is registered
            -> the table drives this cycle's copy enable and gating depth
cycle k..k+1: operands on din with in_valid = 1
edge k+1  : the selected copy's non-gated input columns capture din
            (all other copies and the gated columns keep their contents)
edge k+2  : the copy's output register captures the kernel result;
            dout, dout_valid and dout_acc are valid after this edge
```

So the accuracy is named one cycle ahead of its operands. The block accepts
one operation per cycle and has no back-pressure. If `in_valid` is 0, no copy
is clocked at all, so the whole block is idle.

## Two ways to attach the copies

A block offers the result twice. Use whichever fits the system around it:

* **Shared port.** `dout` is the output of the m-to-1 multiplexer, which
  selects the active copy's result register. This suits a shared bus, where
  the block has one slave-to-master path. The multiplexer costs area, power
  and a little delay, all growing with the number of copies.
* **One address per copy.** `inst_dout` exposes every copy's result register.
  `dout_sel` names the copy that holds the result flagged by `dout_valid`.
  A host that maps each copy at its own address reads `inst_dout[dout_sel]`
  and needs no multiplexer. If `dout` is left unconnected, synthesis removes
  the multiplexer.

## What a clock-gated bit means

This behaviour matters most to anyone relying on the results, and it
differs from simple truncation:

* **Discarded bits** (a copy's static `DROP`) have no flip-flop. They read as
  0, and the kernel logic behind them is removed by synthesis.
* **Gated bits** keep whatever value they last captured. A gated 98 % result
  on the exact copy therefore uses bit 0 from an earlier operand, not 0. The
  error is bounded by the weight of the gated columns, but it depends on the
  earlier operands.
* **Idle copies are frozen.** A copy that is not selected keeps its operand
  and result registers. When it is selected again, its first result uses
  fresh upper bits and old gated bits.
* **FIR history lives in each copy.** For the FIR kernel the input register
  is the 4-sample delay line. Each copy advances its own history only on the
  operations it executes. A stream that switches copies therefore gets
  outputs built from the samples that copy has seen. This is a direct
  consequence of giving each copy its own registers. Change `approx_instance`
  if a shared delay line is wanted.

Gating works per bit column. One clock-gating cell (`clock_gate`) serves bit
position *b* of all operands of a copy. It is enabled when the copy is
selected and *b* ≥ `DROP + gate_cnt`. A second cell, enabled one cycle later,
clocks the output register.

## The kernels

Each kernel is combinational, reads 8-bit unsigned operands and sits between
the input and output registers of a copy:

| kernel (`kernel_e`) | operands | result | definition |
|---|---|---|---|
| `K_SOBEL` (`sobel3x3`) | 8 neighbour pixels, raster order without the centre | 8 bits | \|Gx\|+\|Gy\| with the standard 3x3 Sobel masks, saturated to 255 |
| `K_GAUSS` (`gauss3x3`) | 9 pixels | 8 bits | binomial [1 2 1; 2 4 2; 1 2 1] / 16, truncated |
| `K_FIR` (`fir4`) | 1 sample per operation, 4 taps | 16 bits | 32·x[n] + 96·x[n-1] + 96·x[n-2] + 32·x[n-3] |
| `K_NEURON` (`relu_neuron8`) | 8 activations | 8 bits | max(0, Σ wᵢxᵢ − 64) >> 4, saturated; w = {3,−2,5,1,−4,2,6,−1} |
| `K_EUCLID` (`euclid_dist`) | x1, y1, x2, y2 | 16 bits | (x1−x2)² + (y1−y2)², saturated to 65535 |

The operand and result widths are those of the circuits the method was
evaluated on. The coefficients, the weights, the operand order and the
saturation rules are this design's own choices. The FIR coefficients and the
neuron weights are parameters of their modules.

## Module hierarchy

```
acc_config_top            five blocks side by side, one per kernel, shared clk/rst_n
└─ acc_config_block       one accuracy-configurable kernel (KERNEL, INST_MASK)
   ├─ acc_control         accuracy register, look-up table, enables, aligned mux select/valid/tag
   ├─ approx_instance     one copy per set bit of INST_MASK (KERNEL, DROP)
   │  ├─ clock_gate       one per kept bit column, one for the output register
   │  └─ approx_kernel    picks sobel3x3 / gauss3x3 / fir4 / relu_neuron8 / euclid_dist
   └─ out_mux             m-to-1 result multiplexer
acc_pkg                   levels, LSB table, kernel enum and sizes, table helper functions
```

The top's ports are named `<k>_acc_req`, `<k>_in_valid`, `<k>_din`, `<k>_dout`,
`<k>_dout_valid`, `<k>_dout_acc`, `<k>_inst_dout` and `<k>_dout_sel`, for `k`
in sobel, gauss, fir, neuron and euclid. The blocks are independent. All five use the same `INST_MASK`, which
is the single parameter of the top.

`clock_gate` is the usual latch-plus-AND cell. Its latch is intentional. For
an ASIC, replace it with the library's integrated clock-gating cell. For an
FPGA, replace it with a clock-enable structure.

## Simulating

Every testbench is self-checking. Each ends with a line of the form
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/acc_pkg.sv tb/tb_ref_pkg.sv tb/tb_acc_config_top.sv --top-module tb_acc_config_top
./obj_dir/Vtb_acc_config_top
```

Substitute any other testbench name. `tb_ref_pkg` holds the reference models:

* integer definitions of the five kernels;
* `acc_model`, which predicts a whole block. It models the discarded bits,
  the gated columns that hold their values, the frozen copies and the FIR
  histories.

| testbench | what it shows |
|---|---|
| `tb_sobel3x3`, `tb_gauss3x3`, `tb_fir4`, `tb_relu_neuron8`, `tb_euclid_dist` | each kernel against its integer definition, on corner cases and 2000 random vectors |
| `tb_clock_gate` | exactly one gated pulse when enabled, none otherwise; no glitch when the enable changes while the clock is high |
| `tb_out_mux` | selection, and zero for an unused select code |
| `tb_acc_control` | the look-up table for two circuit sets, the one-cycle-ahead timing and the two-stage alignment of select, valid and tag |
| `tb_approx_instance` | Sobel (1 LSB discarded) and FIR (2 discarded) copies under random enable and gating, with one-edge result latency and hold when disabled |
| `tb_acc_config_block` | a Sobel block and a FIR block (`4'b1011`) under random requests and idle cycles, every result and its exact cycle checked |
| `tb_acc_config_top` | the whole top at default parameters. Every result is checked, and each mechanism must occur for each kernel: every level, switches between copies, gated operations, back-to-back accuracy changes and idle cycles |
| `tb_workloads` | the default Sobel block under the three accuracy mixes below and a 10 %-utilisation run. Checks each result, each copy's clocked-cycle count against the mix and that nothing is clocked while idle. Prints error figures |

### Accuracy mixes

The three mixes give each level's share of operations:

| mix | 100 % | 98 % | 96 % | 90 % |
|---|---|---|---|---|
| mostly exact | 0.50 | 0.20 | 0.20 | 0.10 |
| even | 0.25 | 0.25 | 0.25 | 0.25 |
| mostly approximate | 0.10 | 0.15 | 0.05 | 0.70 |

Under the default set, the exact copy executes the 100 % and 98 % shares and
the 96 % copy executes the rest; `tb_workloads` checks this cycle by cycle.

## How far the accuracy labels can be trusted

The level names (98 %, 96 %, 90 %) are nominal. Accuracy is measured as
1 − MRED, the mean relative error distance. No set number of discarded LSBs
reaches a given MRED for every input: it depends on the kernel and the data.
The 0/1/2/3-LSB mapping is a placeholder to calibrate per application.

On the smooth synthetic test image in `tb_workloads`, the Sobel block gives
PSNRs of about 38, 34 and 25 dB for the three approximate levels. The original
evaluation, on a natural photograph, reports 45, 38 and 31 dB for its
98/96/90 % levels. There are two reasons for the gap:

* the gated levels reuse stale bits;
* 1-MRED is harsh on an edge detector whose exact outputs are mostly small.

To tighten the levels, change `DROP_LSBS` in `acc_pkg`. The table, the copies
and the testbench models all follow it.

## Departures and open points

* **No design-time search.** The energy/area search that chooses
  `INST_MASK` (synthesis of each copy, gating, power characterisation and an
  exhaustive circuit-set search) is a software flow and is not part of this
  RTL.
* **No accuracy manager.** The runtime system that decides the accuracy is
  outside the block; `acc_req` is its interface.
* **Gating depth encoding.** The gating depth is carried as a 4-bit count,
  not as individual gating wires.
* **One circuit set for all kernels.** The five kernels share one circuit
  set; per-kernel optimal sets would come from the search above.
* **Energy is not modelled.** The testbench counters (enables per copy,
  gated operations, switches) are the activity figures that a power
  analysis would weight.
