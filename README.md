# Voltage-scalable meta-functions: L1-norm, dot product, L2-norm

Motion estimation, support-vector classification and k-means clustering spend
almost all their time in one small kernel each: a sum of absolute differences
(L1-norm), a dot product, or a sum of squared differences (L2-norm). These
applications tolerate small errors, so their kernels are natural candidates for
*voltage over-scaling*: lowering the supply without slowing the clock, and
accepting that the slowest paths no longer finish in time.

A plain accumulator degrades badly under over-scaling: its long carry chains
fail first, and a wrong carry into a high bit is a large error that then stays
in the running sum. This RTL implements three kernels built to fail more
gracefully. It uses two techniques, each of which can be switched on or off:

* **Dynamic segmentation with error compensation (DSEC).** Under over-scaling
  the accumulator adder is cut into short slices, so no carry chain is longer
  than one slice. The carries this throws away are counted, and added back in
  an extra, error-free correction step.
* **Delay budgeting.** A transparent latch between the element-wise stage and
  the accumulator freezes the first stage's output at a chosen moment in the
  cycle. This moves time from a stage that tolerates late results to one that
  does not.

The source for the design is the publication *Design of Voltage-Scalable
Meta-Functions for Approximate Computing*. The RTL follows its block structure
and its worked example. Everything it leaves open was chosen here, and each
such choice is listed below.

## The three units

Each unit takes a stream of element pairs (a_i, b_i), 8-bit unsigned. It
returns one result per vector:

| unit          | first stage (A1)                  | accumulator | result                |
|---------------|-----------------------------------|-------------|-----------------------|
| `l1_norm`     | `abs_diff`: \|a-b\|               | 16 bit      | sum \|a_i - b_i\|     |
| `dot_product` | `multiplier`: a*b                 | 32 bit      | sum a_i * b_i         |
| `l2_norm`     | `abs_diff` then `multiplier` (square) | 32 bit  | sum (a_i - b_i)^2     |

All three share one frame, `mf_shell`:

```
 in_a, in_b ──► [A, B input registers] ──► A1 (unit specific) ──► budget_latch
                                                                      │
                                    result ◄── [result register] ◄── dsec_accumulator
```

`metafunc_top` places the three units side by side. They share one clock
delay chain, and each unit has its own controls. In the L2-norm chain, the
subtractor and the multiplier count as one first stage, so the budgeting latch
sits after the multiplier. The L2-norm squares |a-b| rather than the signed
difference. The square is the same, and one unsigned 8x8 multiplier is enough.

## Segmented accumulator with carry compensation

This is the core of the design (`dsec_accumulator`, `seg_adder`,
`ec_counters`, `slice_adder`).

**Segmentation.** The AW-bit adder of the accumulator is built from NSEG
slices of AW/NSEG bits. A 2:1 multiplexer sits at each slice boundary and
feeds the next slice with one of two carries:

* the real carry, when the boundary's bit of `seg_en` is 0;
* a forced 0, when it is 1 (over-scaled supply).

`seg_en` has one bit per boundary, so it sets the degree of segmentation.
All zeros gives an ordinary AW-bit adder for the nominal supply. All ones
makes the slices independent, and the longest carry chain is one slice. Any
mask in between shortens the chains part way.

Each slice is a ripple-carry or a Kogge-Stone adder, chosen by parameter
`ARCH`. The scheme works the same with either.

**Counting what was dropped.** Each boundary has a small counter (`ec_counters`)
that counts the carries its multiplexer suppressed. The register then holds a
*segmented sum*. It falls short of the true sum by exactly

    term = sum over k of count_k << ((k+1) * AW/NSEG)      (mod 2^AW)

Each counter has CW bits plus an overflow bit. It *overflows* when it reaches
2^CW, and it still holds that value so that `term` stays exact.

**Correcting.** The correction is dynamic: it runs when it is needed, not at a
fixed interval. When any counter overflows, the accumulator:

1. refuses the waiting addend for one cycle, the cycle in which the overflow is
   seen;
2. spends two cycles adding `term` to the sum with the same adder and all slice
   carries propagated. In silicon this is a two-cycle path, so the correction
   itself stays error free under over-scaling. In the RTL the sum register
   simply loads at the end of the second cycle;
3. clears the counters and takes the waiting addend on the next cycle.

Each correction therefore costs three cycles without an addend. A correction
is also run on request (`flush`) whenever a counter is non-zero. The unit
frame uses this after the last element of a vector, so every published result
is exact.

Worked example (16-bit adder, 4 slices of 4 bits, 1-bit counters; all values
hex). This sequence is checked cycle by cycle in `tb_dsec_accumulator`:

| cycle | addend offered | segmented sum | C1 C0 | note                            |
|-------|----------------|---------------|-------|---------------------------------|
| 1     | 89             | 0000          | 0 0   |                                 |
| 2     | 48             | 0089          | 0 0   | 9+8 in slice 0 drops a carry    |
| 3     | 54             | 00C1          | 0 1   | C+5 in slice 1 drops a carry    |
| 4     | A5             | 0015          | 1 1   |                                 |
| 5     | 43             | 00BA          | 1 1   |                                 |
| 6     | 9F             | 00FD          | 1 1   | both slices 0 and 1 drop a carry|
| 7     | 61 (refused)   | 008C          | 2 2   | overflow seen                   |
| 8, 9  | 61 (refused)   | -             | 2 2   | 008C + 0220 with full carries   |
| 10    | 61 (taken)     | 02AC          | 0 0   | equals the true sum             |

The counters change in the same cycle as the sum they belong to. A counter
only changes when a carry is actually dropped. In a low-power implementation
this is the clock-gating condition of the correction logic. The correction
logic could also run from a lower supply, since its paths are short, but a
supply domain has no RTL form and is not represented.

Counter width trades correction frequency against counter cost. The
correction-cycle overhead was characterised for CW = 2, 3 and 4 bits; the
default here is the 1-bit counter of the worked example.

## Delay budgeting

When two arithmetic stages are chained in one cycle, the first stage
implicitly gets priority. Under over-scaling, its late transitions can keep
disturbing the second stage until the clock edge. `budget_latch` sits
between them. It is open from the rising clock edge and closes at a selectable
moment, freezing the first stage's output. The second stage then has the rest
of the cycle to itself.

The closing moment comes from a tapped delay chain on the clock:

* `clk_delay_line` is a **behavioural model** of an inverter chain. Tap i is
  the clock delayed by (i+1) x 250 ps; the defaults are 8 taps.
* `db_enable_gen` picks a tap through a multiplexer and forms the latch enable
  as `clk AND NOT tap`, so the latch is transparent between the clock edge and
  the tap's edge. With `db_en = 0` the enable stays high. The latch is then a
  wire and the chain is the baseline one.

The latest tap must rise while the clock is still high. With 8 taps of 250 ps
that needs a high phase of at least 2 ns.

In a zero-delay simulation the latch does not change any result. It captures
the settled first-stage value before the accumulator samples it. The technique
only matters for the timing of real gates. The testbenches check that the
enable is generated correctly, and that results stay correct with budgeting on
at every tap.

## Interfaces and timing

Every unit (and each unit's port group on the top: `l1_*`, `dp_*`, `l2_*`) has
these ports:

| port        | dir | meaning                                                  |
|-------------|-----|----------------------------------------------------------|
| `in_valid`  | in  | element pair offered                                     |
| `in_ready`  | out | element taken at this rising edge if `in_valid`          |
| `in_a/in_b` | in  | 8-bit elements                                           |
| `in_last`   | in  | this is the vector's last element                        |
| `out_valid` | out | one-cycle pulse with the result                          |
| `result`    | out | the norm / dot product, modulo 2^AW                      |
| `corr_busy` | out | a correction is being detected or performed              |
| `seg_en`    | in  | segmentation mask, one bit per slice boundary (NSEG-1)   |
| `latch_en`  | in  | budgeting latch enable (units only; the top makes it)    |

The top takes `seg_en[3]` and `tap_sel[3]` (3 bits each) and `db_en[2:0]`,
indexed 0 = L1-norm, 1 = dot product, 2 = L2-norm.

* One element per cycle while no correction runs. While `in_ready` is low the
  producer must hold its element; an assertion checks this.
* An element is added one cycle after it is taken.
* In nominal mode, a vector of N elements sent without gaps into an idle unit
  produces `out_valid` N + 2 cycles after its first element was taken. Carries
  pending at the end add three cycles.
* After a result, the accumulator clears itself. The next vector's first
  element may already wait in the input registers.
* Reset: synchronous, active low (`rst_n`).

Widths are exact for up to 257 elements (L1-norm, 16 bits) and 66051 elements
(dot product and L2-norm, 32 bits) of full-scale 8-bit data. Longer vectors
wrap modulo 2^AW.

## Parameters

| parameter      | default | where              | notes                                       |
|----------------|---------|--------------------|---------------------------------------------|
| `DW`           | 8       | units              | element width                               |
| `AW`           | 16 / 32 | units              | accumulator width (L1 / dot, L2)            |
| `NSEG`         | 4       | units, accumulator | slices of the accumulator adder             |
| `CW`           | 1       | units, accumulator | carry counter width (plus an overflow bit)  |
| `ARCH`         | RCA     | all                | slice adder: `ARCH_RCA` or `ARCH_KS`        |
| `CORR_CYCLES`  | 2       | accumulator        | cycles given to the correction addition     |
| `TAPS`         | 8       | top, delay chain   | delay taps                                  |
| `TAP_DELAY_PS` | 250     | top, delay chain   | delay per tap                               |

## Sizes of the workloads

| workload                               | operation | vector length | needed vs built                              |
|----------------------------------------|-----------|---------------|----------------------------------------------|
| motion estimation, CIF video           | L1-norm   | 256 (16x16 block) | 256 x 255 = 65,280 < 2^16: fits          |
| SVM classification, 28x28 digit images | dot product | 784         | 784 x 255^2 = 50,979,600 < 2^32: fits        |
| k-means on a 14-attribute census set   | L2 / L1   | 14            | fits if attributes are quantised to 8 bits    |

The block size, image size and attribute count are common values for these
workloads, not part of the design. The units stream their vectors, so
no workload has to be stored in them.

## Choices made here

* Element stream with valid/ready and `in_last`, a result register with a
  one-cycle `out_valid`, and a correction of pending carries at the end of
  each vector.
* Unsigned operands everywhere.
* Accumulator widths of 16 bits (L1-norm) and 32 bits (dot product,
  L2-norm). The 32-bit accumulators use 4 slices of 8 bits.
* One segmentation control bit per slice boundary (`seg_en`). Which mask
  suits which supply voltage is left to the controlling system.
* The correction term is added by the accumulator's own adder. A drawing of
  the scheme shows a separate "add correction term" block; the prose says the
  same adder is reused, and that was followed.
* One cycle to notice the overflow before the two correction cycles, matching
  the worked example.
* Latch polarity, the enable form `clk AND NOT tap`, the number of taps and
  their delay.
* Segmentation and budgeting together in every unit. They were proposed and
  evaluated separately; either can be turned off.
* `abs_diff` subtracts and conditionally negates. `multiplier` is a textbook
  Wallace tree: layers of full and half adders until two rows remain, then one
  carry-propagate adder.

## What the RTL does not capture

The benefit of both techniques shows only under over-scaling, as timing
errors in real gates. Zero-delay RTL simulation cannot show these errors.
Here every adder computes correctly, and a segmented sum differs from the true
sum only by the carries that were dropped on purpose. The error-versus-voltage,
energy and area results of the original evaluation (90 nm transistor-level
simulation) cannot be reproduced from this code. The separate low supply for
the correction logic is not represented either.

## Files and simulation

`rtl/` holds one module or package per file:

* `mf_pkg`: shared types and constants.
* `metafunc_top`: the three units side by side.
* `l1_norm`, `dot_product`, `l2_norm`: the units.
* `mf_shell`: the frame the units share.
* `dsec_accumulator`, `seg_adder`, `slice_adder`, `ec_counters`: the
  segmented accumulator.
* `abs_diff`, `multiplier`: the first stages.
* `budget_latch`, `db_enable_gen`, `clk_delay_line`: delay budgeting.
  `clk_delay_line` is a behavioural model and uses delays.

`tb/` has one self-checking testbench per module, `tb_<module>`. Each prints
`TB_RESULT checks=N failures=M`. `tb_metafunc_top` runs all three units at
their default sizes on workload-sized vectors (256, up to 784, and 14
elements). It checks every result and requires stalls, overflow corrections,
end-of-vector corrections, both accumulator modes and budgeting to occur.
`mf_agent` is its stream driver.

Three more testbenches run the kernels on generated workloads. In each, the
unit's segmentation is on, and every value is checked against a reference
computed in the testbench:

* `tb_workload_me`: block-matching motion estimation. It does a full search
  of ±8 pixels for 16x16 blocks in a 48x48 frame, and the best motion vector
  must be found. It also runs four L1-norm units with 1- to 4-bit carry
  counters side by side and prints the cycles each one spends on
  corrections. On its high-contrast synthetic texture the overhead is about
  36 %, 18 % and 9 % for 2, 3 and 4 bits. Real video, with its smaller
  differences, drops fewer carries.
* `tb_workload_svm`: dot products of 784-element inputs with a set of
  support vectors. The best-matching vector must be found.
* `tb_workload_kmeans`: k-means on 14-attribute records with the L2-norm
  unit. The clusters must recover the hidden grouping.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/mf_pkg.sv tb/tb_metafunc_top.sv --top tb_metafunc_top -o sim
    ./obj_dir/sim

Delays in the clock delay chain model and the testbenches are written for a
1 ns time unit with 1 ps precision, hence `--timescale 1ns/1ps`.

To use Kogge-Stone slices, set `ARCH` to `mf_pkg::ARCH_KS`. To use wider carry
counters (fewer corrections), set `CW`.
