# Folded adaptive lattice LMS filter for ECG power-line interference

An ECG picked up by skin electrodes carries mains hum at 50 or 60 Hz. This
design removes it by adaptive noise cancellation. The filter gets two inputs:

- `d(p)`: the primary input, which is the ECG plus the hum;
- `x(p)`: a reference that is correlated with the hum but not with the ECG.

An adaptive filter shapes `x` into an estimate `y(p)` of the hum in `d`.
The output is the error `e(p) = d(p) - y(p)`, which is the cleaned ECG. The
same error drives the LMS weight update. The filter has the structure of a
lattice joint process estimator: a lattice predictor decorrelates the
reference before an LMS linear combiner uses it.

The main idea is **folding**. An unfolded lattice filter of order `TAPS`
needs `TAPS` lattice stages, each with two multipliers and two adders, plus
`TAPS` LMS taps. This design builds only `TAPS/K` stage-plus-tap lanes and
runs each lane `K` times per sample, one pass per clock cycle. That divides
the arithmetic hardware by about `K`, and the sample period becomes `K`
cycles. The default is 8 taps folded by K = 2. K = 4, and 16 or 32 taps,
are one parameter change away.

## The arithmetic being folded

The reference enters the lattice as `f_0(p) = b_0(p) = x(p)`. Stage `m`,
with reflection coefficient `k_m`, computes

    f_m(p) = f_{m-1}(p)   - k_m * b_{m-1}(p-1)        (forward error)
    b_m(p) = b_{m-1}(p-1) - k_m * f_{m-1}(p)          (backward error)

The backward errors `b_0 .. b_{TAPS-1}` feed the LMS combiner:

    y(p)     = sum_j w_j(p) * b_j(p)
    e(p)     = d(p) - y(p)
    w_j(p+1) = w_j(p) + 2*mu * e(p) * b_j(p)

Stage `m` needs `b_{m-1}(p-1)`, its input from the previous sample. The
design keeps one such delayed backward error per stage.

**When the weights are updated.** `e(p)` is known only after every tap of
sample `p` has been summed. So the update is done during the next sample:
while lane `l` works on tap `j` of sample `p+1`, it first forms
`w_j(p+1) = w_j(p) + 2mu e(p) b_j(p)` from the stored `e(p)` and the stored
`b_j(p)`. It then multiplies that new weight by `b_j(p+1)` and writes it
back. The result is exactly the sample-by-sample LMS filter, not a
delayed-LMS approximation. The testbenches check this bit for bit against
an unfolded model.

## How the folding maps stages onto lanes

Let `LANES = TAPS/K`. In pass `c` (`c = 0 .. K-1`), lane `l` does three
things:

- it computes lattice stage `m = c*LANES + l + 1`;
- it computes the tap on that stage's input, `b_{m-1}`;
- it updates that tap's weight.

Within a pass the lanes are chained by combinational logic, so lane `l+1`
takes lane `l`'s `f` and `b` in the same cycle. At the end of the pass, the
`f` and `b` leaving the last lane are stored in two registers, `ra_f` and
`ra_b`. In the next pass they enter lane 0 in place of `x`. These two
registers are the only values that cross from one time slot to the next.
This matches a lifetime analysis of the folded data-flow graph, which finds
at most two live variables.

For the default 8 taps and K = 2 (4 lanes):

| cycle     | lane 0       | lane 1       | lane 2       | lane 3       | carried out             |
|-----------|--------------|--------------|--------------|--------------|-------------------------|
| pass 0    | stage 1, w_0 | stage 2, w_1 | stage 3, w_2 | stage 4, w_3 | f_4, b_4 -> ra_f, ra_b  |
| pass 1    | stage 5, w_4 | stage 6, w_5 | stage 7, w_6 | stage 8, w_7 | (stage 8 output unused) |

The state of each stage sits in a `fold_bank`: the reflection coefficient,
the delayed backward error and the weight. The bank is grouped by time
slot, so in pass `c` it shows the `LANES` entries for stages
`c*LANES+1 .. c*LANES+LANES`, and at the clock edge it writes the updated
values back. Each pass adds its tap products to an accumulator. After the
last pass, `y` and `e` are formed and registered.

The last stage of the lattice (stage `TAPS`) is computed, but no tap uses
its outputs. This keeps every lane identical. It matches the unfolded graph
this folding comes from, where the last stage's adders have no consumers.

## Interface and timing

`folded_lattice_lms` (top), with parameters `TAPS = 8`, `K = 2`, `DW = 16`,
`FB = 15`, `WW = 24`, `WFB = 22` and `MU_SHIFT = 5`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears all state) |
| `in_valid`, `in_ready` | in/out | 1 | the sample pair is taken in the cycle both are high |
| `x_in` | in | DW | reference `x(p)`, Q1.15 |
| `d_in` | in | DW | primary input `d(p)` (ECG plus hum), Q1.15 |
| `k_we`, `k_addr`, `k_data` | in | 1, clog2(TAPS), DW | write `k_{addr+1}` (Q1.15); ignored while a sample is in progress |
| `out_valid` | out | 1 | one-cycle pulse: `y_out` and `e_out` hold the new result |
| `y_out` | out | DW | hum estimate `y(p)` |
| `e_out` | out | DW | cleaned ECG `e(p)` |

- **Latency and rate.** A sample taken in cycle A is processed in passes
  0..K-1 during cycles A+1..A+K. `out_valid` is high in cycle A+K+1.
  `in_ready` is high when the filter is idle and also during the last pass,
  so with `in_valid` held high the filter takes one sample every K cycles.
  `y_out` and `e_out` hold their value until the next result.
- **Reset.** After reset all weights, delayed errors and reflection
  coefficients are zero. With every `k` at zero the lattice is a plain
  delay line, so the filter is an ordinary transversal LMS canceller. Load
  the reflection coefficients before streaming samples.

## Number formats

| quantity | format | notes |
|----------|--------|-------|
| samples, `f`, `b`, `y`, `e`, `k` | signed Q1.15 (`DW=16`, `FB=15`) | every result saturates; products are truncated toward minus infinity |
| weights `w` | signed Q2.22 (`WW=24`, `WFB=22`) | saturate at about ±2 |
| step `2*mu` | `2^-MU_SHIFT` = 1/32 | so the multiply by the step is a shift |
| accumulator | full precision | `y` is the sum shifted right by `WFB`, then saturated |

## Files

| file | role |
|------|------|
| `rtl/lattice_pkg.sv` | default widths, tap count, folding factor, step size |
| `rtl/lattice_stage.sv` | one lattice stage (two multipliers, two subtractors), combinational |
| `rtl/lms_tap.sv` | weight update and tap product, combinational |
| `rtl/fold_ctrl.sv` | sample handshake and pass counter (time slot 0..K-1) |
| `rtl/fold_bank.sv` | per-stage register bank addressed by time slot, plus a single-entry write port |
| `rtl/folded_lattice_lms.sv` | top: lanes, banks, pass registers, accumulator, output stage |
| `tb/lattice_ref_pkg.sv` | unfolded bit-exact reference model; synthetic ECG and hum generators |
| `tb/tb_*.sv`, `tb/lms_bench.sv` | self-checking testbenches |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog if it hangs.

- `tb_lattice_stage` and `tb_lms_tap` test the two cells. They use corner
  values (full scale, `k = -1`, saturation, truncation of negative
  products) and 20 000 random vectors, and compare against integer
  arithmetic.
- `tb_fold_ctrl` runs random traffic through controllers with K = 1, 2, 3
  and 4. It checks slot, ready and valid every cycle against a timing model,
  and checks the rate of one sample per K cycles.
- `tb_fold_bank` compares the bank against an array model.
- `tb_folded_lattice_lms` runs the top at its default size (8 taps, K = 2)
  end to end. The input is 3000 samples of synthetic ECG at 360 samples/s
  with 50 Hz hum, and the reference is a 50 Hz sine. It checks three
  things:
  - every `y` and `e` matches the unfolded reference model exactly;
  - every result arrives K+1 cycles after its sample;
  - the hum left in `e` over the second half of the run is at least 20 dB
    below the hum in `d`. It measures about 48 dB.

  It also counts each mechanism and fails if one never happens:
  back-to-back samples, input stalls, idle gaps, carries through
  `ra_f`/`ra_b`, coefficient writes (accepted, and ignored while busy), and
  weight changes.
- `tb_workloads` runs the same check (through `lms_bench`) for 8 taps with
  K = 4, and for 16 and 32 taps with K = 2 and K = 4. The hum is reduced by
  about 47, 41 and 31 dB. With the same step size, longer filters converge
  more slowly.

To run one with plain Verilator from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_folded_lattice_lms \
      -y rtl -y tb +libext+.sv rtl/lattice_pkg.sv tb/lattice_ref_pkg.sv \
      tb/tb_folded_lattice_lms.sv
    ./obj_dir/Vtb_folded_lattice_lms

## What is taken from the underlying design, and what is not

These parts follow the folded adaptive lattice LMS filter this RTL
implements:

- the lattice order-update equations;
- the LMS equations;
- the joint process estimator arrangement;
- folding by K with one operation per lane per time slot, and the two
  registers between slots;
- the sizes: 8 taps (also 16 and 32) and K = 2 or 4.

The following are choices made here:

- **Word lengths, rounding and saturation.** No widths were specified.
- **Step size** `2mu = 1/32`.
- **Fixed reflection coefficients.** The equations write `k_m(p)` but give
  no rule for adapting it. The coefficients are therefore loaded through a
  port and held, and only the tap weights adapt. The design works with any
  coefficients of magnitude below 1, because the lattice is an invertible
  transform of the delay line. Good coefficients speed up convergence.
- **Folding granularity.** The folding is done at the level of whole stages:
  the lanes of one pass form a combinational chain. The original folded
  graph also pipelines each multiplier by two cycles and each adder by one
  cycle, and retimes the graph with a cutset. That pipelining is not
  reproduced. As a result the critical path grows with `LANES`: one
  multiply-subtract per lane, plus the tap multiply and the accumulation.
  To reach a higher clock, register the chain between lanes and stretch the
  schedule.
- **Handshake and coefficient port.** The valid/ready handshake and the
  coefficient write port are this design's own.
- **Resource figures.** This implementation does not reproduce the reported
  results, which include as few as 33 registers for an 8-tap, K = 2 filter.
  Any LMS filter must hold one weight per tap, plus one delayed backward
  error and one coefficient per stage. At the default size that is 8 × (24
  + 16 + 16) bits of state. Coarse synthesis of the default top gives about
  590 flip-flop bits. The arithmetic scales with `TAPS/K`: `2*TAPS/K`
  lattice multipliers, `2*TAPS/K` tap multipliers and their adders.
- **Test signal.** The testbenches use a synthetic ECG made of Gaussian
  P, QRS and T waves at 72 beats per minute, not a recorded database ECG.

## Changing it

- `TAPS` and `K` set the order and the folding factor. `TAPS` must be a
  multiple of `K`. `K = 1` gives the unfolded filter, with every stage in
  one cycle.
- `MU_SHIFT` trades convergence speed against misadjustment.
- `DW`/`FB` and `WW`/`WFB` set the formats. The reference model in
  `tb/lattice_ref_pkg.sv` assumes the default formats.
