# Window-method elliptic-curve scalar multiplication with pattern-count error detection

This design computes Q = kP on an elliptic curve with the fixed-window method. It also checks
that the computation used the scalar it was given. Before the main loop starts, it counts how
often each W-bit value occurs among the windows of k. During the loop, it counts again, from the
window values the loop actually acts on. At the end the two sets of counts are compared. If they
differ, something went wrong in the loop's control flow and `error` is raised. For example, a
window value was read wrongly, a window was skipped or repeated, or the loop count was corrupted.

The check is cheap: 2^W small counters on each side and one comparison. It runs alongside the
multiplication and adds no cycles to the loop. The price is coverage. Faults *inside* the point
addition or doubling arithmetic do not change the window counts, so the check does not see them.
Those units need their own protection, such as arithmetic checks or a test that the result lies
on the curve. This RTL does not include any.

The scheme comes from the article "Efficient Error Detection Schemes for ECSM Window Method
Benchmarked on FPGAs". That article specifies the algorithm, the pattern counters and the
comparison. It leaves the curve, the coordinates and the field arithmetic open. Those parts, and
everything about the hardware schedule, are choices made for this RTL. They are marked as such
below.

## The scalar multiplication

Default configuration: NIST P-256 (y² = x³ − 3x + b over a 256-bit prime field), window length
W = 3.

1. **Table.** The table is filled with P, 2P, …, 2^W·P by adding P repeatedly. That is 2^W − 1
   point additions and 2^W entries. The last entry is never read, because a window value is at
   most 2^W − 1.
2. **Main loop.** The scalar is processed at its full 256-bit width, leading zeros included,
   from the most significant bit down. It is split into ⌈256/W⌉ = 86 windows. The last window
   holds the 256 mod 3 = 1 remaining low bit. For each window, the running result, which starts
   at the point at infinity, is doubled once per bit of the window. Then, if the window value v
   is not zero, table entry v − 1 (that is, vP) is added.
3. **Check.** The two sets of counts are compared, and `done` pulses with the result and the
   `error` flag.

Because the scalar always has full width, every multiplication does the same 256 doublings in the
same order. The only data-dependent cost is one addition per non-zero window. The design
therefore leaks, through timing, how many windows are zero. The point formulas are complete, so
no input causes a special case in the sequence.

### Cycle budget (N = 256, W = 3)

| step | cycles |
|---|---|
| point addition | 3,642 (+1 issue cycle) |
| point doubling | 3,376 (+1 issue cycle) |
| table fill, 7 additions | 25,501 |
| 256 doublings | 864,512 |
| per window control | 2 × 86 |
| per non-zero window | + 3,643 |
| last point operation to `done`, check included | 4 |

A multiplication with no non-zero window (k = 0) takes 890,188 cycles. A random 256-bit scalar
has about 75 non-zero windows and takes about 1.16 million cycles. The testbench checks this
formula exactly on every run.

These figures come from a deliberately small datapath: two bit-serial multipliers, used one at a
time. The published FPGA results were produced with a high-level-synthesis flow using about 60
DSP blocks. They report about 39,700 cycles per multiplication. This RTL makes no attempt to
match that figure. The error detection is independent of how fast the point arithmetic is.

## The coherency check

`pattern_counter` produces the "pre" counts. It loads k into a shift register and decodes one
window per clock, for 86 cycles in all. It therefore finishes long before the table is filled.
Every window increments the counter of its value. Zero windows are counted too, so the counts
always add up to 86. The last, short window is counted by its numeric value (0 or 1 for W = 3).

`coherency_check` produces the "post" counts. The controller increments one counter per window,
with the value it has just extracted and will use for the doublings and the table lookup. After
the last window, a `check` strobe compares all 2^W pairs and registers the result.

Any single corruption of a window value moves one count from one bin to another. It is therefore
always detected. A dropped or repeated window changes the total, so it is always detected too.
Two faults that exactly cancel, for instance swapping the values of two windows, are not
detected. Faults in the point arithmetic, or in the table contents, are invisible to the check.
Under the article's fault model, every executed line is equally likely to be hit, and only the
doubling and addition lines escape. A single fault then goes undetected with probability
(L + L/W) / (5L + 2L/W), where L is the scalar length. That is 4/17, about 0.24, for W = 3. The
probability falls as the m-th power for m independent faults.

### Fault injection

The top has three inputs for testing the check: `fi_en`, `fi_win` and `fi_mask`. They are
sampled at `start`. When `fi_en` is set, the value of window `fi_win` (0 is the most
significant) is XORed with `fi_mask` as it is extracted. The faulty value then drives the
doublings, the table lookup and the post count, so the result is wrong and `error` must rise.
In normal use, tie `fi_en` low. This port is not part of the published scheme.

## Point arithmetic

Points are held in homogeneous projective coordinates (X : Y : Z), with x = X/Z and y = Y/Z. The
point at infinity is (0 : 1 : 0). The result is returned in this form. No inversion is done in
hardware. To obtain affine coordinates, the user computes Z⁻¹ and multiplies.

`ec_point_add` and `ec_point_double` run the complete formulas for a = −3 curves published by
Renes, Costello and Batina (2016). Addition costs 14 field multiplications (two of them by b) and
29 additions or subtractions. Doubling costs 13 multiplications and 21 additions or subtractions.
The addition formula is correct for all inputs, including P + P, P + (−P) and the point at
infinity. So the window loop needs no special cases: for example, it can double the point at
infinity, or add vP to a running result that happens to equal vP.

Each unit is a small microcoded engine, as follows:

- a 15-entry register file holds the two operands, five temporaries, the result and b;
- a case-statement ROM lists the steps, each one field operation `d = a op b`;
- additions and subtractions modulo p take one cycle;
- multiplications go to `fp_mul`, an interleaved (Blakley) bit-serial modular multiplier. It
  handles one multiplier bit per clock, taking N cycles plus two cycles of handshake.

`fp_mul` needs both operands below p. Every register of the engines keeps that invariant. The
inputs `px` and `py` must also be below p.

## Interface of the top, `ecsm_window_ed`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset |
| `start` | in | 1 | one-cycle pulse while idle; samples `k`, `px`, `py` and the fault inputs |
| `k` | in | 256 | scalar |
| `px`, `py` | in | 256 | base point, affine, on the curve |
| `fi_en`, `fi_win`, `fi_mask` | in | 1, 7, W | fault injection, see above |
| `busy` | out | 1 | high from `start` until `done` |
| `done` | out | 1 | one-cycle pulse: `q` and `error` are valid and held until the next start |
| `q` | out | 768 | kP as `point_t` {X, Y, Z}, with X in the top 256 bits |
| `error` | out | 1 | the pattern counts differ: discard `q` |

Parameters: `W` (window length, default 3), `P_MOD` and `B_COEF` (field prime and curve
coefficient, default P-256). The field width N = 256 is fixed in `ecc_pkg`. Any a = −3 curve over
a prime below 2^256 can be used by overriding `P_MOD` and `B_COEF`. Changing `W` changes the
table size (2^W points of 768 bits) and the number of windows. The controller and counters adapt.

## Files

| file | content |
|---|---|
| `rtl/ecc_pkg.sv` | field and point types, P-256 constants, micro-instruction format, mod-p add/sub |
| `rtl/fp_mul.sv` | bit-serial modular multiplier |
| `rtl/ec_point_add.sv` | complete projective point addition engine |
| `rtl/ec_point_double.sv` | projective point doubling engine |
| `rtl/precomp_table.sv` | 2^W-entry point table: one write port, asynchronous read |
| `rtl/pattern_counter.sv` | pre-multiplication window pattern counts |
| `rtl/coherency_check.sv` | post counts and comparison |
| `rtl/ecsm_window_ed.sv` | top: controller and wiring |
| `tb/ec_ref_pkg.sv` | affine reference model for the testbenches (textbook formulas, Fermat inversion) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ecsm_window_sizes.sv` for other window lengths |
| `tb/ecsm_size_runner.sv` | driver used by `tb_ecsm_window_sizes`: one top instance and its checks for one window length |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself. Each has a watchdog.
For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ecc_pkg.sv tb/ec_ref_pkg.sv \
    tb/tb_ecsm_window_ed.sv --top-module tb_ecsm_window_ed -y rtl -y tb +libext+.sv
./obj_dir/Vtb_ecsm_window_ed
```

The testbenches check the following:

- `tb_ecsm_window_ed` runs the full-size design at its default parameters, 10 multiplications in
  about 10 s. The scalars are 0, 1, 2, n − 1, n (the group order), random scalars on G and on
  another point, two runs with an injected fault, and a clean run after a fault. It checks:
  - every result against the reference model;
  - that `error` stays low on clean runs and rises on faulty ones;
  - the exact cycle count;
  - that the last operation is at most 6 cycles before `done`;
  - that a `start` pulse in the middle of a run is ignored;
  - that table writes, doublings, additions, skipped additions, the short last window and a
    detected fault each occurred at least once.
- `tb_ecsm_window_sizes` runs the top with W = 2, 5, 7 and 10.
- `tb_ec_point_add` and `tb_ec_point_double` compare against the reference on random multiples
  of G with random projective scalings. They include the exceptional inputs, and check the
  latency.
- `tb_pattern_counter`, `tb_coherency_check` and `tb_precomp_table` compare against counts and
  contents that the testbench keeps itself.

The reference model is checked against the published value of 2G for P-256.

## Limits and departures from the published scheme

- **Curve and field size.** P-256 is this design's choice. The scheme is stated for short
  Weierstrass curves without naming one.
- **Last window.** The article's pattern-counting routine loops over ⌊L/W⌋ whole windows. Its
  main loop also processes a final short window and counts it. Here both sides count the short
  window, so a fault-free run always matches.
- **Precomputation.** The algorithm's precomputation loop makes one more addition than the
  table needs. Its result is never stored, so that addition is not performed here.
- **Error signalling.** The algorithm returns "error detected" instead of the point. Here the
  point is still output, with `error` beside it.
- **Output.** The result is projective; there is no final inversion.
- **Speed.** The datapath is serial and slow (see the cycle budget). Replacing `fp_mul` with a
  faster multiplier keeps the same start/done interface and needs no other change. The testbench
  cycle formulas would then need updating.
- **No arithmetic-fault coverage.** As noted above, the check does not cover the point units.
