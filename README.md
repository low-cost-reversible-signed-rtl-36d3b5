# Reversible n-bit signed comparator

This circuit compares two n-bit two's-complement numbers `x` and `y`.
It raises exactly one of three flags: `lt` (x < y), `gt` (x > y) or `eq` (x == y).
It is built only from *reversible* gates: every gate has as many outputs as inputs, and it maps its input states one-to-one onto its output states.
No gate throws information away.
The price is paid in two currencies:

- **constant inputs**: gate inputs tied to 0 or 1;
- **garbage outputs**: gate outputs that carry no result but must exist for the gate to stay reversible.

The design aims to keep both low, along with the gate count and the *quantum cost* (QC).
QC is the number of 2x2 quantum primitives needed to realise the gates.

The RTL is ordinary synthesizable SystemVerilog. Each reversible gate is written as its Boolean equations, so it simulates and synthesises like any combinational logic. The reversible structure is kept visible. Every gate is its own module. The constants are tied inside the modules where the architecture puts them. Every garbage output is brought out on a `garbage` port, so the whole map from `(x, y)` to `(lt, gt, eq, garbage)` is one-to-one.

## How the comparison works

The comparison ripples from the most significant bit down to bit 0.
Three one-hot wires travel along the chain (`cmp_result_t`: `lt`, `gt`, `eq`).
They hold the result of comparing all bits seen so far.

1. The **sign-bit stage** compares `x[n-1]` with `y[n-1]`.
   For two's-complement numbers, a sign bit of 0 means the larger number.
   So `x[n-1]=0, y[n-1]=1` gives `gt`.
2. Each of the n-1 **single-bit modules** that follow takes one lower bit pair and the result so far:

   ```
   lt_out = lt_in | (eq_in & ~x &  y)
   gt_out = gt_in | (eq_in &  x & ~y)
   eq_out = ~(lt_out | gt_out)
   ```

   Once a higher bit has decided the result, the lower bits cannot change it.

Reversible gates have no OR.
The module relies on the chain being one-hot: `lt_in` and `eq_in` are never both 1, so `lt_in ^ (eq_in & b)` equals `lt_in | (eq_in & b)`.
A Peres gate computes exactly that XOR form.
The same fact makes the equal flag cheap: `lt_out ^ gt_out ^ 1` equals `~(lt_out | gt_out)`.

## The gates

| gate | module | outputs | QC |
|------|--------|---------|----|
| RC-I (3x3) | `rc1_gate` | p = a, q = a'b ^ c, r = ab' ^ c | 4 |
| RC-II (4x4) | `rc2_gate` | p = a, q = a'b ^ d, r = a ^ b ^ c, s = ab' ^ d | 5 |
| Peres (3x3) | `peres_gate` | p = a, q = a ^ b, r = ab ^ c | 4 |
| TS-3 (3x3) | `ts3_gate` | p = a, q = b, r = a ^ b ^ c | 2 |

RC-I with `c = 0` is a one-bit comparator (`rc1_bit_comparator`):

- `q = x'y` means x < y;
- `r = xy'` means x > y.

RC-II with `c = 1, d = 0` compares two bits in a single gate and also gives the equal flag `r = (x ^ y)'`.

## The sign-bit stage and the `SIGNED` parameter

`sign_bit_comparator` uses one RC-II gate with inputs `(x, y, 1, 0)`.
Its outputs `q = x'y` and `s = xy'` mean different things depending on how the top bits are read:

| `SIGNED` | q = x'y feeds | s = xy' feeds | reading |
|----------|---------------|---------------|---------|
| 1 (default) | `gt` | `lt` | two's complement: the sign bit 1 is the smaller |
| 0 | `lt` | `gt` | unsigned: the top bit 1 is the larger |

Only this wiring choice changes; the gate and the rest of the chain are the same.
The signed reading is the design's purpose and the default.
The unsigned reading is kept because RC-II is also presented as an unsigned bit comparator with an equal output.
The reference logic-simulation waveforms for 1- to 4-bit comparators follow the unsigned reading.
For example, `00` against `10` gives "less" in those waveforms, while as signed numbers 0 > -2.
With `SIGNED = 0`, the RTL reproduces those waveforms.

## One chain stage: `single_bit_rc_module`

Four gates, two constant inputs and four garbage outputs:

```
 x, y, 0 ──► RC-I ──► p: garbage[0] (= x)
                      q: bit_lt = x'y ─┐
                      r: bit_gt = xy' ─┼──────────────┐
 eq_in, bit_lt, lt_in ──► Peres ─► p: eq_in ──────────┼─► Peres(eq_in, bit_gt, gt_in)
                                   q: garbage[1]      │     p: garbage[2], q: garbage[3]
                                   r: lt_out ─┐       │     r: gt_out ─┐
                                              ▼                        ▼
                              TS-3(lt_out, gt_out, 1) ─► p = lt, q = gt, r = eq
```

The gate types, the constants and the TS-3 output order are from the original architecture.
The exact routing between the gates is derived here from the gate equations.
In particular, the second Peres gate takes `eq_in` from the first gate's `p` output; that choice is this design's.
It gives four garbage outputs per stage, which matches the published garbage count.

## The top: `rev_signed_comparator`

```systemverilog
rev_signed_comparator #(.N(64), .SIGNED(1'b1)) u_cmp (
  .x(x), .y(y),                 // N bits each
  .lt(lt), .gt(gt), .eq(eq),    // exactly one is 1
  .garbage(garbage)             // 4*N-3 bits, may be left unconnected
);
```

- `N` (default 64): any N >= 1. With N = 1 only the sign-bit stage is left.
- Stage k (k = 1 … N-1) handles bit `N-1-k`.
- Garbage layout:
  - `garbage[0]` is the sign stage's `p` output (= `x[N-1]`);
  - stage k owns `garbage[4k-3 +: 4]` = {Peres-gt q, Peres-gt p, Peres-lt q, RC-I p}, from MSB to LSB of the slice.
- Timing: purely combinational, with no clock or registers. The critical path runs through every stage. In each stage the running flags pass through one Peres gate (an AND and an XOR), and the equal flag then passes through the TS-3 XOR.
- An assertion (`assert final`) checks that the result is one-hot.

### Cost

With one sign stage (1 gate, QC 5, 2 constants, 1 garbage) and n-1 modules (4 gates, QC 14, 2 constants, 4 garbage each):

| n | gates | garbage | constant inputs | quantum cost |
|---|-------|---------|-----------------|--------------|
| n | 4n-3 | 4n-3 | 2n | 14n-9 |
| 2 | 5 | 5 | 4 | 19 |
| 8 | 29 | 29 | 16 | 103 |
| 64 | 253 | 253 | 128 | 887 |

`rev_cmp_pkg` holds the per-gate costs and functions that compute these numbers for any n (`cmp_gate_count`, `cmp_garbage_count`, `cmp_constant_inputs`, `cmp_quantum_cost`).
They are constants for documentation and testing; they generate no hardware.
In CMOS, the 64-bit top synthesises to about 760 simple cells (AND, XOR, NOT).
That figure says nothing about reversible or quantum cost.

## Files

| file | contents |
|------|----------|
| `rtl/rev_cmp_pkg.sv` | `cmp_result_t` and the cost constants and functions |
| `rtl/rc1_gate.sv`, `rtl/rc2_gate.sv`, `rtl/peres_gate.sv`, `rtl/ts3_gate.sv` | the four reversible gates |
| `rtl/rc1_bit_comparator.sv` | one-bit RC-I comparator |
| `rtl/sign_bit_comparator.sv` | RC-II sign-bit stage |
| `rtl/single_bit_rc_module.sv` | one chain stage |
| `rtl/rev_signed_comparator.sv` | top, N-bit chain |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/cmp_sweep.sv` | helper that checks one comparator width (exhaustive or random) |
| `tb/tb_rev_signed_comparator_full.sv` | the top at its default parameters |

## Verification

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

- **Gate testbenches**: apply all input states and compare against the gate equations. They also check that no two input states give the same output state, which confirms each gate is reversible.
- **`tb_single_bit_rc_module`**: covers the stage for all bit pairs and all three incoming results, including its garbage bits.
- **`tb_rev_signed_comparator`**:
  - compares all operand pairs for N = 1…5 and N = 8, in both modes (417k checks);
  - checks every garbage bit against a model and confirms the mapping is one-to-one;
  - runs random pairs at N = 16;
  - replays points from the reference 1- to 4-bit waveforms;
  - checks the cost functions against the table above;
  - counts results decided at the sign bit, decided at a lower bit, all-equal, and mode-dependent, and fails if any count is zero.
- **`tb_rev_signed_comparator_full`**: runs the 64-bit default with corner cases (most negative against most positive, -1 against 0, pairs that differ only in the LSB) and 20,000 random pairs. Half of the random pairs share a random-length prefix, so that decisions fall at every stage up to the last.

To run one testbench with Verilator:

```sh
verilator --binary --timing --assert -Wall \
  rtl/rev_cmp_pkg.sv rtl/rc1_gate.sv rtl/rc2_gate.sv rtl/peres_gate.sv rtl/ts3_gate.sv \
  rtl/rc1_bit_comparator.sv rtl/sign_bit_comparator.sv rtl/single_bit_rc_module.sv \
  rtl/rev_signed_comparator.sv tb/cmp_sweep.sv tb/tb_rev_signed_comparator.sv \
  --top-module tb_rev_signed_comparator -Mdir obj
./obj/Vtb_rev_signed_comparator
```

Each testbench runs in well under a second.

## Where this design departs from or adds to the original architecture

- **Gate routing inside a stage**: derived from the gate equations, as described above. The function and the gate, constant and garbage counts match the original.
- **The `SIGNED` parameter**: an addition that keeps the unsigned use of RC-II available. The default is the signed comparator.
- **The 64-bit drawing**: one published drawing of the 64-bit chain shows a second RC-II part-way down. The RTL follows the stated structure and gate count instead: one sign stage and 63 identical modules, 253 gates.
- **Garbage port**: bringing the garbage outputs out, and their bit order, is this design's choice. Leave the port open if it is not needed; synthesis removes the logic that only drives it.
- **Not included**: the quantum-level realisations of the gates (controlled-V / CNOT networks). This RTL models the gates' logic function only. Quantum cost appears only as a number in `rev_cmp_pkg`.
