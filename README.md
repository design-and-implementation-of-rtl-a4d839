# Reconfigurable fixed-width multipliers

An n x n fixed-width multiplier returns only the upper n bits of the 2n-bit
product. It builds only the partial-product columns that reach those bits, plus
one guard column. A compensation term replaces the discarded lower columns.
This saves about half of the array, at an error of about one LSB.

This RTL goes one step further. The same fixed-width array can be rewired at
run time into four configuration modes (CM), trading precision for power:

| mode | op | result on the n-bit output |
|------|----|-----------------------------|
| CM1  | 00 | `X*Y / 2^n`: the n x n fixed-width product |
| CM2  | 01 | two n/2-bit fixed-width products side by side (parallel sub-word multiply) |
| CM3  | 10 | `X1*Y1`: the exact product of the two upper halves |
| CM4  | 11 | Booth: `X1*Y0 + X0*Y1` (multiply-add); Baugh-Wooley: `{X3*Y3, X2*Y2}`, two exact n/4 x n/4 products |

Here `X1`/`X0` are the upper and lower halves of X, and `X3`/`X2` are the upper
and lower quarters of `X1`. The same notation holds for Y. All operands and
results are two's complement.

The repository holds two multipliers built on this idea, an application, and a
top level:

* `booth_rfw_mult` is a combinational radix-4 Booth version. Its default is
  n = 8, and it is also tested at n = 16.
* `bw_rfw_pipe` is a three-stage pipelined Baugh-Wooley version with operand
  gating. It skips sub-multipliers whose result is known or not needed. Its
  default is n = 16, and it is also tested at n = 8, 24 and 32.
* `rfw_fir` is a 35-tap, 8-bit FIR filter with one Booth multiplier per tap.
  The filter's mode sets its precision.
* `rfw_top` places the three side by side.

## The compensation term

Call the most significant dropped column (column n-1) the main column.
Call the column below it (column n-2) the theta column. Let:

* `Emain` be the number of ones in column n-1;
* `theta` be the number of ones in column n-2;
* `K = 1` when `theta == 0`, otherwise `K = 0`.

The carry that the dropped columns would have sent into column n is
estimated as `floor((Emain + theta + K) / 2)`.

In hardware this costs almost nothing:

* Column n-1 is built as a real column.
* The theta bits are added into column n-1, each with weight 2^(n-1).
* `K` is one more bit in column n-1.
* The sum's carry into column n is the compensation.
* Column n-1 itself is then dropped.

The array is split into halves (Booth: by rows; Baugh-Wooley: by quadrants).
Each half reports `Km = 1` when its share of the theta column is all zero.
`rfw_scc` then places K:

* CM1 adds K once: `SCC1 = Km1 & Km2`, `SCC2 = 0`.
* CM2/CM4 add K once per sub-product: `SCC1 = Km1`, `SCC2 = Km2`.
* CM3 adds nothing.

Measured error in CM1:

* n = 8 Booth, over all 65,536 operand pairs: at most 1 LSB from the true `X*Y/2^n`.
* The Baugh-Wooley array follows the same rule.

## Booth multiplier (`booth_rfw_mult`)

Each radix-4 Booth row `i` contributes `d_i * X * 4^i`, with digit
`d_i ∈ {-2..2}`. `booth_enc` produces the digit as `neg`, `x1` and `x2`
signals. Rows use the sign-generate form:

* the row's sign bit is complemented;
* a constant one sits one column above it;
* a single `+2^n` covers all rows.

This leaves no sign extension.

The rows fed by `Y0` form **MUL1** (`booth_mul1`). The rows fed by `Y1` form
**MUL2** (`booth_mul2`). `booth_dec` turns `op` into `CS[3:0]`:

| mode | CS   |
|------|------|
| CM1  | 0001 |
| CM2  | 0010 |
| CM3  | 0100 |
| CM4  | 1010 |

Each mode changes a few bits of the rows:

* **CM1.** The rows are the plain n x n array. MUL2's lowest encoder sees
  `y[n/2-1]`.
* **CM2/CM4.** MUL1 is already `X1*Y0`, because all its bits at column n-1 or
  higher depend on X1 only. MUL2 becomes an n/2 x n/2 `X0*Y1` in the lower half
  of its columns:
  * bit n/2 of each row is fed `x[n/2-1]` and inverted, because it is the
    sub-word sign;
  * bit n/2+1 is forced to one;
  * higher bits have their recoding bits ANDed off, so the upper half sums to
    zero;
  * `CP0` (column n) and `CP1` (column 3n/2) supply the sub-word constants.
* **CM3.** MUL1's encoders see zero, so MUL1 gives zero. MUL2's rows turn into
  an exact `X1*Y1` array:
  * bit n/2 uses `{x[n/2], 0}`;
  * the bits below bit n/2 are zero, except one per row that carries the
    previous row's `neg`;
  * `CP2` adds the last row's `neg`.

The last-stage adder adds MUL1 and MUL2 from column n-1 upward. In CM1 the
column n-1 sums of both halves must meet in one adder. If each half only
passed on its own carry out of column n-1, the joint carry would be lost and
the result would be off by one LSB.

How the adder inputs and output differ by mode:

* MUL1's carry into column 3n/2 (`Co_m1`) is used only in CM1.
* In CM2 the adder sees only MUL1. The upper output half comes straight from
  MUL2's lower half, so the output is `{X0*Y1, X1*Y0}`.
* In CM4 both n/2-bit products are sign-extended before the add. The
  (n/2+1)-bit sum is sign-extended to n bits.

## Pipelined Baugh-Wooley multiplier (`bw_rfw_pipe`)

The Baugh-Wooley array has these bits:

* `x_i*y_j` bits, complemented where exactly one index is n-1;
* constants `2^n` and `2^(2n-1)`.

It is cut into three modules:

| module | quadrant | role |
|--------|----------|------|
| MUL1 (`bw_mul1`) | `X1*Y0` | also holds `x[n/2-1]y[n/2-1]`, the only `X0*Y0` bit in the theta column |
| MUL2 (`bw_mul2`) | `X0*Y1` | |
| MUL3 (`bw_mul3`) | `X1*Y1` | |

`bw_dec` makes a one-hot `t[3:0]`:

| mode | t    |
|------|------|
| CM1  | 1000 |
| CM2  | 0100 |
| CM3  | 0010 |
| CM4  | 0001 |

* **CM2.** MUL1 and MUL2 re-complement their sub-word sign rows and add the
  sub-word constants `CP0`, `CP1` and `CP2`.
* **CM3.** MUL3 adds `CP3` at column 3n/2 and is then an exact `X1*Y1`.
* **CM4.** MUL3 splits into two n/4 x n/4 blocks:
  * the bits between the two blocks are forced to zero, except two that are
    forced to one as the lower product's constants;
  * `CP4` adds the upper product's constant;
  * the carry from column 3n/2-1 into 3n/2 is cut, so `X2*Y2` cannot
    disturb `X3*Y3`.

### Pipeline and latency

| stage | what happens |
|-------|--------------|
| 1 | decode `op`; detect zero operand halves; decide which MUL works; load that MUL's own operand register |
| 2 | MUL1/MUL2/MUL3, SCC, substitution multiplexers, output mux. In CM1, load the ADD1 input registers (frozen in other modes); always load the mux register |
| 3 | ADD1 = MUL1 + MUL2 (column n-1 dropped after the add); ADD2 = ADD1 + (mux AND t3) |

* The output register holds `p`.
* `out_valid` follows `in_valid` by exactly 3 cycles.
* One operation can start every cycle.
* The mode may change on any cycle.

### Power saving

The power saving comes from registers that do not load:

* **Unused MULs are frozen.** A MUL's operand register loads only when its
  result is needed:
  * MUL1 and MUL2: in CM1 and CM2;
  * MUL3: in CM1, CM3 and CM4;
  * ADD1's registers: only in CM1.
* **Zero bypass (CM1).** If an operand half a MUL uses is zero, the MUL is
  not loaded. Its exactly known output is substituted:

  | MUL  | zero operand half | substitute |
  |------|-------------------|------------|
  | MUL3 | X1 or Y1 | ones in columns 3n/2..2n-1 (`111100000` for n = 8) |
  | MUL2 | X0 or Y1 | `2^(n/2) - 1` (`001111`) |
  | MUL1 | X1 or Y0 | `2^(n/2) + 1 + (x[n/2-1]y[n/2-1] \| Km2)` (`010001` / `010010`) |

* **CU.** A frozen MUL2 would report a stale `Km2`. While MUL2 is frozen, the
  CU forces `Km2 = 1` into MUL1's SCC. This is MUL2's true value, since its
  operand is zero.
* **L.** While MUL1 is frozen, its SCC1 input is held at the last value. This
  keeps the frozen MUL1 from switching. L is built as a hold register plus a
  bypass mux, so the design contains no latch.

The clock gating is written as register enables. A clock-gating cell per
enable group gives the same function.

## FIR filter (`rfw_fir`)

The filter computes `y(m) = sum_i h(i) * s(m-i)` over 35 taps. It is direct
form: a delay line, one `booth_rfw_mult` per tap and a combinational adder tree.

Interface:

* Coefficients are written one per cycle through `coef_we`, `coef_addr` and
  `coef_data`.
* A sample is taken on `in_valid`.
* The output that includes the sample is registered on the same edge, so
  `out_valid` comes one cycle later.

What each mode computes:

| mode | operands | each tap adds | multipliers used |
|------|----------|---------------|------------------|
| CM1 | 8-bit | `s*h / 2^8` | 35 |
| CM3 | upper nibbles of sample and coefficient | exact product | 35 |
| CM2/CM4 | upper nibbles; taps 2m and 2m+1 share multiplier m as `X = {s(2m), s(2m+1)}`, `Y = {h(2m+1), h(2m)}` | `X1*Y0` and `X0*Y1`, i.e. the two tap products (scaled by 2^-4) | 18; the other 17 get zero operands |

In CM2 the filter adds the two halves. In CM4 the multiplier has already added
them.

The output is `N + clog2(TAPS) + 1 = 15` bits wide and cannot overflow.

`tb_rfw_fir` ran a generated 1,000-sample voiced, speech-like signal through a
35-tap low-pass filter. It measured the SNR of each mode against the exact
8 x 8 product sum, after rescaling:

| mode | SNR |
|------|-----|
| CM1 | 22.5 dB |
| CM2 | 7.6 dB |
| CM4 | 7.6 dB |
| CM3 | 5.1 dB |

* The CM1 to CM2/CM4 loss is about 15 dB.
* CM3 is low because its truncated 4-bit operands carry a DC bias that the
  compensated modes partly cancel.
* These figures depend on the signal. They are not a reproduction of a
  recorded-speech benchmark.

## Top level (`rfw_top`)

Three independent channels share `clk` and a synchronous active-low `rst_n`:

| channel | ports | contents | latency |
|---------|-------|----------|---------|
| Booth | `b_*` | `booth_rfw_mult`, `BN = 8`, with an operand register and a result register | 2 cycles; the operand register loads only on `b_in_valid` |
| Baugh-Wooley | `w_*` | `bw_rfw_pipe`, `WN = 16` | 3 cycles |
| FIR | `f_*` | `rfw_fir`, `TAPS = 35`, `FN = 8` | 1 cycle after each sample |

Modes use the `cm_e` enum of `rfw_pkg`: `CM1 = 00`, `CM2 = 01`, `CM3 = 10`,
`CM4 = 11`.

## Choices made in this design

These points are this design's reading or its own choice. The structure
described above follows the published design.

* **Booth array.** The mode codes are two bits.
  * The split is by Booth row (MUL1 = rows of `Y0`).
  * The sub-word products are `X1*Y0` and `X0*Y1`. They lie on the existing
    array without swapping operands.
  * The MUL2 reconfiguration is generalised from its n = 8 form to any n
    divisible by 4.
* **Carry handling.**
  * The last-stage adder includes column n-1, as explained above.
  * SCC outputs are zero in CM3.
  * The accumulators inside the MUL modules are wide enough that no internal
    carry is lost at n = 16 and above.
* **Baugh-Wooley constants.**
  * The columns of `CP0`..`CP4` are derived from the Baugh-Wooley identity.
  * The forced-one bits of CM4 are placed at `x[3n/4]y[n/2]` and
    `x[3n/4]y[3n/4-1]`.
  * The CM4 carry cut is an addition. Without it, `X3*Y3` is off by one
    whenever `X2*Y2 >= 0`.
* **Baugh-Wooley pipeline.**
  * There is an output register after stage 3.
  * `x[n/2-1]y[n/2-1]` is kept in an always-loaded stage-1 register, because
    the MUL1 substitute needs it while MUL1's operand register is frozen.
  * There is a synchronous reset.
* **Output packing.** CM2 packs the output as `{X0*Y1, X1*Y0}` (Booth) or
  `{MUL2, MUL1}` (Baugh-Wooley). CM4 packs it as `{X3*Y3, X2*Y2}`.
* **FIR.** The filter structure, coefficient port, operand packing, choice of
  upper nibbles and output width are this design's choices.
* **Top level.** The Booth channel's registers in `rfw_top` are this design's.

Known differences and limits:

* No power or area figures are reproduced. Power saving shows only as
  registers that do not load, and as substituted sub-multipliers.
* The Booth multiplier has no operand gating of its own beyond the
  `Y0`-encoder gate in CM3.
* `N` must be divisible by 4. The Booth multiplier has been simulated at
  n = 8 and 16. The Baugh-Wooley multiplier has been simulated at n = 8, 16,
  24 and 32.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>`.

The expected values come from `rfw_ref_pkg`. That package does not build the
array column by column. It takes the exact product, subtracts the value of the
dropped bits, shifts, and adds `floor((Emain + theta + K)/2)`.

| testbench | what it covers |
|-----------|----------------|
| `tb_booth_enc`, `tb_booth_dec`, `tb_bw_dec`, `tb_rfw_scc` | exhaustive truth tables |
| `tb_booth_mul1`, `tb_booth_mul2`, `tb_bw_mul1`, `tb_bw_mul2`, `tb_bw_mul3` | exhaustive at n = 8 in every configuration, against arithmetic identities of the sign-generate and Baugh-Wooley forms |
| `tb_booth_rfw_mult` | n = 8 exhaustive in all four modes; n = 16, 200,000 random operations; CM1 error bound |
| `tb_bw_rfw_pipe` | n = 16 and n = 8, 60,000 cycles with zero-biased operands. Checks the 3-cycle latency, the n = 8 substitute constants, and that every bypass, every frozen ADD1 cycle and the L hold occurred |
| `tb_bw_rfw_pipe_sizes` | the same checks at n = 24 and n = 32, 30,000 cycles |
| `tb_rfw_fir` | the speech-like workload in each mode, then 4,000 random samples with a mode change on every sample |
| `tb_rfw_top` | all three channels at the default sizes at once. Counts modes, mode switches, bypasses, ADD1 freezes, L holds and coefficient writes, and fails if any never happened |

To run one testbench with Verilator (replace `tb_rfw_top` by any testbench):

```
verilator --binary --timing --assert -Irtl \
  rtl/rfw_pkg.sv tb/rfw_ref_pkg.sv rtl/booth_enc.sv rtl/booth_dec.sv rtl/rfw_scc.sv \
  rtl/booth_mul1.sv rtl/booth_mul2.sv rtl/booth_rfw_mult.sv rtl/bw_dec.sv \
  rtl/bw_mul1.sv rtl/bw_mul2.sv rtl/bw_mul3.sv rtl/bw_rfw_pipe.sv rtl/rfw_fir.sv \
  rtl/rfw_top.sv tb/tb_rfw_top.sv --top-module tb_rfw_top -o sim
./obj_dir/sim
```

Lint leaves two warnings, both explained in `bw_rfw_pipe`'s comments. Both are
unused bits: column n-1 of MUL3, which is always zero, and bit 0 of ADD1,
which is dropped by design.
