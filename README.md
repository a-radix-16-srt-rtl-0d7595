# Radix-16 SRT divider with speculated quotient digits

An SRT divider's clock period is set mostly by quotient-digit selection:
every cycle it must inspect the partial remainder and pick the next digit
before the remainder can be updated. This unit makes that selection cheaper
by guessing. Each cycle it *speculates* a radix-16 digit from a very short
estimate of the remainder (6 bits of it, plus 2 bits of the divisor). It then
updates the remainder with that guess. In the next cycle a separate, equally
small circuit checks the new remainder. If the remainder is out of bounds,
one extra cycle corrects both the remainder and the digit. A correction
always takes exactly one cycle, whatever the size of the error. The result is
a variable-latency divider with a short cycle.

This RTL divides the significands of IEEE double-precision numbers (53 bits,
leading one included). Each division produces 14 radix-16 digits, plus one
cycle per correction.

## Interface and result

`srt16_divider` (top):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | starts a division when `busy` is low; the operands are sampled in that cycle |
| `x_mant`, `d_mant` | in | 53 | dividend and divisor significands, MSB must be 1 |
| `busy` | out | 1 | division in progress |
| `done` | out | 1 | one-cycle pulse; the results below are valid from then on and stay until the next start |
| `quotient` | out | 56 | `floor(x_mant * 2^54 / d_mant)` |
| `rem_zero` | out | 1 | the division was exact |
| `n_corr` | out | 8 | correction cycles spent on this division |

The operands are read as fractions x and d in [1/2, 1). The recurrence starts
from w[0] = x/4, so `quotient / 2^56` is x/(4d), truncated. This value lies
in (1/8, 1/2), so the quotient always has at least 54 significant bits.
`rem_zero` is the sticky bit a rounding stage would need. Exponent, sign,
normalization and rounding are not part of this unit.

The latency from the cycle that samples `start` to the `done` pulse is
**14 + 3 + n_corr** cycles:

- 1 load cycle;
- 14 speculation cycles;
- 1 cycle that checks the last digit;
- 1 cycle that resolves the remainder sign;
- 1 cycle for each correction.

## The digit set and the recurrence

The recurrence is the usual one, `w[j+1] = 16 w[j] - q[j+1] d`. Digits are
taken from {-12 ... +12}, so the redundancy factor is rho = 12/15. A correct
remainder always satisfies |w| <= 0.8 d.

A speculated digit is the sum of two parts, `q_s = q_h + q_l`:

- q_h is in {0, ±4, ±8};
- q_l is in {0, ±1, ±2, ±4}.

Each part is a signed power of two. Its multiple of d is therefore only a
shift and a conditional inversion, and each part needs one carry-save adder.
The sum covers every digit except ±11. When ±11 is the right digit, the
speculation picks 10 or 12, and the correction cycle repairs it. ±12 are
speculated directly because they occur often.

## One cycle of the datapath (`srt16_datapath`)

The remainder register holds w_s, the most recent speculated remainder, in
carry-save form. The register has 58 bits per vector: 3 integer bits,
sign included, and 55 fraction bits. Every cycle, two things happen in
parallel:

- **Speculation path.** `spec_select` adds the top six bits of the sum and
  carry vectors of 16w (weights 2^4 ... 2^-1) in a 6-bit adder. From the
  result and d' (the two divisor bits after the leading one) it looks up
  q_h and q_l. q_h depends only on the five integer bits, so it is ready
  early. It steers the first multiple multiplexer and the first CSA, which
  computes 16w - q_h d. q_l is needed only at the second CSA.
- **Check path.** `err_detect_corr` adds the sum and carry bits of w_s at
  weights 2^1 ... 2^-4. From that and d'' (the same two divisor bits) it
  finds a correction digit q_c in {-2 ... +2}. q_c = 0 means the speculation
  was right.

Which result is kept depends on the check:

- **No error:** the second CSA subtracts q_l d from the first CSA's output. The
  register receives 16w - q_s d, and the previous digit is final.
- **Error:** two multiplexers switch. The second CSA receives the register
  contents instead of the first CSA's output, and q_c instead of q_l. The
  register receives w = w_s - q_c d, and the pending digit becomes q_s + q_c.
  The speculation done in parallel is discarded.

A corrected remainder is within 0.8 d by construction. The cycle after a
correction therefore always speculates without checking. This is what limits
every error to exactly one extra cycle.

Negative multiples are formed by inverting the shifted divisor and adding 1
as the carry-in of the CSA. The CSA's carry vector has a free least
significant bit for it.

## The selection tables (the hard part)

The two tables are not stored as data. Functions in `srt16_pkg` compute them
at elaboration, and synthesis turns them into small ROMs. The rule behind both
tables is the same. An estimate with a truncated carry-save value and a
truncated divisor places the true pair (w, d) in a box. Within that box, the
ratio w/d lies between its values at the four corners. The table stores the
digit q that minimises the largest |w/d - q| over the box, which is the worst
|next remainder| / d. All ratios are scaled by 1680, which makes every corner
ratio an exact integer.

**Speculation table (F^s).** A 6-bit estimate W of 16w (in half units) means
16w is in [W/2, W/2 + 1). Each of the two truncated vectors loses less than
half a unit. The 2 divisor bits put d in an interval of width 1/8. Because
|w| <= 0.8 d on entry, the ratio is clipped to ±12.8. q_h must be shared
by the two estimates that differ only in the fraction bit, so it is chosen per
pair of cells. The worst case over all cells is **|w_s| <= 2.8 d**.

This is looser than the ±1.8 d (one digit of error) of the basic speculation
theory. With only one fraction bit of the remainder and two bits of d, a
single cell can span four digit values of 16w/d: for example, 16w in
[5.5, 6.5) with d in [0.5, 0.625). No table can do better.

**Correction table (F^c).** The estimate of w_s has 2 integer and 4 fraction
bits, so its error is below 1/8. The ratio is clipped to ±2.8. q_c is 0 when
the whole cell is within ±0.8 d. Otherwise it is the digit in {±1, ±2} that
keeps the corrected remainder within ±0.8 d for the whole cell. Such a digit
exists for every cell, and the worst case is exactly 0.8 d. The test is
conservative: a cell that lies only partly outside the bound is still
corrected, and this costs some unnecessary correction cycles. Two integer bits
are enough because no speculated remainder reaches magnitude 1.875. The
largest observed is about 1.85.

To change the estimate widths, change the constants and the corner formulas
in `srt16_pkg` together. `tb_spec_select` and `tb_err_detect_corr` check the
resulting tables against the bounds over the whole input space.

**Measured behaviour.** On random operands, about 18% of digits need a
correction, so the number of cycles per digit is C_d = 1 + N_corr / (N_div * 14)
≈ 1.17. The design this follows reports hit ratios near 90% (C_d ≈ 1.1) with
tables synthesized from boolean relations. Those tables are not available, so
the tables here are a worst-case-optimal substitute, not a reproduction.

## Quotient assembly and termination

Digits arrive most significant first and may be negative. `otf_convert` keeps
Q and Q − ulp as plain binary numbers and appends each digit without any carry
propagation (on-the-fly conversion):

- for q >= 0, Q ← 16Q + q; for q < 0, Q ← 16(Q − ulp) + 16 + q;
- for q > 0, Q − ulp ← 16Q + q − 1; for q <= 0, Q − ulp ← 16(Q − ulp) + 15 + q.

A digit enters the converter only once it is known to be right. That happens
in the next speculation cycle, or in the final check cycle for the last digit.
No converted digit ever has to be changed.

After the last digit, the carry-save remainder is assimilated once. If the
remainder is negative, Q − ulp is the truncated quotient; otherwise Q is.

## Sequencing (`srt16_ctrl`)

The controller steps through IDLE → ITER → TERM → DONE. In ITER, a cycle is a
correction when the error detector fires and the previous cycle was a
speculation. It is a speculation in every other case. The controller counts
speculated digits, commits digits to the converter, and stops after the 14th
digit has been checked. An assertion states that a correction is never
followed by another one.

## Files

| file | content |
|---|---|
| `rtl/srt16_pkg.sv` | sizes, types, table-generating functions |
| `rtl/srt16_divider.sv` | top: controller, datapath, converter, termination |
| `rtl/srt16_datapath.sv` | remainder recurrence, multiplexers, register |
| `rtl/spec_select.sv` | speculation function (q_h, q_l) |
| `rtl/err_detect_corr.sv` | error detection and correction digit |
| `rtl/div_multiple.sv` | signed power-of-two divisor multiple |
| `rtl/csa32.sv` | 3:2 carry-save adder |
| `rtl/otf_convert.sv` | on-the-fly quotient conversion |
| `rtl/srt16_ctrl.sv` | sequencer |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops on a watchdog
if it hangs.

- **`tb_srt16_divider`** runs the full-size top end to end: 7 directed and
  4001 random divisions. It checks each quotient and `rem_zero` against
  128-bit integer division, and checks the latency 17 + n_corr. It also
  requires each mechanism to occur at least once: corrections by −2, −1,
  +1 and +2, speculated ±12, ±11 formed by a correction, negative final
  remainders, exact divisions, and back-to-back operations. The run takes
  well under a second.
- **`tb_srt16_datapath`** compares the register with an exact integer model
  of the recurrence after every cycle. It checks the remainder bounds and the
  identity x/4 · 16^14 = Q·d + w.
- **`tb_spec_select`** and **`tb_err_detect_corr`** are exhaustive over all
  sum, carry and divisor-bit inputs. They check the bound properties above
  with real arithmetic on a grid of points inside each cell.
- **`tb_csa32`**, **`tb_div_multiple`**, **`tb_otf_convert`** and
  **`tb_srt16_ctrl`** test the arithmetic identity of each small block and the
  sequencing rules of the controller.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/srt16_pkg.sv \
          tb/tb_srt16_divider.sv --top-module tb_srt16_divider
./obj_dir/Vtb_srt16_divider
```

The other testbenches are built the same way, with their own file and
`--top-module`.

## What follows the source design and what does not

Taken from the source design:

- radix 16 with digit set ±12 (rho = 12/15);
- correction digits ±2;
- the q_h/q_l split, with q_h computed from the integer bits of the
  estimate only;
- ±11 reached only through correction, and ±12 speculated;
- estimate sizes: 6+6 carry-save bits of the remainder and 2 divisor bits for
  speculation, (2 integer, 4 fraction) bits of the remainder and 2 divisor
  bits for the check;
- two CSAs per cycle, with the multiple multiplexers' digit sets;
- detection of step j−1 overlapped with speculation of step j;
- corrections that always take one cycle;
- on-the-fly conversion.

Choices of this implementation:

- the table contents (see above);
- start from x/4 instead of x, so that the first remainder is within bounds;
- the start/busy/done handshake, the reset, and latching the divisor;
- the pending-digit register, and committing digits to the converter only
  once they are confirmed;
- the final check cycle and the remainder-sign termination;
- the 58-bit remainder format.

Not represented:

- the drive buffers and the standard-cell timing and area figures of the
  original implementation;
- any floating-point exponent, sign or rounding logic.
