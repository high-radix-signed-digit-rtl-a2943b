# Carry-free adder for high-radix signed-digit numbers

This adder sums two N-digit numbers in a redundant radix-2^K signed-digit
format. Its delay does not depend on N. No carry crosses more than one digit
boundary. Each digit position spends the delay of two small adders, each of
K+1 or K+2 bits, plus a few gates. Nothing ripples from one end of the word to
the other.

The design combines two ideas:

* **Signed digits with redundancy.** A digit of radix r = 2^K may take any
  value in [-(r-1), r-1]. That is 2r-1 values where r would suffice. The extra
  room lets every position absorb the transfer from its neighbour, so no carry
  has to propagate.
* **Half-radix transfer selection.** The textbook algorithm decides each
  transfer by comparing |a_i + b_i| with the digit bound α. That comparison is
  a K-bit operation. Here the transfer is chosen by comparing with r/2 instead.
  For two's-complement digits this needs only the top three bits of
  a_i + b_i: it becomes a 3-input, 2-output gate function, and the interim
  digit needs no adder either.

## Number format

| item | encoding |
|---|---|
| radix | r = 2^K, K ≥ 2 (parameter `K`, default 4, so r = 16) |
| digit | K+1 bits, two's complement, value in [-(r-1), r-1]. The code -2^K (`1000…0`) is not a legal digit |
| number | N digits (parameter `N`, default 16); value = Σ d_i · r^i; digit i sits in bits `[i]` of a packed `[N-1:0][K:0]` vector |
| transfer | 2-bit two's complement `transfer_t`: `00` = 0, `01` = +1, `11` = −1 (`hrsd_pkg`) |

A number has several representations. For example, with r = 16 the digit
pairs (1, −1) and (0, 15) both mean 15. Converting from an ordinary two's
complement integer is free: cut it into K-bit groups and give every digit a
zero sign bit, except the top one. The adder does not convert back to binary.
That needs a real carry-propagating subtraction of the negative digits from
the positive ones, and belongs wherever the result leaves the redundant domain.

## The four steps in one digit position

For digit i the slice computes:

1. **Position sum** `p_i = a_i + b_i`. Both digits are sign-extended by one bit
   and added in K+2 bits. The result lies in [-(2r-2), 2r-2] and cannot
   overflow.
2. **Transfer** `t_{i+1}` ∈ {−1, 0, +1}, sent to position i+1.
3. **Interim sum** `w_i = p_i − r · t_{i+1}`, which stays in [-(r-2), r-2].
4. **Final sum** `s_i = w_i + t_i`, with t_i arriving from position i−1.
   Because |w_i| ≤ r−2, the result stays in [-(r-1), r-1]. No new transfer
   can arise.

Only steps 1 and 4 contain adders. Steps 2 and 3 are a handful of gates whose
depth does not depend on K.

### Why three bits decide the transfer

Name the bits of the (K+2)-bit position sum `sign = p[K+1]`, `u = p[K]` and
`v = p[K-1]`. The lower K−1 bits are called `x`. The three top bits split the
range of p_i into eight slices, each r/2 wide:

| sign u v | p_i range | t_{i+1} | w_i = p_i − r·t | w[K] | t bits |
|---|---|---|---|---|---|
| 0 0 0 | [0, r/2) | 0 | p_i | 0 | 00 |
| 0 0 1 | [r/2, r) | +1 | p_i − r | 1 | 01 |
| 0 1 0 | [r, 3r/2) | +1 | p_i − r | 0 | 01 |
| 0 1 1 | [3r/2, 2r−2] | +1 | p_i − r | 0 | 01 |
| 1 0 0 | [−2r+2, −3r/2) | −1 | p_i + r | 1 | 11 |
| 1 0 1 | [−3r/2, −r) | −1 | p_i + r | 1 | 11 |
| 1 1 0 | [−r, −r/2) | −1 | p_i + r | 0 | 11 |
| 1 1 1 | [−r/2, 0) | 0 | p_i | 1 | 00 |

The rule is: transfer +1 when p_i ≥ r/2, −1 when p_i < −r/2, and 0 otherwise.
The one asymmetric point is p_i = −r/2 exactly. It falls in the `111` slice
and gets transfer 0 with w_i = −r/2. Sending it −1 would also give a legal
result (w_i = +r/2). Choosing 0 lets every slice map to a single transfer
value, so the transfer depends only on the three bits:

```
t[1] = sign & ~(u & v)
t[0] = three bits not all equal = (~sign | ~u | ~v) & (sign | u | v)
```

Adding or subtracting r·t changes only bits K and up. So the lower K bits of
w_i are simply copied from p_i, and only the sign bit of the (K+1)-bit w_i is
computed:

```
w[K] = sign & ~u | sign & v | ~u & v
```

Why is the transfer legal? In every slice |w_i| ≤ r−2, so adding
t_i ∈ {−1, 0, 1} keeps the sum digit within ±(r−1). More generally the
half-radix choice keeps |w_i| ≤ α−1 for any digit bound α from r/2+1 to r−1.
So the same hardware also preserves the less redundant digit sets. The only
requirement is that the operands come from that set. The digit-slice
testbench checks this for α = 9, r = 16.

### Delay

Counting K-dependent cells (adders, comparators) on the path from operand to
sum digit gives 2: the (K+2)-bit position-sum adder and the (K+1)-bit final
increment/decrement. The conventional compare-with-α rule adds a third K-bit
comparison. With sign-magnitude digits each of the two signed additions costs
two K-dependent operations, four in all. The transfer t_i enters only the last adder,
so the critical path is

```
a_i, b_i → (K+2)-bit add → 3-bit transfer logic → (K+1)-bit add in slice i+1 → s_{i+1}
```

The lower bits of w_i travel in parallel with the transfer logic. The adders
are written as `+`; whether they become ripple or look-ahead adders is left to
synthesis.

## Overflow

Position 0 receives t_0 = 0. The transfer out of the top digit, t_N, comes out
on `t_n`, and `overflow` is high when it is nonzero. The exact sum is always
S + t_N · r^N. A caller can therefore widen the result by one digit and store
t_N as a new top digit.

## Modules

| module | role |
|---|---|
| `hrsd_pkg` | `transfer_t` encoding |
| `position_sum` | step 1, (K+1)+(K+1) → (K+2)-bit signed add |
| `chra_transfer` | step 2, 3-bit → 2-bit transfer logic (no K parameter) |
| `interim_sum` | step 3, copies K bits and computes w[K] |
| `final_sum` | step 4, w + sign-extended t |
| `hrsd_digit_slice` | one digit position, steps 1–4 |
| `hrsd_adder` | top: N slices, t_0 = 0, `t_n`, `overflow` |

Top-level ports of `hrsd_adder #(K, N)`:

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | `[N-1:0][K:0]` | operands |
| `s` | out | `[N-1:0][K:0]` | sum digits, each in [-(r-1), r-1] |
| `t_n` | out | 2 | top transfer t_N, `transfer_t` encoding |
| `overflow` | out | 1 | t_N ≠ 0 |

Everything is combinational. There is no clock, register or reset. To
pipeline the adder, put registers around `hrsd_adder`, or between
`position_sum` and the rest of the slice.

## Design choices and limits

* **Sizes.** The radix and length are free parameters. The defaults K = 4
  (r = 16) and N = 16 (equivalent to about 64 bits) are a choice, not a
  prescribed size.
* **Digit format.** Only two's-complement digits are implemented. Sign-magnitude
  and one's-complement digits are possible too, with the same half-radix idea,
  but they cost more (sign-magnitude) or gain nothing (one's complement), so
  they are not built. The compare-with-α transfer rule is not built either,
  and neither is the "maximal hardware" variant that precomputes all nine
  candidate sums per digit.
* **Illegal input.** The digit code `1000…0` (−2^K) is outside the digit set.
  It is neither rejected nor flagged, and with such an input the result is
  not defined (a sum digit can wrap around).
* **Final adder.** The final sum is a full (K+1)-bit adder with a
  sign-extended transfer. A dedicated incrementer/decrementer would be
  smaller, and synthesis usually finds it.
* **Wired-through bits.** In `interim_sum`, K of the K+1 output bits are
  wired straight from the input. This is intended: step 3 needs no adder.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a time-out watchdog.

| testbench | what it checks |
|---|---|
| `tb_position_sum` | all digit pairs for K = 4 and K = 2 against integer a+b |
| `tb_chra_transfer` | every legal position sum for K = 2, 4 and 6 against the half-radix rule, including p = −r/2 |
| `tb_interim_sum` | w = p − r·t and \|w\| ≤ r−2 for all legal p, K = 4 and 3 |
| `tb_final_sum` | all w in [−(r−2), r−2] and all t, K = 4 and 2 |
| `tb_hrsd_digit_slice` | all digit pairs and all t_in for K = 4 and 3: s + r·t_out = a + b + t_in, s in the digit set, t_out follows the rule; then the α = 9 digit set |
| `tb_hrsd_adder` | default size (K = 4, N = 16): 5 directed cases and 20 000 random operand pairs. Digits are biased towards ±(r−1), ±r/2 and ±(r/2−1) |
| `tb_hrsd_adder_radix` | (K, N) = (2, 5), (3, 7) and (6, 3), 5 000 random pairs each, via the helper `hrsd_adder_check` |

The whole-adder tests do not use a reference adder. They check the identity
Σ (a_i + b_i − s_i) · r^i = t_N · r^N exactly, dividing by r digit by digit,
and they check every sum digit against the digit set. `tb_hrsd_adder` counts
how often each case of the algorithm occurs: positive and negative transfers,
the p = −r/2 point, positive and negative overflow, and sum digits at +α and
−α. It fails if any of them never happens.

To run a testbench with Verilator 5 from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hrsd_pkg.sv tb/tb_hrsd_adder.sv --top-module tb_hrsd_adder -Mdir obj
./obj/Vtb_hrsd_adder
```

To try another size, change `K` and `N` on the `hrsd_adder` instance. Digits
in a testbench must be drawn from [-(2^K-1), 2^K-1].
