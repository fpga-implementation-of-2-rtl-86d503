# Variable power-of-two scaler for residue number systems

In a residue number system (RNS) a number X is held as its remainders
x_i = X mod m_i with respect to a set of co-prime moduli. Addition and
multiplication then work channel by channel with no carries between channels,
but dividing by a constant is hard, because no channel knows the magnitude of X.
Fixed-point DSP datapaths still need that division to keep results from
overflowing, and in floating-point-like formats the divisor changes at run time.

This RTL computes, from the residues of X and a run-time exponent r, the
residues of

    Y = floor(X / 2^r),   0 <= r <= n,

entirely in the residue domain: X is never converted to binary and back. The
circuit has no memory and no lookup tables. It is built from rotations,
carry-save adders with end-around carry, modular adders and, for the fourth
channel, a small modular multiplier. It supports two moduli sets:

* the three-moduli set {2^n-1, 2^n, 2^n+1} (`rns_scaler3`), and
* an extended four-moduli set {2^n-1, 2^n, 2^n+1, m4} (`rns_scaler4`, the top
  level). The default m4 is 2^(n-1)+1, which is co-prime to the other three
  moduli for odd n. That set has a dynamic range of about 3n + log2 n bits.

By default n = 7, so the moduli are {127, 128, 129, 65} and the dynamic range is
M = 136 249 920. For example, X = 429872 has residues (104, 48, 44, 27). With
r = 3, the scaler returns (13, 102, 70, 44), which are the residues of 53734.

## Interface of the top level, `rns_scaler4`

| port | width | meaning |
|------|-------|---------|
| `x1` | N | residue mod 2^N-1, 0..2^N-2 |
| `x2` | N | residue mod 2^N |
| `x3` | N+1 | residue mod 2^N+1, 0..2^N (the value 2^N needs the extra bit) |
| `x4` | clog2(M4) | residue mod M4 |
| `r`  | clog2(N+1) | scaling exponent, 0..N |
| `y1`..`y4` | as `x1`..`x4` | residues of floor(X/2^r) |

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 7 | channel width n |
| `M4` | 2^(N-1)+1 = 65 | fourth modulus. It must be odd and co-prime to (2^2N-1)·2^N. |
| `RW`, `W4` | derived | widths of `r` and of the fourth channel |

The block is purely combinational: no clock, no reset and no state. The inputs
must be canonical residues. An `r` above N is outside the function, and an
immediate assertion reports it in simulation. Register the ports outside the
block if you want it pipelined.

## How the scaling works

### Level 1: the three base moduli (CRT)

Write m1 = 2^n-1, m2 = 2^n and m3 = 2^n+1. Every channel takes r into account
through one identity: dividing by 2^r is the same as multiplying by 2^(n-r) and
then dividing by 2^n.

**Channel 2^n-1 (`gen_y1`).** Modulo 2^n-1, multiplying by 2^k is a rotation
left by k. The scaled residue reduces to

    y1 = | CRS_n(x1, r) + ( ~(x2)[r-1:0] || 1...1 ) |_(2^n-1)

where `CRS_n` is a cyclic right shift and the second operand has n-r ones
appended. That operand is -(x2 mod 2^r)·2^(n-r) in one's-complement form.
`crs_shifter` (Shifter 1) makes the first operand. `fill_left_shifter` with its
input inverted (Shifter 2, shift s = n - r from `shift_sub`) makes the second.
`mod_2n_m1_adder` adds them.

**Channel 2^n (`crt_quotient` plus a shifter).** By the Chinese remainder
theorem, floor(X/2^n) < 2^2n-1 equals a residue modulo 2^2n-1 of a weighted
sum of x1, x2 and x3. All the weights are sums of powers of two. Each term is
therefore a rotation or a complement of a residue, and `bit_rewiring` lays the
terms out as three 2n-bit vectors using only wires and inverters:

    n1 = x1[0] || x1 || x1[n-1:1]
    n2 = ~x2   || ~x3[n-1:0]
    n3 = x3[0] || (x3[n-1:0] | {n{x3[n]}}) || x3[n-1:1]

`n3` folds in the correction for the one residue that needs n+1 bits,
x3 = 2^n. A 2n-bit CSA with end-around carry (`csa_eac`) and a modulo 2^2n-1
adder turn the three vectors into floor(X/2^n). Placing x2 below that value
gives X itself as a 3n-bit binary word (`x_bin`). A 3n-bit logical right
shifter (Shifter 3) gives `y_bin = floor(X/2^r)`, and its n low bits are y2.
These binary results come out as a by-product.

**Channel 2^n+1 (`gen_y3`).** This is the most intricate channel. Modulo
2^n+1, 2^n = -1, so a rotation must complement the bits that wrap around. The
result is the sum of three operands:

    Q1 = ~x3[n] & CCRS_n(x3[n-1:0], r)     complementary circular right shift
    Q2 = x2[r-1:0] || 1...1 (n-r ones)     ones-filling left shift, not inverted
    Q3 = ~x3[n]                            a single bit

`ccrs_shifter` (Shifter 4) is a rotation of the 2n-bit ring {~x, x}, which
lets it be built in logarithmic ranks. n AND gates force Q1 to zero when
x3 = 2^n. `csa_ceac` adds the three operands with one full adder at bit 0 and
half adders elsewhere. It sends the carry out of bit n-1 back to bit 0
complemented, so s + cy = Q1 + Q2 + Q3 + 1 (mod 2^n+1). Q2 and Q3 already
include the matching constant, and `mod_2n_p1_adder` produces y3 in 0..2^n.

### Level 2: the fourth modulus (MRC)

Level 1 gives X' = X mod (2^2n-1)·2^n as the binary word `x_bin`. Treat the
system as two moduli, M' = (2^2n-1)·2^n and m4. Mixed-radix conversion then
writes

    X = X' + T·M',    T = | (x4 - X') · |M'^-1|_m4 |_m4 .

Because r <= n, 2^r divides M' exactly, so

    floor(X/2^r) = floor(X'/2^r) + T · 2^(n-r) · (2^2n - 1)

and the two channels that depend on m4 become (`gen_y2y4`):

    y2 = | y_bin - T·2^(n-r) |_(2^n)
    y4 = | y_bin + T·|M'/2^r|_m4 |_m4

The T path is `mod_reduce` (x_bin mod m4), a modular negation, `mod_add` with
x4 and `mod_mult` by the constant |M'^-1|_m4. For y2, -T is shifted by
Shifter III, which takes the n low bits of {-T, n zeros} >> r, and an n-bit
adder that drops its carry adds the result to y_bin. For y4, `mod_mult`
multiplies T by |M'|_m4, and `mod_halver` (Shifter II) divides the product by
2^r modulo m4. A second `mod_reduce` maps y_bin to m4, and `mod_add` gives y4.
Channels y1 and y3 do not depend on x4 and come straight from level 1. Both
constants are computed at elaboration by functions in `rns_pkg`. For n = 7 and
m4 = 65 they are |M'^-1|_65 = 54 and |M'|_65 = 44.

## Module hierarchy

    rns_scaler4                 top: four-moduli scaler
    ├── shift_sub               s = n - r
    ├── rns_scaler3             level 1, also usable on its own
    │   ├── gen_y1              crs_shifter, fill_left_shifter (inverting), mod_2n_m1_adder
    │   ├── crt_quotient        bit_rewiring, csa_eac, mod_2n_m1_adder (2n bits)
    │   ├── logic_right_shifter 3n-bit, divides X by 2^r
    │   └── gen_y3              ccrs_shifter, fill_left_shifter (plain), csa_ceac, mod_2n_p1_adder
    └── gen_y2y4                level 2: mod_reduce ×2, mod_add ×2, mod_mult ×2,
                                logic_right_shifter (2n-bit), mod_halver
    rns_pkg                     constant functions (modular inverse, |M'|_m4)

All shifters use logarithmic ranks of 2:1 multiplexers, with one rank per bit of
the shift amount. The amount is clog2(n+1) bits wide, so r = n can be reached.

## Where this RTL departs from the source design, and what it fills in

* **Modular negation.** -|X'|_m4 is computed exactly as m4 - c, with 0 left as
  0. The source calls this block a one's complement, which is not a negation
  modulo 2^(n-1)+1.
* **Shifter II.** The source describes it as a logical right shift of a short
  word. Equation (81) needs T·|M'/2^r|_m4, however, and a plain shift does not
  give that. `mod_halver` divides by 2^r modulo m4 instead: it makes r halving
  steps, and an odd value has m4 added before the shift, so m4 must be odd.
* **Shared Shifter-I.** The level-2 block diagram draws the floor(X'/2^r)
  shifter twice. Level 1 already computes that value (`y_bin`), so it is shared.
* **Parts taken from earlier work.** The source does not give the insides of
  the modulo-m4 multiplier, the modulo-m4 adder, the modulo-m4 converter or the
  modulo 2^n±1 adders. These are written as the plain functions: a product
  followed by a constant-modulus remainder, or an add followed by one
  conditional subtract. Synthesis maps them as it sees fit. A Booth-encoded
  multiplier or a parallel-prefix modular adder could replace them without
  changing any interface.
* **Canonical outputs.** The modulo 2^W-1 adders map all-ones, the second
  encoding of zero, to 0, so y1 is always in 0..2^n-2.
* **Timing.** The source's board test registered the ports only inside a debug
  harness. The RTL stays combinational.

## Verification

Each module has a self-checking testbench in `tb/` named `tb_<module>`. Each
testbench compares the module with plain integer arithmetic, exhaustively where
the input space is small (shifters and adders at n = 7) and with 20 000 to
200 000 random vectors otherwise. Each ends with a line
`TB_RESULT checks=<n> failures=<n>`.

* `tb_rns_scaler4` runs the top at its default size (n = 7, m4 = 65). It
  replays the published results for X = 425629 scaled by 2, 4, 8 and 32, which
  are (89, 78, 93, 4), (108, 39, 111, 2), (117, 83, 55, 33) and
  (92, 116, 13, 40). It also replays X = 429872 scaled by 8, which gives
  (13, 102, 70, 44). It then checks 200 000 random X over the full dynamic
  range. It counts and requires every r from 0 to n, the special residue
  x3 = 2^n, and both T = 0 and T ≠ 0.
* `tb_scaler_sizes` runs the three-moduli scaler for n = 5, 6, 7 and 8. It runs
  the four-moduli scaler for n = 5, 7, 9 and 11, which are the moduli sets
  {31,32,33,17} up to {2047,2048,2049,1025}. It also runs n = 7 with a
  different fourth modulus, m4 = 257, as a check that the level-2 architecture
  is general.

Example with plain Verilator, run from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/rns_pkg.sv tb/tb_rns_scaler4.sv --top-module tb_rns_scaler4
    ./obj_dir/Vtb_rns_scaler4

Put `rtl/rns_pkg.sv` first on the command line, because `gen_y2y4` imports it.

## Limits

* r must be in 0..n. The identity floor(X/2^r) = floor(X'/2^r) + T·M'/2^r
  needs 2^r to divide M'.
* `rns_scaler4` has only been simulated with odd n for m4 = 2^(n-1)+1 (even n
  makes that m4 share a factor with 2^2n-1) and with m4 = 257 for n = 7.
  `mod_halver` needs an odd m4.
* The constant-modulus remainders in `mod_reduce` and `mod_mult` are correct
  for any size. For large n they are the largest logic in the design, and they
  are the first thing to replace if area or delay matters.
