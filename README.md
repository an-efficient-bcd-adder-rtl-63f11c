# BCD adder, Vedic multiply-accumulate and approximate multiplier datapaths

This RTL holds three independent arithmetic datapaths:

* a **16-digit (64-bit) BCD adder**. It is cut into three ripple segments, and the
  decimal carry between segments is held in a flip-flop. Each segment's carry
  chain stays short, and the sum settles over two clock cycles.
* a **multiply-accumulate (MAC) unit** computing F = Σ Ai·Bi. Its core is a 64×64
  unsigned multiplier built by the *Urdhva-Tiryagbhyam* ("vertically and
  crosswise") Vedic method: a 2×2 multiplier is the leaf, and every larger size is
  four half-size multipliers whose products are summed by carry look-ahead adders.
* an **approximate signed multiplier** using *hybrid high-radix encoding*. The
  upper multiplier bits use exact radix-4 Booth digits. The lowest bits form a
  single high-radix digit, which is rounded to the nearest power of two, so its
  partial product is just a shifted copy of the multiplicand.

The top level, `bcd_mac_top`, places them side by side. The two clocked
datapaths share only the clock and reset.

The BCD adder was conceived as a reversible-logic circuit, built from reversible
ASK gates and New Gates (NG), with one digit needing 11 gates, 13 ancilla inputs
and 22 garbage outputs. That gate-level netlist is not part of this RTL. The RTL
implements the same decimal function in ordinary synthesizable logic. The same
holds for the "fault tolerant" (parity-preserving reversible) form of the
multiplier and adders: only their arithmetic function is modelled.

## The 16-digit BCD adder

### One digit (`bcd_digit_adder`)

Two BCD digits (0–9) and a carry in are added in binary, giving z in 0..19. If
z > 9 the digit overflowed, so 6 is added to skip the six unused codes 10–15.
The low four bits of the result are then the decimal digit, and the decimal carry
out is 1. Operands above 9 are outside the contract.

### Segments (`bcd_adder_seg`)

A segment is a plain ripple of `DIGITS` digit adders. Digit 0 sits in bits 3:0.

### Carry-registered split (`bcd_adder_64`)

```
 digits 15..11          digits 10..6           digits 5..0
 +-----------+  c_mid_q +-----------+  c_lo_q  +-----------+
 | 5 digits  |<--[FF]---| 5 digits  |<--[FF]---| 6 digits  |<-- 0
 +-----------+          +-----------+          +-----------+
   | cout, sum[63:44]     | sum[43:24]            | sum[23:0]
```

The low segment is purely combinational. Its carry out is registered at each
rising edge and feeds the middle segment. The middle segment's carry out is
registered likewise and feeds the high segment.

**Timing.** This is the part that needs care when using the block. The operands
must be held steady for two rising edges:

| after applying a, b | valid outputs                          |
|---------------------|----------------------------------------|
| 0 edges             | `sum[23:0]`                            |
| 1 edge              | `sum[43:0]`                            |
| 2 edges             | `sum[63:0]` and `cout`                 |

The block does **not** pipeline independent additions. Only the carries are
registered, not the operands or the sums. A new addition every cycle would mix
carries from the previous operands into the upper digits. To use it as a pipeline,
add operand skew registers outside the block. `rst_n` (synchronous, active low)
clears both carry flip-flops.

The 6/5/5 split follows the digit inputs of the original block diagram. There,
the top segment is labelled "24 bit", but it receives only five digits (a11..a15),
and five digits are what add up to 64 bits. The split is set by the `DIG_LO`,
`DIG_MID` and `DIG_HI` parameters.

## The Vedic multiplier

### Leaf (`vedic_mul_2x2`)

* `p0 = a0·b0` is the vertical product.
* The two crosswise products `a1·b0` and `a0·b1` go through a half adder, giving `p1`.
* That half adder's carry and the vertical product `a1·b1` go through a second
  half adder, giving `p2` and `p3`.

### Recursion (`vedic_mul`, parameter `N`, default 64)

For N > 2, let H = N/2. The operands split into halves, and four H×H
multipliers form:

```
q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH        (each N bits)
```

One N-bit adder and two 3H-bit adders combine them:

```
s1 = q1 + q2                       N-bit CLA, carry kept
s2 = {c1,s1} + q0[N-1:H]           3H-bit CLA, inputs zero-extended
s3 = s2 + (q3 << H)                3H-bit CLA
p  = {s3, q0[H-1:0]}
```

Inside a 32×32 stage these are an add_32_bit and two add_48_bit, next to four
16×16 multipliers. The 64×64 multiplier has five levels down to 1024 2×2 leaves.
It is one combinational cone of roughly 38k word-level cells after synthesis. The
recursion is a single parameterized module that instantiates itself, and `N` must
be a power of two. The assignment of partial products to the three adders is this
design's own choice. The original structure fixes only the count and widths of
the adders.

### Carry look-ahead adder (`cla_adder`, parameter `W`)

Each bit forms a generate `g = a&b` and a propagate `p = a^b`, and bits are
grouped by four. Inside a group, every carry is a two-level AND-OR of the
group's carry in and the g/p terms. Group carries are chained. A last group
shorter than four bits is allowed.

## The MAC unit (`mac_unit`)

Each rising edge with `en = 1` adds `a*b` to the accumulator `acc`, so one
multiply and one accumulate complete in a single cycle. If `clear = 1` at the
same edge, the accumulator is loaded with `a*b` alone, which starts a new sum.
Other details:

* `prod` is the combinational product.
* `acc` is `ACC_W = 128` bits wide by default and wraps on overflow.
* `rst_n` zeroes the accumulator.

The operand and result memories of a complete MAC system are not included:
operands come in on `a`/`b` and the sum leaves on `acc`. The accumulator width
and the clear/enable controls are this design's own choices.

## The approximate multiplier (`approx_hr_mul`, parameters `N` = 16, `K` = 6)

The N-bit two's-complement multiplier `b` is recoded exactly as
`b = y0 + Σ yj·4^j`:

* `y0` is the low K bits read as a K-bit signed number, in -2^(K-1) .. 2^(K-1)-1.
* Each `yj` is an ordinary modified-Booth digit in -2..2, formed from bits
  2j+1, 2j and 2j-1, for the upper N-K bits. The first one overlaps bit K-1.

The radix-4 partial products `a·yj` are exact. For `y0`, the magnitude is rounded
to the nearest power of two, so `|y0| = 1, 2, 3, 4, 5, 6, 7, ...` becomes
`1, 2, 4, 4, 4, 8, 8, ...`. A tie such as 3·2^(p-1) rounds up, and zero stays
zero. The result is that one expensive radix-2^K partial product, which would
need the multiples a, 3a, 5a, ... of a radix-64 digit, becomes one shift and an
optional negation.

The error is confined to `a·(y0 - round(y0))`. It is at most |a|·2^(K-3) in
magnitude and almost symmetric around zero. Over 200,000 random 16-bit operand
pairs, the mean error is about 1e-6 of the mean product magnitude. Raising `K`
removes more Booth digits and increases the error.

`N`, `K`, the choice of which operand is recoded, the tie rule and the plain
summation of partial products are this design's own choices. `N` and `K` must be
even, with 2 ≤ K < N. The multiplier is purely combinational.

## Top level (`bcd_mac_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `bcd_a`, `bcd_b` | in | 64 | 16 packed BCD digits each |
| `bcd_sum`, `bcd_cout` | out | 64, 1 | BCD sum, decimal carry out (valid 2 edges after the operands) |
| `mac_en`, `mac_clear` | in | 1 | accumulate / start new sum |
| `mac_a`, `mac_b` | in | 64 | operands Ai, Bi |
| `mac_prod` | out | 128 | Ai·Bi, combinational |
| `mac_acc` | out | 128 | accumulated sum, registered |
| `am_a`, `am_b` | in | 16 signed | approximate multiplier operands |
| `am_p` | out | 32 signed | approximate product, combinational |

A shared package, `bcd_pkg`, holds the BCD digit type and constants.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. The reference values
always come from plain integer arithmetic in the testbench (BCD↔integer
conversion, full-width `*` and `+`), never from the RTL's own method.

| testbench | what it covers |
|---|---|
| `tb_bcd_digit_adder` | all 200 digit/carry combinations |
| `tb_bcd_adder_seg` | 6-digit segment, random and all-nines corners |
| `tb_bcd_adder_64` | exact 0/1/2-edge timing of a carry rippling through all 16 digits; 3000 random additions |
| `tb_vedic_mul_2x2` | all 16 products |
| `tb_vedic_mul` | 64×64 random and corner operands, 8×8 exhaustive |
| `tb_cla_adder` | 32-bit random and carry chains, 6-bit (partial group) exhaustive |
| `tb_mac_unit` | one-cycle latency, accumulate / clear / idle / wrap-around against a reference model |
| `tb_approx_hr_mul` | 16-bit random and extremes, 8-bit (`K` = 4) exhaustive, against a nearest-power-of-two reference |
| `tb_bcd_mac_top` | all three datapaths at full default size, concurrently, with a mid-run reset |

`tb_bcd_mac_top` counts every mechanism and fails if any never occurred:

* a BCD digit correction
* a carry held in each carry flip-flop
* a decimal carry out
* each MAC mode: accumulate, clear, idle and wrap-around
* each rounding case of the approximate multiplier: exact, rounded up and
  rounded down
* the reset

The top testbench uses default parameters throughout and runs in about a second.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/bcd_pkg.sv tb/tb_bcd_mac_top.sv \
          --top-module tb_bcd_mac_top -Mdir obj && ./obj/Vtb_bcd_mac_top
```

For another testbench, substitute its name. `bcd_pkg.sv` must come first because
the BCD modules import it. The 64×64 multiplier makes Verilator builds take about
half a minute.

## Departures and limits

* **Reversible-logic form.** The reversible form of the BCD digit adder (ASK and
  NG gates), and the fault-tolerant reversible form of the multiplier and adders,
  are not modelled. The RTL reproduces only their arithmetic. Gate count, ancilla
  and garbage figures therefore do not apply to it.
* **BCD adder timing.** The BCD adder needs its operands held for two clock edges
  (see the timing table). This follows from the carry flip-flops in the block
  structure. It was not stated as a requirement.
* **Invented details.** The following are this design's choices, not part of the
  original description:
  * the digit ordering within the 64-bit BCD ports
  * the carry into digit 0, tied to zero
  * all resets
  * the MAC accumulator width and its clear/enable controls
  * the internal grouping of the CLA
  * which partial products each multiplier adder takes
  * every size and detail of the approximate multiplier beyond its encoding idea
* **Not included.** The MAC's operand and result memories are not included.
  Neither are two circuits mentioned only in passing: a redundant-code decimal
  carry-save adder and a floating-point multiplier. Too little of either is
  specified to build it.
