# RoBA: a rounding-based approximate signed multiplier

A multiplier for error-tolerant signal processing, such as image filtering. It
trades a few percent of accuracy for a datapath with no partial-product array.
Each operand is rounded to its nearest power of two. Multiplying by a power of
two is only a shift, so the expensive part of the product can be left out and
the rest is built from three shifters, one adder and one subtractor. The adder
is a Han-Carlson parallel-prefix adder, chosen for speed.

The default configuration takes two 8-bit two's complement operands and gives
a 16-bit two's complement product, one clock later, one product per clock.

## The approximation

Call the operands A and B and their rounded values Ar and Br. This identity is
exact:

    A*B = (Ar - A)(Br - B) + Ar*B + Br*A - Ar*Br

Each of the last three terms has a power-of-two factor, so each is a shift.
The first term is a true multiplication, but both of its factors are small:
they are the rounding errors of the operands. RoBA drops that term:

    A*B  ~=  Br*A + Ar*B - Ar*Br

The error is therefore exactly (Ar - A)(Br - B). Its sign tells you which way
the result is off:

- If both operands were rounded in the same direction, the result is below
  the exact product.
- If they were rounded in opposite directions, the result is above it.
- If either operand is already a power of two (or zero), the result is exact.

Over all 65,536 pairs of 8-bit signed operands:

| measure | value |
| --- | --- |
| mean relative error (non-zero products) | 2.8 % |
| worst relative error | 11.1 %, for example -96 x -96 gives 8192 instead of 9216 |
| exact results | 7,936 pairs |

The approximation only works on magnitudes. The nearest power of two of a
negative two's complement number is not a power of two in that format. So
each operand's sign is taken off first, the unsigned magnitudes are
multiplied, and the sign (the XOR of the two operand signs) is put back last.

## Rounding to the nearest power of two

This is the least obvious block (`rounding2`). Suppose the leading one of a
magnitude `a` is at bit k. Then `a` lies between 2^k and 2^(k+1), and the
midpoint between them is 3*2^(k-1). So `a` rounds up exactly when bit k-1 is
also set. The rules for ties and the edge cases are:

- A magnitude exactly on the midpoint (3, 6, 12, 24, 48, 96, ...) is equally
  far from both powers. Either choice gives the same accuracy. The larger
  power is chosen, because it gives the smaller circuit.
- The one exception is 3, which rounds to 2, not 4.
- Zero rounds to zero, which keeps 0 x B exact.

In hardware each output bit is one product term, gated by "no input bit above
bit j is set":

    b[j] = none_above(j) & ( a[j] & ~a[j-1]              // leading one at j, stays
                           | ~a[j] & a[j-1] & a[j-2] )   // leading one at j-1, rounds up
    b[2] = none_above(2) & a[2] & ~a[1]                  // 3 does not round to 4
    b[1] = none_above(1) & a[1]                          // 2 and 3 -> 2
    b[0] = none_above(0) & a[0]                          // 1 -> 1

The output is one-hot, or zero. The output has N bits, not N+1, because of
the input range. A magnitude from an N-bit two's complement number is at most
2^(N-1), so it never rounds up past bit N-1. The block must not be fed
unsigned values of 2^(N-1) or more; with the sign stage in front, it never is.

## Datapath

    a --> sign/abs --|A|--+--> r1 rounding --Ar--+
                          |                      |
    b --> sign/abs --|B|--+--> r2 rounding --Br--+
                          |                      |
                          v                      v
               r3: Br x |A|      r5: Ar x |B|      r4: Ar x Br     (shifters, registered)
                        \            /                 |
                     r6: Han-Carlson adder              |
                               \                        /
                          r7: subtractor (sum - Ar x Br)
                                         |
    sign(a) XOR sign(b) --> register --> sign apply --> p

The instance names r1 to r7 are the ones used in the RTL.

| instance | module | computes |
| --- | --- | --- |
| `u_abs_a`, `u_abs_b` | `roba_sign_abs` | sign flag and magnitude of each operand |
| `r1`, `r2` | `rounding2` | Ar, Br |
| `r3` | `sixteenbitshifting` | Br x A |
| `r5` | `sixteenbitshifting` | Ar x B |
| `r4` | `sixteenbitshifting` | Ar x Br |
| `r6` | `han_carlson_adder` | Br x A + Ar x B |
| `r7` | `sub16bit` | (Br x A + Ar x B) - Ar x Br |
| `u_sign` | `roba_sign_apply` | negates the result if the operand signs differ |

Worked example, a = 7 and b = 14:

| signal | value |
| --- | --- |
| Ar | 8 |
| Br | 16 |
| Br x A | 112 |
| Ar x Br | 128 |
| Ar x B | 112 |
| sum | 224 |
| p | 96 (exact: 98) |

**Widths.** Magnitudes are at most 2^(N-1). So Ar and Br fit in N bits, and
each shifted product fits in 2N-1 bits. Their sum is at most 2^(2N-1) and fits
in the 2N-bit adder, whose carry out is never set. Ar x Br never exceeds the
sum, so the subtractor never borrows. The result magnitude stays below
2^(2N-1), so the signed 2N-bit output cannot overflow. The two carry-out
signals in the top are left unconnected for this reason; Verilator's lint
reports them as unused.

**Shifters.** A shifter multiplies an operand by a one-hot power of two. Each
bit of the power selects the operand shifted by that bit's position, and the
selected copies are ORed. No shift-amount encoder is needed.

## Timing

There is one register stage, at the three shifter outputs. The product-sign
flag is registered with them. Everything before the registers (sign removal,
rounding) and after them (adder, subtractor, sign) is combinational.

- **Latency:** 1 clock. Operands applied before a rising edge of `clk` give
  their product on `p` after that edge.
- **Throughput:** one product per clock.
- **Critical path:** after the register, it runs through the Han-Carlson
  adder, the ripple subtractor and the final negation.
- **Reset:** none. Every register is reloaded on every clock. The output is
  meaningless only until the first edge after the first operands are applied.

## The Han-Carlson adder

`han_carlson_adder` is a parallel-prefix adder. It works in three steps:

1. **Pre-processing.** Every bit gets a generate `g = a & b` and a propagate
   `p = a ^ b`. The carry in is folded into bit 0's generate.
2. **Prefix tree.** The (g, p) pairs are merged with the associative operator
   `(g, p) = (g_hi | p_hi & g_lo, p_hi & p_lo)`, which is
   `roba_pkg::prefix_op`.
3. **Post-processing.** The carry out of bit i is `c[i] = g[i:0]`, and
   `sum[i] = p[i] ^ c[i-1]`.

The tree follows the Han-Carlson pattern, for 16 bits:

| stage | what merges |
| --- | --- |
| 1 | every odd bit with the bit below it |
| 2 to 4 | a Kogge-Stone tree over the odd bits only, at spans 2, 4, 8 |
| 5 | every even bit from 2 up with the odd bit below it |

That is log2(WIDTH)+1 levels, one more than Kogge-Stone, with about half the
prefix cells. In the RTL each stage is its own generate block
(`g_stage[s].v[i]`). WIDTH must be a power of two.

The subtractor `sub16bit` computes `A + ~B + C_in` with a ripple of full
adders. The top drives `C_in = 1`, which gives `A - B`.

## Where this RTL makes its own choices

The algorithm, the block structure, the module and port names, the 8/16-bit
sizes, the use of a Han-Carlson adder and its 16-bit topology all follow the
published description of the design. The following are this implementation's
own choices:

- **Rounding logic.** The per-bit rounding equations are derived here from
  the rounding rule, not taken from a published equation.
- **Register placement.** One register stage at the shifter outputs. This
  matches a clock pin shown on the shifter blocks of the design's schematic.
  The original states no latency, and its reported 45 flip-flops do not match
  the 49 here (3 x 16 + 1).
- **Sign handling.** Sign removal and sign restoration are built as separate
  blocks (`roba_sign_abs`, `roba_sign_apply`), using two's complement
  negation. The schematic of the original shows no such blocks. Its text
  calls for them.
- **Internal structures.** The shifter (one-hot AND-OR), the subtractor
  (ripple carry) and the absolute-value circuit are the simplest circuits that
  do the job. The original names these blocks but does not give their insides.
- **Signed only.** Only the signed multiplier is built. The method also works
  for unsigned operands, but an unsigned 8-bit version would need a 9-bit
  rounding output and a 17-bit sum. That datapath is not described, so it is
  not provided.
- **Not included.** The "existing" version of the design, which uses a
  Kogge-Stone adder instead of the Han-Carlson adder, is a comparison point
  only and is not included.

## Files

| file | contents |
| --- | --- |
| `rtl/robaproposedmult.sv` | top level |
| `rtl/roba_pkg.sv` | (g, p) struct and prefix operator |
| `rtl/roba_sign_abs.sv`, `rtl/roba_sign_apply.sv` | sign removal and restoration |
| `rtl/rounding2.sv` | nearest power of two |
| `rtl/sixteenbitshifting.sv` | registered one-hot shifter |
| `rtl/han_carlson_adder.sv` | Han-Carlson prefix adder |
| `rtl/sub16bit.sv` | ripple subtractor |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Parameters: `N` (operand width, default 8) on the top, the sign stage, the
rounding block and the shifter. `WIDTH` (default 16) on the adder, the
subtractor and the sign stage at the output.

## Verification

Every testbench checks the block against a reference model written
independently of the RTL, and ends by printing
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
| --- | --- |
| `tb_robaproposedmult` | The worked example, including every intermediate signal. Then all 65,536 operand pairs, streamed one per clock. Each result is compared after exactly one clock, and the output is checked not to change before that edge. The reference uses the error-term form `|A||B| - (Ar-|A|)(Br-|B|)` with a search-based rounding, not the shift-add-subtract form. The testbench also counts that each case occurs: negative product, two negative operands, -128, zero, midpoint rounded up, 3 rounded to 2, exact result, result above and below exact. |
| `tb_rounding2` | Exhaustive, against a nearest-power-of-two search, at N = 8 and N = 12. |
| `tb_han_carlson_adder` | Corner and random cases at 16 bits, plus 8-bit and 32-bit instances. |
| `tb_sixteenbitshifting` | Every operand with every power of two, including the one-clock latency. |
| `tb_sub16bit`, `tb_roba_sign_abs`, `tb_roba_sign_apply` | Corner and random, or exhaustive, cases. |

To run a testbench with Verilator (from the folder that holds `rtl/` and
`tb/`):

    verilator --binary --timing --assert -Irtl -Itb rtl/roba_pkg.sv \
        tb/tb_robaproposedmult.sv --top-module tb_robaproposedmult -o sim
    ./obj_dir/sim

Substitute any other `tb_<module>` for the top. All testbenches finish in
well under a second of run time.
