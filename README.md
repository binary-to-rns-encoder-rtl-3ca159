# Forward RNS encoder for {2^n − 1, 2^n, 2^n + 1} with a switchable diminished-1 channel

A residue number system (RNS) processor works on the remainders of a number
rather than on the number itself. With the moduli 2^n − 1, 2^n and 2^n + 1,
each remainder is a short, independent channel. Additions and multiplications
then run without carries between channels. Data has to be converted into this
form first. This RTL is that forward converter. It is built from adders and
gates only, with no look-up tables and no clock.

Its inputs are a 3n-bit unsigned number X and one control bit `d`. Its
outputs are:

| output | width | value |
|--------|-------|-------|
| `x1`   | n     | X mod (2^n − 1) |
| `x2`   | n     | X mod 2^n |
| `x3`   | n + 1 | X mod (2^n + 1) when `d = 1`; (X − 1) mod (2^n + 1) when `d = 0` |

The `d = 0` code is the *diminished-1* form of the 2^n + 1 residue. Modulo
2^n + 1 arithmetic units often use this form because it lets their adders be
as simple as modulo 2^n − 1 adders. Here both forms come from the same
datapath, and the single bit `d` chooses between them. In hardware, `d` would
be a strap or a switch tied to 1 or 0.

The valid input range is the dynamic range, 0 ≤ X < M = 2^(3n) − 2^n. This
is the product of the three moduli. The default is `N = 6`: moduli
{63, 64, 65}, an 18-bit input, and 6-, 6- and 7-bit outputs.

## The key identity: fold the input into three slices

Cut X into three n-bit slices, X = N2·2^(2n) + N1·2^n + N0. Then:

* **mod 2^n**: x2 = N0. This channel is wiring only.
* **mod 2^n − 1**: 2^n ≡ 1, so x1 = (N2 + N1 + N0) mod (2^n − 1).
* **mod 2^n + 1**: 2^n ≡ −1, so X ≡ N2 − N1 + N0. The one's complement of
  N1 is NOT N1 = 2^n − 1 − N1, so −N1 ≡ NOT N1 + 2 (mod 2^n + 1). The
  subtraction therefore becomes an addition of the inverted slice.

Each of the two non-trivial channels has the same shape: a carry-save adder
(CSA) row, a ripple-carry adder (CPA), and a final correction stage.

```
          N2        N1        N0
          |    +----|----+    |
          v    v    v    v    v
      CSA with EAC      CSA with EAIC  (N1 inverted on the way in)
       S |  | C           S |  | C
         v  v               v  v
        CPA, cin=1         CPA, cin=d <-- switch
     cout|  |A          cout|  |A
         o  v               v  v
      Decrementer     Selection network
           |                  |
           x1                 x3          x2 = N0
```

## Modulo 2^n − 1 channel (`mod_m1_residue_gen`)

1. **`csa_eac`**: one row of full adders. The carry out of bit i has weight
   2^(i+1). The carry out of the MSB has weight 2^n ≡ 1, so it wraps round
   into bit 0 of the carry vector (end-around carry). The result is
   N2 + N1 + N0 ≡ S + C.
2. **`cpa`**: an n-bit ripple adder with its carry-in tied to 1, so
   A = S + C + 1.
   * If it carries out, then S + C ≥ 2^n − 1. The low n bits of A are then
     S + C − (2^n − 1), which is already the residue.
   * If it does not carry out, the +1 has to be taken back.
3. **`decrementer`**: a chain of half subtractors. Its borrow-in is the
   *inverted* carry-out of the CPA. It subtracts 1 exactly when no end-around
   correction happened. The MSB cell needs no borrow out, so it is a plain XOR.

Adding 1 first and then taking it away may look wasteful. It does one job,
though: the value S + C = 2^n − 1, which is the second code for zero, comes
out as 0. Only N2 = N1 = N0 = all ones can give `x1 = 2^n − 1`, and that
input is outside the dynamic range.

## Modulo 2^n + 1 channel with embedded diminished-1 (`mod_p1_residue_gen`)

This channel is the most intricate part of the design.

1. **`csa_eaic`** adds N2, NOT N1 and N0. The MSB carry has weight 2^n ≡ −1.
   A carry c at that weight is written as (1 − c) − 1. So the carry is
   *inverted* and wrapped into bit 0 of the carry vector, and a −1 is left
   over. The row therefore gives N2 + NOT N1 + N0 ≡ S + C − 1. Adding the +2
   from the N1 complement gives:

   * X ≡ S + C + 1
   * X − 1 ≡ S + C

   The two residue forms differ only by a carry-in. That is the whole trick:
   **d is the CPA's carry-in.**
2. **`cpa`** forms the (n+1)-bit A = S + C + d, with a_n = carry-out.
   A lies in 0 … 2^(n+1) − 1.
3. **`selection_network`** reduces A into 0 … 2^n. It keeps A when A ≤ 2^n.
   Otherwise it outputs A − (2^n + 1), computed as A + (2^n − 1) with the
   carry out of bit n+1 dropped. Because 2^n − 1 is all ones, the carries of
   that addition are a running OR of A's bits:

   ```
   p_1 = a_0,  p_(i+1) = p_i | a_i          (p_n = OR of a_0..a_(n-1))
   sel = a_n & p_n                           (A > 2^n)
   x_0 = a_0 ^ sel
   x_i = (sel & ~p_i) ^ a_i                  1 <= i <= n-1
   x_n = a_n & ~p_n
   ```

   A = 2^n (a_n = 1, p_n = 0) is a valid residue and must pass through
   unchanged. This is why `sel` needs the p_n term and not just the carry.

Worked example, n = 6, X = 54425:

* The slices are N2 = 13, N1 = 18, N0 = 25.
* The CSA gives S = 111001 and C = 011011.
* With d = 1: A = 85 > 64, so x3 = 85 − 65 = 20 = 54425 mod 65.
* With d = 0: A = 84, so x3 = 19 = 54424 mod 65.

## Timing and cost

The circuit is purely combinational, so results follow the inputs after the
logic delay. In the unit-gate model (each two-input gate costs one delay and
one area unit), the channel delays are:

| channel | delay | area |
|---------|-------|------|
| 2^n − 1 | 3n + 4 | 17n − 5 |
| 2^n + 1 | 2n + 10 | 18n |

The whole encoder takes max(3n + 4, 2n + 10) delay units. The 2^n − 1
channel is the critical one from n = 6 upward. The area is about 35n − 5
gates.

After generic synthesis at N = 6, the encoder is about 200 single-bit gates.
The ripple CPAs set the delay. Swapping `cpa` for a parallel-prefix adder
with the same ports is the obvious speed-up. Adding pipeline registers
between the CSA, CPA and correction stages is another. Neither is built here.

## Files

| file | content |
|------|---------|
| `rtl/rns_encoder.sv` | top: slicing, the three channels |
| `rtl/mod_m1_residue_gen.sv` | modulo 2^n − 1 channel |
| `rtl/mod_p1_residue_gen.sv` | modulo 2^n + 1 / diminished-1 channel |
| `rtl/csa_eac.sv`, `rtl/csa_eaic.sv` | carry-save rows with end-around (inverted) carry |
| `rtl/cpa.sv` | ripple-carry adder |
| `rtl/decrementer.sv` | half-subtractor chain with XOR MSB |
| `rtl/selection_network.sv` | final modulo 2^n + 1 correction |
| `rtl/full_adder.sv` | full-adder cell used by the rows above |

Every module has one parameter, `N`, with default 6. The CSA rows refuse
N < 2. The selection network asserts that its result never exceeds 2^n.

## Verification

Each testbench checks itself against the `%` operator or exact integer
identities. Each one ends by printing `TB_RESULT checks=… failures=…`.

* `tb_csa_eac`, `tb_csa_eaic`, `tb_cpa`, `tb_decrementer`,
  `tb_selection_network`: exhaustive at N = 6. The selection-network test
  covers all three cases: A < 2^n, A = 2^n and A > 2^n.
* `tb_mod_m1_residue_gen`: every X in the dynamic range. It checks that both
  the decrement path and the end-around-carry path are used.
* `tb_mod_p1_residue_gen`: the worked example above, down to S, C and A.
  Then every X in the range with both values of d.
* `tb_rns_encoder`: the end-to-end test at default parameters.
  * It checks five reference vectors: (X, d) → (x1, x2, x3) =
    (54425, 0) → (56, 25, 19), (54425, 1) → (56, 25, 20),
    (54401, 1) → (32, 1, 61), (5345, 0) → (53, 33, 14) and
    (64, 1) → (1, 0, 64).
  * It then runs all 262,080 inputs of the range with both values of d.
  * It counts each mechanism of the datapath and fails if any one never
    occurs.
* `tb_encoder_widths`: the encoder at n = 4, 5 and 7, exhaustively, and at
  n = 8 and 10 with 200,000 random inputs each.

Running one test with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_rns_encoder tb/tb_rns_encoder.sv
./obj_dir/Vtb_rns_encoder
```

Some testbenches read internal nets through hierarchical names, for example
`dut.u_p1.cout` and `dut.s`. If you restructure the code, keep the instance
names `u_m1` and `u_p1` and the net names `s`, `c`, `a` and `cout` inside
the two channel modules.

## Departures and limits

* **Representation of d.** `d` is an ordinary input. The design intends it
  as a static setting, a switch to 1 or 0. Nothing stops it from changing per
  sample, because the datapath is combinational.
* **Placement of the wrapped-carry inversion.** In the 2^n + 1 row, the
  inversion of the wrapped carry sits at the CSA output. The published
  schematic draws it at the adder input. The signal is the same.
* **No x1 correction outside the range.** Inputs outside 0 ≤ X < M are not
  rejected. For N2 = N1 = N0 = all ones, x1 reads 2^n − 1, the second code
  for zero.
* **Timing not modelled.** Propagation delays and FPGA resource figures for
  this architecture cannot be checked in RTL simulation. Nothing here models
  them.
