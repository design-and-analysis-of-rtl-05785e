# Sign detector for the residue number system {2^n-1, 2^n, 2^n+1}

A residue number system (RNS) stores an integer X as its remainders modulo a
set of co-prime moduli. Here the moduli are m1 = 2^n-1, m2 = 2^n and
m3 = 2^n+1, so X is held as three small residues

    x1 = X mod (2^n-1)   (n bits)
    x2 = X mod 2^n       (n bits)
    x3 = X mod (2^n+1)   (n+1 bits)

and the dynamic range is M = (2^n-1)·2^n·(2^n+1). Addition and multiplication
work on each residue on its own, with no carries between channels. The sign
does not: in the usual signed reading, X is negative when X >= M/2, and
whether X is below or above M/2 depends on all three residues together.
Converting back to binary just to read one bit is slow and costly.

This design returns that bit with one carry-save adder row and two small
prefix trees, with no multipliers and no lookup tables. At n = 8 it is a
combinational circuit of roughly a hundred logic gates.

The circuit follows the mixed-radix-conversion sign detector in "Design and
analysis of RNS-based sign detector for moduli set {2^n, 2^n-1, 2^n+1}"
(R. Kumar, R. A. Mishra). Its structure comes from that article:
- the operand formation,
- the three-block datapath,
- the carry generator tree,
- the MSB-only prefix adder.

This RTL adds its own choices. The width is a parameter, the tree shape is
defined for any width, and the port names are its own. See "Choices made in
this RTL" below.

## Why one digit carries the sign

Mixed radix conversion writes X as

    X = z3·(m3·m1) + z2·m3 + z1,    0 <= z1 < m3,  0 <= z2 < m1,  0 <= z3 < 2^n

The top digit z3 counts whole multiples of m3·m1. The threshold

    M/2 = 2^(n-1) · m3 · m1

is itself a whole multiple of m3·m1. So X >= M/2 exactly when z3 >= 2^(n-1),
which means the sign of X is the most significant bit of z3. The detector
never forms X. It forms only bit n-1 of z3.

## Getting z3 from the residues

Each digit follows by reducing the expansion of X modulo one of the moduli.

- **z1.** Modulo m3, the z1 term is the only one left, so z1 = x3.
- **z2.** Modulo m1 = 2^n-1, we have m3 ≡ 2, so x1 ≡ 2·z2 + x3. Multiplying by
  2^(n-1) (the inverse of 2 modulo 2^n-1) gives
  z2 = |2^(n-1)·x1 − 2^(n-1)·x3| mod (2^n-1).
  Multiplying by a power of two modulo 2^n-1 is a rotation, so both products
  are plain wiring:
  - `x1_hat  = {x1[0], x1[n-1:1]}`. This is x1 rotated right by one bit.
  - `x3_hat' = {x3[0] | x3[n], x3[n-1:1]}`. First x3 is reduced modulo 2^n-1:
    bit n has weight 2^n ≡ 1, so it is ORed into bit 0. It cannot add, because
    x3 = 2^n is the only code with bit n set, and then the low bits are zero.
    Then the result is rotated.

  In ones'-complement arithmetic the subtraction becomes
  `x1_hat + ~x3_hat' + Co`, where the end-around carry is
  `Co = 1` when `x1_hat + ~x3_hat' >= 2^n − 1`.
- **z3.** Modulo m2 = 2^n, we have m3·m1 ≡ −1 and m3 ≡ 1, so
  x2 ≡ −z3 + z2 + x3. Solving for z3, putting in z2, and using
  −x2 = ~x2 + 1 gives, after the constants cancel:

      z3 = | x1_hat + ~x2 + x3_hat' + x3[0] + Co |  mod 2^n

  The cancellation uses the identity
  `x3[n-1:0] + ~x3_hat' ≡ x3_hat' + x3[0] − 1 (mod 2^n)`. It holds because
  `2·x3_hat' mod 2^n` is x3 with bit 0 cleared.

The output sign is bit n-1 of this sum.

## Datapath

```
 x1_hat   ~x2   x3_hat'                 x1_hat   ~x3_hat'
    |      |      |                        |         |
 +---------------------+             +-------------------+
 |  n-bit carry-save   |             |  carry generator  |
 |  adder   (sd_csa)   |             |  (sd_carry_gen)   |
 +---------------------+             +-------------------+
   C[n-1:1]   |  S                            | Co
      |  x3[0]|                               |
      v   v   v                               |
   C' = {C, x3[0]}, S                         |
 +---------------------------------------------------+
 |  MSB-only parallel prefix adder   (sd_mppa)       |
 +---------------------------------------------------+
                        |
                      x_msb  (1 = negative)
```

- **sd_csa** reduces the three n-bit operands to a sum vector S and a carry
  vector C. Only the result modulo 2^n matters, so the carry out of the top
  position is not formed. The weight-1 slot of C is always empty, so x3[0],
  the fourth addend, goes there. The fifth addend, Co, becomes the carry into
  the final adder.
- **sd_carry_gen** computes Co in parallel with the CSA, so the two paths
  overlap.
- **sd_mppa** adds S + C' + Co but builds only the carry into position n-1:

      carry = G[n-2:0] | (P[n-2:0] & Co)
      x_msb = S[n-1] ^ C'[n-1] ^ carry

The critical path runs through one full adder, a prefix tree of
ceil(log2(n-1)) merge levels, and two gates. It is about the same as a
single n-bit parallel prefix adder.

## The two prefix trees

Both trees use the same generate/propagate cells. They are in
`rns_sd_pkg.sv` and `sd_pg_tree.sv`:

    g_i = a_i & b_i        p_i = a_i | b_i
    merge(hi, lo):  g = g_hi | (p_hi & g_lo),   p = p_hi & p_lo

The OR propagate gives the same carries as an XOR propagate. It also makes
the carry generator cheap. For the whole n-bit field:
- G = 1 means a + b >= 2^n.
- G = 0 with P = 1 means every position holds exactly one 1, so a + b is
  exactly 2^n − 1.

So `Co = G | P`. The tree builds only the group term of the whole field, which
takes n−1 merge cells and no inner carries.

The tree merges neighbouring nodes in pairs, level by level, starting at the
least significant end. A node left without a partner moves up one level
unchanged. For n = 8 this gives pairs, then nibbles, then the whole byte. For
the 7 low bits in the adder it gives (6)(5:4)(3:2)(1:0), then (6:4)(3:0), then
(6:0). Those are the shapes of the published n = 8 circuit.

## Worked example (n = 8)

The moduli are {255, 256, 257} and M = 16 776 960. Take X_s = −440, which is
X = 16 776 520. Its residues are {70, 72, 74}.

- x1_hat = 0010 0011 and x3_hat' = 0010 0101.
- x1_hat + ~x3_hat' = 72 < 255, so Co = 0.
- ~x2 = 1011 0111 and x3[0] = 0.
- z3 = 0x23 + 0xB7 + 0x25 = 0xFF. Its MSB is 1, so X is negative.

The end-to-end testbench checks this case, including the intermediate
operands.

## Interface and parameters

`rns_sign_detector #(parameter int unsigned N = 8)`

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `x1`    | in  | N     | residue modulo 2^N−1, must be 0 … 2^N−2 |
| `x2`    | in  | N     | residue modulo 2^N |
| `x3`    | in  | N+1   | residue modulo 2^N+1, must be 0 … 2^N |
| `x_msb` | out | 1     | 1 when X >= M/2 (negative), else 0 |

- The block is purely combinational, with no clock and no reset. Register the
  inputs or the output if it sits in a pipelined path.
- N may be any value >= 2. The design has been simulated at
  N = 4, 8, 12, 16, 24 and 32.
- Input codes outside the residue ranges, x1 = 2^N−1 or x3 > 2^N, do not stand
  for any X, and the output for them has no meaning.

## Files

| file | contents |
|------|----------|
| `rtl/rns_sd_pkg.sv` | generate/propagate type and the cell and merge functions |
| `rtl/sd_pg_tree.sv` | binary group generate/propagate reduction of any width |
| `rtl/sd_csa.sv` | n-bit carry-save adder with the top carry dropped |
| `rtl/sd_carry_gen.sv` | end-around carry Co of the modulo 2^n−1 subtraction |
| `rtl/sd_mppa.sv` | prefix adder that returns only the MSB |
| `rtl/rns_sign_detector.sv` | top: operand wiring and the three blocks |
| `tb/tb_sd_csa.sv`, `tb/tb_sd_carry_gen.sv`, `tb/tb_sd_mppa.sv` | block tests |
| `tb/tb_rns_sign_detector.sv` | exhaustive end-to-end test at n = 8 |
| `tb/tb_rns_sign_detector_sizes.sv`, `tb/sd_size_checker.sv` | tests at n = 4, 12, 16, 24, 32 |

## Verification

Every testbench is self-checking. Its expected values come from plain
integer arithmetic, never from the mixed-radix formulas the hardware uses.
Each prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- **tb_rns_sign_detector** sweeps every X in [0, M) at n = 8, all 16 776 960
  values, plus the worked example. For each X it computes the residues with
  `%` and expects `X >= M/2`. It also counts how often each path through the
  datapath is used:
  - Co = 0 and Co = 1
  - x3 = 2^n
  - x3[0] filling C'[0]
  - the MSB carry coming from the group generate, and coming from Co through
    the group propagate

  It fails if any of these never occurs. It runs in about 3 s.
- **tb_rns_sign_detector_sizes** sweeps all of n = 4. For n = 12, 16, 24 and 32
  it applies the range boundaries plus 20 000 random values each, using
  128-bit arithmetic.
- The block tests check the CSA, the carry generator and the MSB adder
  against integer sums. Each runs exhaustively at n = 8 and at an odd width,
  and with random inputs at a larger width. The random cases are steered so
  that the all-ones sum and the carry-through-propagate case occur.

All of these pass. To run one with Verilator:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/rns_sd_pkg.sv \
          tb/tb_rns_sign_detector.sv --top-module tb_rns_sign_detector
./obj_dir/Vtb_rns_sign_detector
```

## Choices made in this RTL

These points are not fixed by the published design and were chosen here.

- **Width parameter.** The width is a parameter, N, with default 8, the size
  of the published worked example and circuit drawings. The published
  circuit is also sized for n = 4, 12, 16, 24 and 32.
- **Tree shape.** For widths that are not a power of two, the tree shape is
  the pairing rule described above. The published drawings show n = 8 only.
- **Gate equations.** The cell equations (AND generate, OR propagate) and
  `Co = G | P` were chosen because they produce the required functions: the
  end-around carry condition `sum >= 2^n−1`, and bit n−1 of the final sum.
- **CSA cells.** The CSA is a row of ordinary full adders. The published
  design gives its function, not its cells.
- **Timing.** No registers, clock or reset were added. The published circuit
  is combinational.
- **Names.** The port names are `x1`, `x2`, `x3` and `x_msb`.
