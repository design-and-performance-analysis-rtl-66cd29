# Multi-digit BCD adder with Brent–Kung digit adders

Decimal arithmetic, as used in financial and commercial computing, stores numbers as Binary Coded
Decimal (BCD): each decimal digit takes 4 bits and holds only the codes 0000 to 1001. Adding two
such numbers with a plain binary adder gives wrong results whenever a digit sum passes 9. This
design adds two 32-digit (128-bit) BCD numbers. Each digit is added in binary by a 4-bit
**Brent–Kung** parallel-prefix adder. The result is then checked and brought back into the BCD
range by adding 6. The decimal carries ripple from digit to digit.

The RTL is combinational SystemVerilog: it has no clock, no registers and no reset. A sum appears
once the logic has settled.

## Top level: `bcd_adder_bka`

```
            A[127:0]  B[127:0]
               |         |
   Cout <- [digit 31] <- ... <- [digit 1] <- [digit 0] <- Cin
               |                   |            |
          Sum[127:31*4]       Sum[7:4]      Sum[3:0]
```

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `A`, `B` | in | 4·`N_DIGITS` | operands, packed BCD, digit 0 in bits 3:0 |
| `Cin` | in | 1 | decimal carry into digit 0 |
| `Sum` | out | 4·`N_DIGITS` | packed BCD sum |
| `Cout` | out | 1 | decimal carry out of the top digit |

`N_DIGITS` defaults to 32. Setting it to 8 gives the 8-digit (32-bit) version, which is the
smaller of the two sizes the design was evaluated at. Because of the packing, a BCD number reads
as its hex value: decimal 1995 is `16'h1995`.

The adder is a chain of `N_DIGITS` instances of `bcd_digit_adder`, named `g_digit[k].d`. The
decimal carry of digit k is the carry in of digit k+1. There is no lookahead between digits. The
prefix logic shortens the path inside each digit, but the worst case still passes through every
digit. For example, 99…9 + 0 with `Cin`=1 carries through all 32 digits.

## One digit: binary add, detect, correct (`bcd_digit_adder`)

```
 a ─┐                      ┌────────────────────┐
 b ─┤ bk_adder4 (u_bin) ───┤ bin_sum            │
cin─┘   bin_sum, bin_cout  │ bcd_invalid_detect ├── invalid ──> cout
                           └────────────────────┘      │
          bin_sum ─┐                                   v
   {0,inv,inv,0} ──┤ bk_adder4 (u_corr), cin = 0 ──> sum (carry out unused)
```

1. **Binary addition.** `u_bin` adds the two digits and `cin`. The result is between 0 and 19.
2. **Detection** (`bcd_invalid_detect`). The result is not a valid digit if the 4-bit adder
   carried out (16 to 19) or if the 4-bit sum is 1010 to 1111. A 4-bit value is above 9 exactly
   when bit 3 is set together with bit 2 or bit 1. So the flag is
   `invalid = bin_cout | s3&s2 | s3&s1`. It fires for 22 of the 32 possible values, and it is
   also the digit's decimal carry out.
3. **Correction.** A second `bk_adder4` adds `0110` when the flag is set and `0000` otherwise. Its
   carry in is tied to 0. Adding 6 makes the 4-bit sum wrap past 15, which is the same as
   subtracting 10. The wrap's carry out is the overflow the correction causes on purpose, so it
   is dropped.

Worked example: 9 + 5. The binary sum is 1110 (14), so the flag is set. 1110 + 0110 = 1 0100.
Dropping the carry leaves 0100, so the digit is 4 with carry 1: the result is 14.

Worked example: 9 + 9 + 1. The binary sum is 1 0011 (19); the carry out sets the flag. 0011 + 0110
= 1001, so the digit is 9 with carry 1: the result is 19.

The critical path through one digit is two 4-bit prefix adders plus the two-level detection
logic.

## The 4-bit Brent–Kung adder (`bk_adder4`, `bk_prefix_cell`)

A parallel-prefix adder works with (propagate, generate) pairs. A pair describes a span of bits:
*p* means a carry entering the span leaves it, and *g* means the span makes a carry by itself.
The adder has three stages.

**Pre-processing.** For each bit, `g = a & b` and `p = a ^ b`.

**Prefix network.** `bk_prefix_cell` merges the pair of an upper span (`hi`) with that of the
adjacent lower span (`lo`):

```
out.p = hi.p & lo.p
out.g = hi.g | (hi.p & lo.g)
```

The Brent–Kung tree for 4 bits uses four cells in two levels:

```
bit:      3        2        1        0
          |        |        |        |
level 1: (3:2)=3o2 |       (1:0)=1o0 |
          |        |        |        |
level 2: (3:0)=(3:2)o(1:0)  |        |
                (2:0)=2o(1:0)        |
outputs: (3:0)   (2:0)    (1:0)    (0:0)
```

A Kogge–Stone tree would also reach depth 2 at this width, but it needs more cells. Brent–Kung
keeps the cell count and fan-out low.

**Post-processing.** The tree has no carry input. `cin` is folded in after the tree. The carry
into bit i+1 is `G(i:0) | P(i:0) & cin`, and the carry into bit 0 is `cin`. Each sum bit is
`p_i ^ carry_i`. `cout` is the carry into bit 4.

The pair type `pg_t` (a packed struct `{p, g}`) and the constants live in `bcd_pkg`.

## Files

| File | Contents |
|------|----------|
| `rtl/bcd_pkg.sv` | `pg_t`, `bcd_digit_t`, `BCD_BITS`, `BCD_CORRECTION` |
| `rtl/bk_prefix_cell.sv` | prefix operator |
| `rtl/bk_adder4.sv` | 4-bit Brent–Kung adder |
| `rtl/bcd_invalid_detect.sv` | invalid-digit flag / decimal carry |
| `rtl/bcd_digit_adder.sv` | one-digit BCD adder |
| `rtl/bcd_adder_bka.sv` | N-digit adder, top level |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_bcd_workloads` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bcd_pkg.sv tb/tb_bcd_adder_bka.sv \
          --top-module tb_bcd_adder_bka -Mdir obj_top
./obj_top/Vtb_bcd_adder_bka
```

Replace the testbench name to run another one. `-Irtl` lets Verilator find each module by its
file name.

| Testbench | What it covers |
|-----------|----------------|
| `tb_bk_prefix_cell` | all 16 input codes of the prefix cell |
| `tb_bk_adder4` | all 512 combinations of a, b and cin, compared with a+b+cin |
| `tb_bcd_invalid_detect` | all 32 values of {carry, sum}: flag ⇔ value > 9 |
| `tb_bcd_digit_adder` | all 200 valid digit pairs × cin, with each correction case counted |
| `tb_bcd_adder_bka` | default 32-digit top (see below) |
| `tb_bcd_workloads` | 8-digit and 32-digit instances side by side, 3000 random sums each, plus the carry worst cases |

`tb_bcd_adder_bka` runs the top at its default size with no parameter overrides. It applies these
inputs:

- four reference additions: 1+2, 9+5, 12345678901234567890123456789012 + 32 ones, and 9+9 with
  carry in;
- a carry that ripples through all 32 digits;
- all zeros and all nines;
- 5000 random additions.

Results are checked against a digit-by-digit integer model. It also counts five events and fails
if any never occurs:

- a digit corrected from 10 to 15;
- a digit corrected after a binary carry out;
- `Cin` = 1;
- `Cout` = 1;
- a full-length ripple.

Every test runs in well under a second.

## Design choices and limits

What comes from the original design:

- the three-stage 4-bit Brent–Kung adder with its prefix equations;
- the two-adder digit stage, with detection between the adders and a +6 correction;
- the second adder's carry in tied to 0;
- the ripple cascade of digits;
- the 32-digit size and the port names.

Choices made here:

- **Carry in of the prefix adder.** It is added after the tree, through the group propagate. The
  tree itself has only the four bit inputs.
- **Detection gates.** The flag is the sum-of-products form given above. Only the condition was
  specified, not the gates.
- **Digit order.** Digit 0 sits in the low nibble, so BCD numbers read as hex.
- **Digit-count parameter.** `N_DIGITS` is added so the 8-digit version comes from the same RTL.
- **No registers.** The adder is purely combinational. Add input or output registers around
  `bcd_adder_bka` if it sits on a clocked path.
- **Invalid inputs.** Inputs are assumed to be valid BCD. Codes 1010 to 1111 on an input give a
  deterministic result that is not meaningful, and nothing checks for them.

Delay and power depend on the target technology and cannot be judged from RTL simulation. The
reported figures for the 32-digit version were 1.57 ns and 110.881 mW, against 2.01 ns and
123.218 mW for a carry-lookahead based BCD adder. That comparison adder is not part of this RTL.
