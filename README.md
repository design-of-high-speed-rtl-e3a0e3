# LUT-based decimal adders: an improved BCD digit adder and an excess-3 adder

Adding decimal digits on binary hardware needs a correction step: when the
binary sum of two BCD digits passes 9, 6 must be added to it. Done naively,
that correction sits between the carry in and the carry out of every digit.
In a multi-digit ripple adder, that delay is paid once per digit.

This design moves the correction off the carry path. It targets FPGAs with
6-input LUTs and a fast carry chain (mux + XOR per bit). Each digit is split
into its upper three bits and bit 0:

    A + B + Cin = 2*(A1 + B1) + (a0 + b0 + Cin),   A1 = a[3:1], B1 = b[3:1]

- The upper part, A1 + B1, depends only on six input bits. The "add 3 if
  A1 + B1 >= 5" correction is folded into the same 6-input function, so it
  costs one LUT level and nothing on the carry path. Adding 3 to A1 + B1 is
  the same as adding 6 to the digit.
- Bit 0 is a full adder. Its carry C1 is the only signal that depends on the
  incoming carry.
- The decimal carry out depends on C1 in exactly one case: A1 + B1 = 4.
  (Then the digit sum is 8 or 9 plus 2*C1, which may or may not pass 9.) In
  every other case the LUT already knows the carry. So one mux picks the
  carry out: C1 when A1 + B1 = 4, otherwise the LUT's top bit F4.

Carry in to carry out is therefore one full adder plus one mux per digit,
however the correction falls.

The second part of the design is an excess-3 digit adder. It encodes two
BCD digits in excess-3 (digit + 3) and adds the two codes with the same
improved digit adder.

## Files

| file | module | what it is |
|---|---|---|
| `rtl/bcd_pkg.sv` | package | digit types, the correction threshold (5), the correction value (3) and the excess-3 bias (3) |
| `rtl/add3_lut.sv` | `add3_lut` | the 6-input function F = A1+B1, or A1+B1+3 when A1+B1 >= 5 |
| `rtl/bcd_digit_adder.sv` | `bcd_digit_adder` | one improved BCD digit |
| `rtl/bcd_adder.sv` | `bcd_adder` | DIGITS digits in carry ripple (default 18) |
| `rtl/xs3_encode.sv` | `xs3_encode` | BCD digit to excess-3 code |
| `rtl/xs3_adder.sv` | `xs3_adder` | excess-3 digit adder |
| `rtl/xs3_adder_top.sv` | `xs3_adder_top` | top: `bcd_adder` and `xs3_adder` side by side |

Every module is purely combinational. There is no clock, no reset and no
register anywhere. Each output settles after the logic's propagation delay.

## The digit adder in detail (`bcd_digit_adder`)

Signals follow the names used in the structure:

    F4 F3 F2 F1 = add3_lut(A1, B1)        # A1+B1, or A1+B1+3 when A1+B1 >= 5
    F0, C1      = full_add(a0, b0, Cin)

    C2 = F1 ? C1 : 0      S1' = F1 xor C1     # carry-chain stages: mux + XOR,
    C3 = F2 ? C2 : 0      S2  = F2 xor C2     # with the mux's 0-input tied to 0
                          S3' = F3 xor C3

    sel  = (A1+B1 == 4)  = F3 & ~F4
    Cout = sel ? C1 : F4
    kill = sel & C1
    S3 = S3' & ~kill,  S1 = S1' & ~kill,  S0 = F0

The chain adds C1 to F3 F2 F1. Here is why the result is right in each case
(the digit total is T = 2(A1+B1) + 2*C1 + F0):

| A1+B1 | F | carry out | sum digit |
|---|---|---|---|
| 0..3 | A1+B1 (F4 = F3 = 0) | F4 = 0 | (F3F2F1 + C1)*2 + F0 = T, at most 9 |
| 4, C1 = 0 | 0100 | C1 = 0 | 8 + F0 |
| 4, C1 = 1 | 0100 | C1 = 1 | the chain would give 1010 + F0. S3 and S1 are cleared, giving F0 = T - 10 |
| 5..8 | A1+B1+3 = 8..11, so F4 = 1 and F3F2F1 = A1+B1-5 | F4 = 1 | (A1+B1-5+C1)*2 + F0 = T - 10 |

The path from `cin` to `cout` is the full adder's carry plus the `sel` mux.
The carry chain only feeds the sum bits.

**Where this implementation chooses.** The mux select is F3 & ~F4. The
condition is "A1+B1 = 4". For BCD operands F3 = 1 only happens in that case,
so a bare F3 would do. F3 & ~F4 also stays correct for the larger codes the
excess-3 adder feeds in (A1+B1 = 9 gives F = 1100). The forcing signal is
that condition ANDed with C1.

**The LUT beyond BCD.** For BCD digits A1 and B1 are at most 4, so most of
the 64 LUT entries are don't-cares. `add3_lut` applies the same rule to all
of them, truncated to four bits. With that, the digit adder is exact for
any pair of 4-bit operands whose total is at most 19 and whose A1+B1 is at
most 12. Excess-3 codes (3..12) need exactly this.

## Multi-digit adder (`bcd_adder`)

`DIGITS` digit adders are chained, `cout` of digit i to `cin` of digit i+1.
Operands are packed BCD, least significant digit in bits [3:0]. The design
was evaluated at sizes from 2 to 18 digits. The default is 18, and any size
can be set with the parameter.

The worst-case path is a carry that enters digit 0 and crosses every digit.
That happens when each digit pair sums to exactly 9 and `cin` = 1. It costs
`DIGITS` full-adder-plus-mux delays.

## Excess-3 adder (`xs3_adder`)

Ports: `a`, `b` (BCD digits), `sum` (BCD digit), `cout`. There is no carry
in.

Both digits are encoded (+3). The two codes go into one `bcd_digit_adder`
with carry in 0. That adder's decimal correction turns the sum of the codes
into BCD. The output is the decimal value of (a+3) + (b+3) = a + b + 6,
written as a tens bit and a units digit. Examples:

| a | b | codes | code sum | cout, sum |
|---|---|---|---|---|
| 4 | 3 | 0111 + 0110 | 13 | 1, 3 |
| 7 | 6 | 1010 + 1001 | 19 | 1, 9 |
| 2 | 3 | 0101 + 0110 | 11 | 1, 1 |

Note that the output is not an excess-3 coded result, and it is not a + b.
It is the BCD form of the sum of the two excess-3 codes.

**Range limit.** One carry bit represents results up to 19. So the adder
is exact only for a + b <= 13. For a + b from 14 to 18 the true result
(20..24) needs a tens digit of 2, and the outputs are not meaningful. Nothing
flags this case. Callers must keep operands in range, or widen the carry if
they need the full range (that would be an extension of this design).

## Top (`xs3_adder_top`)

The top holds the `DIGITS`-digit BCD adder (ports `bcd_*`) and the
excess-3 digit adder (ports `xs3_*`). They share no logic and no signals.

## Resource and speed figures

On a Virtex-6 class FPGA, the design this RTL follows was reported at:

- 10 LUTs and 9.18 ns for one improved digit, against 12 LUTs and 10.2 to
  11.3 ns for conventional and double-dabble BCD digits.
- 19 LUTs and 11.77 ns for the excess-3 adder.

Those figures were not reproduced with this RTL. `add3_lut` is written as
an add and a compare, not as a LUT INIT string. A synthesis tool is expected
to map each of its four outputs to one 6-input LUT. To get the carry-chain
mapping the design relies on (MUXCY/XORCY style), you may need to
instantiate vendor carry primitives in place of the behavioural mux/XOR
expressions in `bcd_digit_adder`.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. Each has a
watchdog. Expected values always come from integer arithmetic, never from
the RTL's own formulas.

| testbench | covers |
|---|---|
| `tb_add3_lut` | the 12 published truth-table rows, plus every A1,B1 pair with A1+B1 <= 12 |
| `tb_bcd_digit_adder` | the published simulation sequence, plus all 200 digit/carry combinations. Fails unless both the add-3 case and the forced-zero case occur |
| `tb_bcd_adder` | one instance per size from 2 to 18 digits (18 at the default), with 2000 random vectors and directed full-length ripples |
| `tb_xs3_encode` | all ten digits |
| `tb_xs3_adder` | both worked examples, the published simulation sequence, and every pair with a+b <= 13 |
| `tb_xs3_adder_top` | the top at default size, with 3000 random and directed vectors on both adders. Counts the add-3 correction, the forced-zero case, a full 18-digit ripple, carry out, and excess-3 results with and without carry. Fails if any of these never happens |

Run one with Verilator 5, for example:

    verilator --binary --timing --assert -Wno-fatal \
        rtl/bcd_pkg.sv rtl/*.sv tb/tb_xs3_adder_top.sv --top-module tb_xs3_adder_top
    ./obj_dir/Vtb_xs3_adder_top

Every testbench finishes in well under a second.

## Departures and open points

- The select of the carry-out mux and the driver of the forcing gates are
  derived from the stated conditions, not from a drawn netlist (see above).
- The excess-3 adder's structure (two +3 encoders into one improved digit
  adder) is the simplest one that gives the published results. Its range
  limit (a + b <= 13) comes from that structure.
- Only the improved adder is built. The conventional, double-dabble and
  earlier LUT-based BCD digit adders it was compared against are not part
  of this RTL.
