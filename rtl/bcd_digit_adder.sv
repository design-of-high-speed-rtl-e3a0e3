// bcd_digit_adder: improved 1-digit BCD adder on the 6-LUT / fast carry
// chain structure.
//
// Each digit is split into its upper three bits and bit 0:
//     A + B + Cin = 2*(A1 + B1) + (a0 + b0 + Cin)
// Bit 0 is a plain full adder giving F0 (the final S0) and its carry C1.
// The upper bits go through add3_lut, which returns F4..F1 = A1+B1, plus 3
// when A1+B1 >= 5. C1 is then added to F3 F2 F1 by a carry chain of three
// stages, each an XOR for the sum bit and a 2:1 mux for the carry; the mux's
// 0-input is the constant 0, since the only thing added is C1:
//     C2 = F1 ? C1 : 0      S1' = F1 ^ C1
//     C3 = F2 ? C2 : 0      S2  = F2 ^ C2
//                           S3' = F3 ^ C3
// The decimal carry is not taken from this chain. One mux picks it:
// C1 when A1+B1 = 4 (the only case whose decimal carry depends on C1),
// F4 otherwise. That keeps Cin -> Cout to the full adder plus one mux,
// which is the point of the design. When A1+B1 = 4 and C1 = 1 the digit
// sum is 10 + F0, so S3 and S1 are forced to 0 through an AND gate with
// one inverted input each.
//
// Which sum selects C1: the design states it as A1+B1 = 4 and notes that
// F3 = 1 there. For BCD operands F3 = 1 happens only then; here the select
// is F3 & ~F4, which is the same for BCD operands and stays right when the
// excess-3 adder feeds codes up to 12 (A1+B1 = 9 gives F = 1100).
//
// Interface: a, b are BCD digits (0..9), cin the incoming decimal carry;
// s is the BCD sum digit, cout the decimal carry. Combinational.
module bcd_digit_adder
  import bcd_pkg::*;
(
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  input  logic       cin,
  output bcd_digit_t s,
  output logic       cout
);

  logic [3:0] f;          // F4 F3 F2 F1 from the LUT stage
  logic       f0, c1;     // full adder on bit 0
  logic       c2, c3;     // carries of the chain adding C1 to F3..F1
  logic       sel_c1;     // A1 + B1 = 4
  logic       force0;     // A1 + B1 = 4 and C1 = 1: clear S3 and S1

  add3_lut u_lut (
    .a_hi (a[3:1]),
    .b_hi (b[3:1]),
    .f    (f)
  );

  always_comb begin
    // bit 0 full adder
    f0 = a[0] ^ b[0] ^ cin;
    c1 = (a[0] & b[0]) | (cin & (a[0] ^ b[0]));

    // carry chain: mux per stage, '0' on the 0-input
    c2 = f[0] ? c1 : 1'b0;
    c3 = f[1] ? c2 : 1'b0;

    // decimal carry
    sel_c1 = f[2] & ~f[3];
    cout   = sel_c1 ? c1 : f[3];

    // sum bits with the forcing AND gates on S3 and S1
    force0 = sel_c1 & c1;
    s[0]   = f0;
    s[1]   = (f[0] ^ c1) & ~force0;
    s[2]   = f[1] ^ c2;
    s[3]   = (f[2] ^ c3) & ~force0;
  end

endmodule
