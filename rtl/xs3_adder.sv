// xs3_adder: excess-3 addition of two decimal digits using the improved
// BCD adder.
//
// Both BCD input digits are first turned into excess-3 codes (a+3, b+3) by
// xs3_encode, then the two codes are added by one bcd_digit_adder, whose
// decimal correction (adding 6 when the sum passes 9) turns the sum of the
// codes into BCD. The result is the BCD value of (a+3) + (b+3) = a + b + 6:
// 4 + 3 gives 13 (cout = 1, sum = 3), 7 + 6 gives 19 (cout = 1, sum = 9).
//
// A single decimal carry can hold results up to 19, so the adder is exact
// for a + b <= 13. For a + b >= 14 the result (20..24) needs a tens digit of
// 2, which this structure does not provide; the outputs are then not
// meaningful. Excess-3 codes above 9 are outside what the BCD adder was
// defined for; its LUT stage applies the same rule to them (see add3_lut),
// which keeps every result up to 19 exact.
//
// The ports are those of the adder's simulation: a, b, sum, cout; there is
// no carry input. Combinational.
module xs3_adder
  import bcd_pkg::*;
(
  input  bcd_digit_t a,     // BCD digit, 0..9
  input  bcd_digit_t b,     // BCD digit, 0..9
  output bcd_digit_t sum,   // BCD units digit of (a+3)+(b+3)
  output logic       cout   // BCD tens digit (0 or 1) of (a+3)+(b+3)
);

  xs3_digit_t xa, xb;

  xs3_encode u_enc_a (.d(a), .x(xa));
  xs3_encode u_enc_b (.d(b), .x(xb));

  bcd_digit_adder u_add (
    .a    (xa),
    .b    (xb),
    .cin  (1'b0),
    .s    (sum),
    .cout (cout)
  );

endmodule
