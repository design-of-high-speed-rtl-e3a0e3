// xs3_adder_top: the two adders of this design side by side.
//
// - An N-digit carry-ripple BCD adder made of improved 1-digit BCD adders
//   (bcd_adder, DIGITS digits, default 18).
// - The excess-3 digit adder (xs3_adder), which encodes two BCD digits in
//   excess-3 and adds the codes with one improved BCD digit adder.
// The two share no signals; each has its own ports, prefixed bcd_ and xs3_.
// Grouping them in one top is this implementation's arrangement.
// Everything is combinational: outputs follow the inputs after the adders'
// propagation delay, with no clock or reset.
module xs3_adder_top
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = 18
) (
  // N-digit BCD adder
  input  logic [4*DIGITS-1:0] bcd_a,
  input  logic [4*DIGITS-1:0] bcd_b,
  input  logic                bcd_cin,
  output logic [4*DIGITS-1:0] bcd_sum,
  output logic                bcd_cout,
  // excess-3 digit adder
  input  bcd_digit_t          xs3_a,
  input  bcd_digit_t          xs3_b,
  output bcd_digit_t          xs3_sum,
  output logic                xs3_cout
);

  bcd_adder #(.DIGITS(DIGITS)) u_bcd (
    .a    (bcd_a),
    .b    (bcd_b),
    .cin  (bcd_cin),
    .sum  (bcd_sum),
    .cout (bcd_cout)
  );

  xs3_adder u_xs3 (
    .a    (xs3_a),
    .b    (xs3_b),
    .sum  (xs3_sum),
    .cout (xs3_cout)
  );

endmodule
