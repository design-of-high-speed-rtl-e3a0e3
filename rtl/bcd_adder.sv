// bcd_adder: N-digit carry-ripple BCD adder.
//
// DIGITS copies of bcd_digit_adder are chained, the decimal carry of digit
// i feeding the carry input of digit i+1. Because each digit's Cin -> Cout
// path is only the bit-0 full adder and one mux, the ripple delay grows by
// that much per digit. The design was evaluated from 2 to 18 digits; the
// default here is the largest of those, 18.
//
// Interface: a, b are packed BCD numbers, digit i in bits [4i+3:4i]
// (least significant digit at the bottom); cin is the carry into digit 0;
// sum is the packed BCD sum and cout the carry out of the top digit.
// The ripple of digit adders follows the design; the digit packing order
// is this implementation's choice. Combinational.
module bcd_adder
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = 18
) (
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  input  logic                cin,
  output logic [4*DIGITS-1:0] sum,
  output logic                cout
);

  logic [DIGITS:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    bcd_digit_adder u_digit (
      .a    (a[4*i +: 4]),
      .b    (b[4*i +: 4]),
      .cin  (carry[i]),
      .s    (sum[4*i +: 4]),
      .cout (carry[i+1])
    );
  end

  assign cout = carry[DIGITS];

endmodule
