// bcd_pkg: types and constants shared by the LUT-based decimal adders.
//
// A decimal digit travels as a 4-bit code: 8421 BCD (0..9) in the BCD
// adders, excess-3 (digit + 3, codes 3..12) inside the excess-3 adder.
// ADD3_THRESHOLD is the value of A1+B1 (the sum of the upper three bits of
// the two digits) from which the adding-3 correction is applied; adding 3 to
// A1+B1 is the same as adding 6 to the whole digit sum. XS3_BIAS is the
// excess-3 offset. Both numbers are the ones the design is defined by.
package bcd_pkg;

  typedef logic [3:0] bcd_digit_t;   // one 8421 BCD digit, 0..9
  typedef logic [3:0] xs3_digit_t;   // one excess-3 code, 3..12

  localparam int unsigned ADD3_THRESHOLD = 5;
  localparam int unsigned ADD3_VALUE     = 3;
  localparam int unsigned XS3_BIAS       = 3;

endpackage
