// xs3_encode: BCD digit to excess-3 code.
//
// The excess-3 code of a decimal digit d is d + 3, so 0..9 map to 3..12.
// The design gives only this function; the plain add is this
// implementation's choice of circuit.
// Written as a 4-bit add of the constant; on an FPGA each output bit is a
// 4-input function, four LUTs per digit. Inputs above 9 are not BCD and
// wrap modulo 16. Combinational.
module xs3_encode
  import bcd_pkg::*;
(
  input  bcd_digit_t d,   // BCD digit, 0..9
  output xs3_digit_t x    // excess-3 code, 3..12
);

  assign x = d + 4'(XS3_BIAS);

endmodule
