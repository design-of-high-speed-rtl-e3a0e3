// add3_lut: 3-bit adder with the adding-3 correction merged into one
// 6-input function (one 6-input LUT per output bit on an FPGA).
//
// The BCD digits A and B are split as A = 2*A1 + a0, B = 2*B1 + b0. This
// block sees only A1 = a(3:1) and B1 = b(3:1) and returns
//     F = A1 + B1          when A1 + B1 < 5
//     F = A1 + B1 + 3      when A1 + B1 >= 5
// as the 4-bit value F4 F3 F2 F1. Adding 3 to A1+B1 adds 6 to the digit
// sum, the usual BCD correction; whether the low bit's carry C1 also needs
// it is resolved later by the carry chain in bcd_digit_adder.
//
// For BCD operands A1 and B1 are at most 4, so F covers 0..4 and 8..11.
// Entries with A1+B1 up to 12 (excess-3 operands up to 12) still fit in four
// bits and follow the same rule; larger sums belong to no operand this
// design accepts and are truncated to four bits.
//
// Purely combinational, no clock.
module add3_lut
  import bcd_pkg::*;
(
  input  logic [2:0] a_hi,  // A1 = a(3:1)
  input  logic [2:0] b_hi,  // B1 = b(3:1)
  output logic [3:0] f      // F4 F3 F2 F1
);

  logic [3:0] s;

  always_comb begin
    s = {1'b0, a_hi} + {1'b0, b_hi};
    if (s >= 4'(ADD3_THRESHOLD))
      f = s + 4'(ADD3_VALUE);
    else
      f = s;
  end

endmodule
