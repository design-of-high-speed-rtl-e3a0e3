// tb_xs3_encode: self-checking test of the BCD to excess-3 encoder.
// Every BCD digit is applied; the code must be the digit plus three
// (0 -> 0011, 9 -> 1100).
module tb_xs3_encode;

  import bcd_pkg::*;

  logic       clk = 1'b0;
  bcd_digit_t d;
  xs3_digit_t x;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  xs3_encode dut (.d(d), .x(x));

  initial begin
    for (int i = 0; i <= 9; i++) begin
      d = 4'(i);
      @(posedge clk);
      checks++;
      if (int'(x) != i + 3) begin
        failures++;
        $display("FAIL digit %0d: code %b, expected %0d", i, x, i + 3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
