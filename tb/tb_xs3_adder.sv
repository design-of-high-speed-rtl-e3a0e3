// tb_xs3_adder: self-checking test of the excess-3 digit adder.
//
// Applies the two worked examples (4 + 3 -> 13, 7 + 6 -> 19), the operand
// sequence of the adder's published simulation ((2,3) -> 11, (4,3) -> 13,
// (4,2) -> 12, (3,2) -> 11), then every pair of BCD digits with a + b <= 13,
// the range a single decimal carry can represent. Expected values:
// t = (a+3) + (b+3), cout = t / 10, sum = t mod 10. Counts results with and
// without a decimal carry and fails if either never occurs.
module tb_xs3_adder;

  import bcd_pkg::*;

  logic       clk = 1'b0;
  bcd_digit_t a, b, sum;
  logic       cout;
  int         checks = 0, failures = 0;
  int         n_carry = 0, n_nocarry = 0;

  always #5 clk = ~clk;

  xs3_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  task automatic apply(input int ai, input int bi);
    int t;
    t = (ai + 3) + (bi + 3);
    a = 4'(ai);
    b = 4'(bi);
    @(posedge clk);
    checks++;
    if (int'(sum) != t % 10 || int'(cout) != t / 10) begin
      failures++;
      $display("FAIL %0d+%0d: cout=%0d sum=%0d, expected %0d", ai, bi, cout, sum, t);
    end
    if (t >= 10) n_carry++; else n_nocarry++;
  endtask

  initial begin
    apply(4, 3);
    apply(7, 6);
    apply(2, 3);
    apply(4, 3);
    apply(4, 2);
    apply(3, 2);
    for (int ai = 0; ai <= 9; ai++)
      for (int bi = 0; bi <= 9; bi++)
        if (ai + bi <= 13) apply(ai, bi);
    checks++;
    if (n_carry == 0 || n_nocarry == 0) begin
      failures++;
      $display("FAIL coverage: carry=%0d no carry=%0d", n_carry, n_nocarry);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
