// tb_bcd_digit_adder: self-checking test of the improved 1-digit BCD adder.
//
// First the operand sequence of the adder's published simulation (a, b and
// the printed sums and carries; each cin is the one that arithmetic
// requires), then all 200 combinations of two BCD digits and a carry in.
// Expected values come from integer arithmetic: cout = (a+b+cin) >= 10,
// s = (a+b+cin) mod 10. It also counts how often the adding-3 correction
// (A1+B1 >= 5) and the forced-zero case (A1+B1 = 4 with a bit-0 carry) are
// exercised and fails if either never is.
module tb_bcd_digit_adder;

  import bcd_pkg::*;

  logic       clk = 1'b0;
  bcd_digit_t a, b, s;
  logic       cin, cout;
  int         checks = 0, failures = 0;
  int         n_add3 = 0, n_force = 0;

  always #5 clk = ~clk;

  bcd_digit_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic apply(input int ai, input int bi, input int ci,
                       input int exp_s, input int exp_c);
    a   = 4'(ai);
    b   = 4'(bi);
    cin = 1'(ci);
    @(posedge clk);
    checks++;
    if (int'(s) != exp_s || int'(cout) != exp_c) begin
      failures++;
      $display("FAIL %0d+%0d+%0d: s=%0d cout=%0d, expected s=%0d cout=%0d",
               ai, bi, ci, s, cout, exp_s, exp_c);
    end
    if ((ai / 2) + (bi / 2) >= 5) n_add3++;
    if ((ai / 2) + (bi / 2) == 4 && (ai % 2) + (bi % 2) + ci >= 2) n_force++;
  endtask

  initial begin
    int t;
    // published simulation: a, b, s, cout as printed
    apply(0, 0, 0, 0, 0);
    apply(8, 0, 1, 9, 0);
    apply(8, 0, 0, 8, 0);
    apply(8, 6, 0, 4, 1);
    apply(8, 6, 1, 5, 1);
    apply(9, 6, 0, 5, 1);
    apply(9, 8, 0, 7, 1);
    apply(9, 8, 1, 8, 1);
    // exhaustive
    for (int ai = 0; ai <= 9; ai++)
      for (int bi = 0; bi <= 9; bi++)
        for (int ci = 0; ci <= 1; ci++) begin
          t = ai + bi + ci;
          apply(ai, bi, ci, t % 10, (t >= 10) ? 1 : 0);
        end
    checks++;
    if (n_add3 == 0 || n_force == 0) begin
      failures++;
      $display("FAIL coverage: add3=%0d force=%0d", n_add3, n_force);
    end
    $display("coverage: add-3 correction %0d, forced S3/S1 %0d", n_add3, n_force);
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
