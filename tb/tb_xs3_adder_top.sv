// tb_xs3_adder_top: end-to-end test of the top at its default size
// (18-digit BCD adder beside the excess-3 digit adder).
//
// Both adders are driven at once, each cycle with new operands: directed
// vectors (the worked excess-3 examples, the longest carry ripple) and then
// random ones. Expected values are computed with integer arithmetic, digit
// by digit for the BCD adder and as (a+3)+(b+3) for the excess-3 adder,
// whose random operands stay in its range a + b <= 13.
// Counted mechanisms, each of which must occur at least once:
//   add3    a digit with A1 + B1 >= 5 (adding-3 correction in the LUT)
//   force   a digit with A1 + B1 = 4 and a bit-0 carry (S3, S1 forced to 0)
//   ripple  a carry that crosses all 18 digits
//   cout    a carry out of the top digit
//   xs3_c   an excess-3 result with a decimal carry
//   xs3_nc  an excess-3 result without one
module tb_xs3_adder_top;

  import bcd_pkg::*;

  localparam int D     = 18;   // the top's default size
  localparam int NRAND = 3000;

  logic           clk = 1'b0;
  logic [4*D-1:0] bcd_a, bcd_b, bcd_sum;
  logic           bcd_cin, bcd_cout;
  bcd_digit_t     xs3_a, xs3_b, xs3_sum;
  logic           xs3_cout;
  int             checks = 0, failures = 0;
  int             n_add3 = 0, n_force = 0, n_ripple = 0, n_cout = 0;
  int             n_xs3_c = 0, n_xs3_nc = 0;

  always #5 clk = ~clk;

  xs3_adder_top dut (
    .bcd_a, .bcd_b, .bcd_cin, .bcd_sum, .bcd_cout,
    .xs3_a, .xs3_b, .xs3_sum, .xs3_cout
  );

  task automatic apply(input logic [4*D-1:0] x, input logic [4*D-1:0] y,
                       input logic c, input int xa, input int xb);
    logic [4*D-1:0] exp_sum;
    int             carry, t, a1b1, c1, ripple_len, xt;
    bcd_a   = x;
    bcd_b   = y;
    bcd_cin = c;
    xs3_a   = 4'(xa);
    xs3_b   = 4'(xb);
    @(posedge clk);
    // BCD adder reference, with mechanism counting per digit
    carry      = int'(c);
    ripple_len = 0;
    for (int i = 0; i < D; i++) begin
      t    = int'(x[4*i +: 4]) + int'(y[4*i +: 4]) + carry;
      a1b1 = int'(x[4*i+1 +: 3]) + int'(y[4*i+1 +: 3]);
      c1   = (int'(x[4*i]) + int'(y[4*i]) + carry) / 2;
      if (a1b1 >= 5) n_add3++;
      if (a1b1 == 4 && c1 == 1) n_force++;
      if (carry == 1 && t == 10 && ripple_len == i) ripple_len++;
      exp_sum[4*i +: 4] = 4'(t % 10);
      carry = t / 10;
    end
    if (c && ripple_len == D) n_ripple++;
    if (carry == 1) n_cout++;
    checks++;
    if (bcd_sum !== exp_sum || int'(bcd_cout) != carry) begin
      failures++;
      $display("FAIL bcd %h + %h + %0d -> %0d_%h, expected %0d_%h",
               x, y, c, bcd_cout, bcd_sum, carry, exp_sum);
    end
    // excess-3 adder reference
    xt = (xa + 3) + (xb + 3);
    if (xt >= 10) n_xs3_c++; else n_xs3_nc++;
    checks++;
    if (int'(xs3_sum) != xt % 10 || int'(xs3_cout) != xt / 10) begin
      failures++;
      $display("FAIL xs3 %0d + %0d -> %0d%0d, expected %0d", xa, xb, xs3_cout, xs3_sum, xt);
    end
  endtask

  function automatic logic [4*D-1:0] rand_bcd();
    logic [4*D-1:0] v;
    for (int i = 0; i < D; i++) v[4*i +: 4] = 4'($urandom_range(0, 9));
    return v;
  endfunction

  initial begin
    logic [4*D-1:0] nines;
    int xa, xb;
    for (int i = 0; i < D; i++) nines[4*i +: 4] = 4'd9;
    apply(nines, '0, 1'b1, 4, 3);        // full ripple; excess-3 example 1
    apply(nines, nines, 1'b1, 7, 6);     // largest sum; excess-3 example 2
    apply('0, '0, 1'b0, 0, 0);
    for (int k = 0; k < NRAND; k++) begin
      xa = $urandom_range(0, 9);
      xb = $urandom_range(0, (13 - xa > 9) ? 9 : 13 - xa);
      apply(rand_bcd(), rand_bcd(), 1'($urandom_range(0, 1)), xa, xb);
    end
    $display("mechanisms: add3=%0d force=%0d ripple=%0d cout=%0d xs3_carry=%0d xs3_nocarry=%0d",
             n_add3, n_force, n_ripple, n_cout, n_xs3_c, n_xs3_nc);
    checks++;
    if (n_add3 == 0 || n_force == 0 || n_ripple == 0 || n_cout == 0 ||
        n_xs3_c == 0 || n_xs3_nc == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRAND + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
