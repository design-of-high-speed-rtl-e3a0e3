// tb_add3_lut: self-checking test of the 3-bit adder with adding-3
// correction.
//
// Checks the rows of the truth table the design prints, then every pair of
// upper-digit fields A1, B1 that excess-3 or BCD operands can produce
// (A1 + B1 <= 12). The expected value is worked out from what the table
// means: for a digit sum of 10 or more (A1 + B1 >= 5) F4 must be 1 and
// F3..F1 must hold (A1 + B1) - 5, otherwise F must equal A1 + B1.
// Combinational DUT; a free-running clock paces the stimulus and a
// watchdog bounds the run.
module tb_add3_lut;

  logic       clk = 1'b0;
  logic [2:0] a_hi, b_hi;
  logic [3:0] f;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  add3_lut dut (.a_hi(a_hi), .b_hi(b_hi), .f(f));

  task automatic check_row(input logic [2:0] a1, input logic [2:0] b1,
                           input logic [3:0] exp_f);
    a_hi = a1;
    b_hi = b1;
    @(posedge clk);
    checks++;
    if (f !== exp_f) begin
      failures++;
      $display("FAIL table row A1=%b B1=%b: F=%b expected %b", a1, b1, f, exp_f);
    end
  endtask

  initial begin
    int s;
    // rows printed in the truth table
    check_row(3'b000, 3'b000, 4'b0000);
    check_row(3'b000, 3'b001, 4'b0001);
    check_row(3'b000, 3'b010, 4'b0010);
    check_row(3'b000, 3'b011, 4'b0011);
    check_row(3'b000, 3'b100, 4'b0100);
    check_row(3'b001, 3'b000, 4'b0001);
    check_row(3'b001, 3'b001, 4'b0010);
    check_row(3'b100, 3'b000, 4'b0100);
    check_row(3'b100, 3'b001, 4'b1000);
    check_row(3'b100, 3'b010, 4'b1001);
    check_row(3'b100, 3'b011, 4'b1010);
    check_row(3'b100, 3'b100, 4'b1011);
    // every reachable pair
    for (int a1 = 0; a1 < 8; a1++) begin
      for (int b1 = 0; b1 < 8; b1++) begin
        s = a1 + b1;
        if (s > 12) continue;
        a_hi = 3'(a1);
        b_hi = 3'(b1);
        @(posedge clk);
        checks++;
        if (2 * s >= 10) begin
          if (f[3] !== 1'b1 || int'(f[2:0]) != s - 5) begin
            failures++;
            $display("FAIL A1=%0d B1=%0d: F=%b, expected F4=1 and F3..F1=%0d", a1, b1, f, s - 5);
          end
        end else if (int'(f) != s) begin
          failures++;
          $display("FAIL A1=%0d B1=%0d: F=%b, expected %0d", a1, b1, f, s);
        end
      end
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
