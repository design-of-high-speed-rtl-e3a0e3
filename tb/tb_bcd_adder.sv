// tb_bcd_adder: self-checking test of the N-digit carry-ripple BCD adder at
// every operand size the design was evaluated at, 2 to 18 digits.
//
// One instance per size shares a stimulus of 18 random BCD digits per
// operand (each instance sees the low digits). Directed vectors cover the
// longest ripple (99..9 + 0 + 1, the carry crossing every digit), the
// largest sum (99..9 + 99..9 + 1) and zero. The expected sum is computed
// digit by digit with integer arithmetic. The 18-digit instance uses the
// adder's default size. Each instance also counts vectors whose carry
// ripples through all its digits and fails if there are none.
module tb_bcd_adder;

  localparam int MAXD   = 18;
  localparam int MIND   = 2;
  localparam int NRAND  = 2000;

  logic              clk = 1'b0;
  logic [4*MAXD-1:0] a_full, b_full;
  logic              cin;
  logic              active = 1'b0;
  int                checks = 0, failures = 0;

  always #5 clk = ~clk;

  // reference: {cout, sum} of the low n digits, plus whether the carry
  // went through every digit
  function automatic logic [4*MAXD:0] ref_add(input logic [4*MAXD-1:0] x,
                                              input logic [4*MAXD-1:0] y,
                                              input logic c_in, input int n);
    logic [4*MAXD:0] r = '0;
    int c = int'(c_in);
    for (int i = 0; i < n; i++) begin
      int t = int'(x[4*i +: 4]) + int'(y[4*i +: 4]) + c;
      r[4*i +: 4] = 4'(t % 10);
      c = t / 10;
    end
    r[4*n] = 1'(c);
    return r;
  endfunction

  function automatic bit full_ripple(input logic [4*MAXD-1:0] x,
                                     input logic [4*MAXD-1:0] y,
                                     input logic c_in, input int n);
    // the carry enters digit 0 and every digit passes it on: each digit sums to 9
    if (!c_in) return 1'b0;
    for (int i = 0; i < n; i++)
      if (int'(x[4*i +: 4]) + int'(y[4*i +: 4]) != 9) return 1'b0;
    return 1'b1;
  endfunction

  for (genvar n = MIND; n <= MAXD; n++) begin : g_size
    logic [4*n-1:0] sum;
    logic           cout;
    int             n_ripple = 0;

    if (n == MAXD) begin : g_default
      bcd_adder dut (.a(a_full), .b(b_full), .cin(cin), .sum(sum), .cout(cout));
    end else begin : g_param
      bcd_adder #(.DIGITS(n)) dut (.a(a_full[4*n-1:0]), .b(b_full[4*n-1:0]),
                                   .cin(cin), .sum(sum), .cout(cout));
    end

    always @(posedge clk) begin
      if (active) begin
        logic [4*MAXD:0] exp_r;
        exp_r = ref_add(a_full, b_full, cin, n);
        checks++;
        if (sum !== exp_r[4*n-1:0] || cout !== exp_r[4*n]) begin
          failures++;
          $display("FAIL %0d digits: a=%h b=%h cin=%0d -> %0d_%h, expected %0d_%h",
                   n, a_full[4*n-1:0], b_full[4*n-1:0], cin, cout, sum,
                   exp_r[4*n], exp_r[4*n-1:0]);
        end
        if (full_ripple(a_full, b_full, cin, n)) n_ripple++;
      end
    end
  end

  function automatic logic [4*MAXD-1:0] rand_bcd();
    logic [4*MAXD-1:0] v;
    for (int i = 0; i < MAXD; i++) v[4*i +: 4] = 4'($urandom_range(0, 9));
    return v;
  endfunction

  task automatic apply(input logic [4*MAXD-1:0] x, input logic [4*MAXD-1:0] y,
                       input logic c);
    @(negedge clk);
    a_full = x;
    b_full = y;
    cin    = c;
    active = 1'b1;
  endtask

  initial begin
    logic [4*MAXD-1:0] nines, pair;
    for (int i = 0; i < MAXD; i++) nines[4*i +: 4] = 4'd9;
    apply(nines, '0, 1'b1);
    apply('0, nines, 1'b1);
    apply(nines, nines, 1'b1);
    apply('0, '0, 1'b0);
    // complementary digit pairs summing to 9: a carry in ripples through all
    for (int k = 0; k < 20; k++) begin
      pair = rand_bcd();
      apply(pair, nines - pair, 1'b1);
    end
    for (int k = 0; k < NRAND; k++) apply(rand_bcd(), rand_bcd(), 1'($urandom_range(0, 1)));
    @(negedge clk);
    active = 1'b0;
    @(posedge clk);
    // the per-size ripple counters, checked size by size
    checks++;
    if (g_size[MIND].n_ripple == 0 || g_size[MAXD].n_ripple == 0) begin
      failures++;
      $display("FAIL no vector rippled a carry through every digit");
    end
    $display("full-length ripples: %0d digits %0d, %0d digits %0d",
             MIND, g_size[MIND].n_ripple, MAXD, g_size[MAXD].n_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRAND + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
