// End-to-end testbench for arith_units_3d at its default size (64 bits).
//
// The three adders share one operand bus, so every case checks the three
// sums against the integer sum a + b + cin and against each other, and the
// shifter against the << and >> operators. The run makes each behaviour of
// the units happen and counts it:
//   carry_out      - an addition that carries out of bit 63
//   full_ripple    - a carry that must cross all 64 bits (a = all ones,
//                    b = 0, cin = 1), the longest carry path
//   carry_in       - an addition with cin = 1
//   shift_left     - a left shift by a non-zero amount
//   shift_right    - a right shift by a non-zero amount
//   shift_max      - a shift by 63, which exercises every multiplexer level
//   shift_zero     - a shift by 0, where every level passes its input
// An event that never happened counts as a failure. A watchdog ends the run
// with a failure if it does not finish.
module tb_arith_units_3d;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  int unsigned n_carry_out   = 0;
  int unsigned n_full_ripple = 0;
  int unsigned n_carry_in    = 0;
  int unsigned n_shift_left  = 0;
  int unsigned n_shift_right = 0;
  int unsigned n_shift_max   = 0;
  int unsigned n_shift_zero  = 0;

  logic [63:0] a, b;
  logic        cin;
  logic [5:0]  shamt;
  logic        shift_left;
  logic [63:0] bk_sum, sk_sum, ks_sum, shift_out;
  logic        bk_cout, sk_cout, ks_cout;

  arith_units_3d dut (
    .a(a), .b(b), .cin(cin), .shamt(shamt), .shift_left(shift_left),
    .bk_sum(bk_sum), .bk_cout(bk_cout),
    .sk_sum(sk_sum), .sk_cout(sk_cout),
    .ks_sum(ks_sum), .ks_cout(ks_cout),
    .shift_out(shift_out)
  );

  task automatic apply(input logic [63:0] x, input logic [63:0] y, input logic ci,
                       input logic [5:0] sh, input logic left);
    logic [64:0] exp_sum;
    logic [63:0] exp_shift;
    a = x; b = y; cin = ci; shamt = sh; shift_left = left;
    #1;
    exp_sum   = {1'b0, x} + {1'b0, y} + {64'd0, ci};
    exp_shift = left ? (x << sh) : (x >> sh);
    checks += 4;
    if ({bk_cout, bk_sum} !== exp_sum) begin
      failures++;
      if (failures <= 10) $display("FAIL BK %h + %h + %0d = %h_%h", x, y, ci, bk_cout, bk_sum);
    end
    if ({sk_cout, sk_sum} !== exp_sum) begin
      failures++;
      if (failures <= 10) $display("FAIL SK %h + %h + %0d = %h_%h", x, y, ci, sk_cout, sk_sum);
    end
    if ({ks_cout, ks_sum} !== exp_sum) begin
      failures++;
      if (failures <= 10) $display("FAIL KS %h + %h + %0d = %h_%h", x, y, ci, ks_cout, ks_sum);
    end
    if (shift_out !== exp_shift) begin
      failures++;
      if (failures <= 10) $display("FAIL shift %h by %0d left=%0d -> %h", x, sh, left, shift_out);
    end
    if (exp_sum[64])                                    n_carry_out++;
    if (ci && x == '1 && y == '0)                       n_full_ripple++;
    if (ci)                                             n_carry_in++;
    if (left && sh != 0)                                n_shift_left++;
    if (!left && sh != 0)                               n_shift_right++;
    if (sh == 6'd63)                                    n_shift_max++;
    if (sh == 6'd0)                                     n_shift_zero++;
  endtask

  task automatic require(input string what, input int unsigned n);
    checks++;
    $display("event %-12s happened %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL event %s never happened", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('1, '0, 1'b1, 6'd63, 1'b1);
    apply('1, '0, 1'b1, 6'd63, 1'b0);
    apply(64'd0, 64'd0, 1'b0, 6'd0, 1'b0);
    apply(64'h8000_0000_0000_0001, 64'h8000_0000_0000_0000, 1'b0, 6'd1, 1'b1);
    for (int n = 0; n < 20000; n++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom),
            6'($urandom), 1'($urandom));
    require("carry_out",   n_carry_out);
    require("full_ripple", n_full_ripple);
    require("carry_in",    n_carry_in);
    require("shift_left",  n_shift_left);
    require("shift_right", n_shift_right);
    require("shift_max",   n_shift_max);
    require("shift_zero",  n_shift_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
