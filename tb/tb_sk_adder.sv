// Self-checking testbench for sk_adder (Sklansky parallel-prefix adder).
//
// Two instances are checked against the plain integer sum a + b + cin,
// computed one bit wider so that the carry-out is checked too:
//   * an 8-bit instance, the size of the carry-tree drawings, over every
//     combination of a, b and cin (131,072 cases);
//   * a 64-bit instance, the size of the evaluated units, on corner cases
//     (carry rippling through all 64 bits, all ones, zero) and random operands.
// The adder is combinational; each case is applied, then sampled 1 time unit
// later. A watchdog ends the run with a failure if it does not finish.
module tb_sk_adder;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        c8, co8;
  logic [63:0] a64, b64, s64;
  logic        c64, co64;

  sk_adder #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .cin(c8),  .sum(s8),  .cout(co8));
  sk_adder               dut64 (.a(a64), .b(b64), .cin(c64), .sum(s64), .cout(co64));

  task automatic check64(input logic [63:0] x, input logic [63:0] y, input logic ci);
    logic [64:0] ref_sum;
    a64 = x; b64 = y; c64 = ci;
    #1;
    ref_sum = {1'b0, x} + {1'b0, y} + {64'd0, ci};
    checks++;
    if ({co64, s64} !== ref_sum) begin
      failures++;
      if (failures <= 10)
        $display("FAIL 64-bit: %h + %h + %0d = %h_%h, expected %h", x, y, ci, co64, s64, ref_sum);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] ref8;
    // 8-bit: exhaustive.
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        for (int ci = 0; ci < 2; ci++) begin
          a8 = 8'(x); b8 = 8'(y); c8 = 1'(ci);
          #1;
          ref8 = 9'(x) + 9'(y) + 9'(ci);
          checks++;
          if ({co8, s8} !== ref8) begin
            failures++;
            if (failures <= 10)
              $display("FAIL 8-bit: %h + %h + %0d = %h_%h, expected %h", x, y, ci, co8, s8, ref8);
          end
        end
      end
    end
    // 64-bit: corner cases.
    check64(64'hFFFF_FFFF_FFFF_FFFF, 64'd0, 1'b1);  // carry through every bit
    check64(64'hFFFF_FFFF_FFFF_FFFF, 64'd1, 1'b0);
    check64(64'hFFFF_FFFF_FFFF_FFFF, 64'hFFFF_FFFF_FFFF_FFFF, 1'b1);
    check64(64'd0, 64'd0, 1'b0);
    check64(64'd0, 64'd0, 1'b1);
    check64(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAA, 1'b1);
    check64(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0);
    // Every single-bit carry chain: bits [k:0] propagate, carry in at the bottom.
    for (int k = 0; k < 64; k++) begin
      check64(64'hFFFF_FFFF_FFFF_FFFF >> (63 - k), 64'd0, 1'b1);
      check64(64'd1 << k, 64'd1 << k, 1'b0);
    end
    // 64-bit: random operands.
    for (int n = 0; n < 20000; n++)
      check64({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
