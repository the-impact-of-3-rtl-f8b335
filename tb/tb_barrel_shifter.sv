// Self-checking testbench for barrel_shifter (left/right logarithmic shifter).
//
// Expected words come from the language's own logical shift operators.
//   * 8-bit instance, the size of the planar shifter drawing: every data
//     word, every shift amount 0..7, both directions (4,096 cases).
//   * 64-bit instance, the evaluated size: walking ones and all-ones words
//     through every amount 0..63 in both directions, then random words.
// The shifter is combinational; outputs are sampled 1 time unit after the
// inputs change. A watchdog ends the run with a failure if it hangs.
module tb_barrel_shifter;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  logic [7:0]  d8, q8;
  logic [2:0]  sh8;
  logic        l8;
  logic [63:0] d64, q64;
  logic [5:0]  sh64;
  logic        l64;

  barrel_shifter #(.WIDTH(8)) dut8  (.data_in(d8),  .shamt(sh8),  .shift_left(l8),  .data_out(q8));
  barrel_shifter              dut64 (.data_in(d64), .shamt(sh64), .shift_left(l64), .data_out(q64));

  task automatic check64(input logic [63:0] d, input int unsigned sh, input logic left);
    logic [63:0] exp_q;
    d64 = d; sh64 = 6'(sh); l64 = left;
    #1;
    exp_q = left ? (d << sh) : (d >> sh);
    checks++;
    if (q64 !== exp_q) begin
      failures++;
      if (failures <= 10)
        $display("FAIL 64-bit: %h %s %0d = %h, expected %h", d, left ? "<<" : ">>", sh, q64, exp_q);
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
    logic [7:0] exp8;
    for (int d = 0; d < 256; d++) begin
      for (int sh = 0; sh < 8; sh++) begin
        for (int left = 0; left < 2; left++) begin
          d8 = 8'(d); sh8 = 3'(sh); l8 = 1'(left);
          #1;
          exp8 = (left != 0) ? (8'(d) << sh) : (8'(d) >> sh);
          checks++;
          if (q8 !== exp8) begin
            failures++;
            if (failures <= 10)
              $display("FAIL 8-bit: %h dir=%0d sh=%0d -> %h, expected %h", d, left, sh, q8, exp8);
          end
        end
      end
    end
    for (int sh = 0; sh < 64; sh++) begin
      for (int left = 0; left < 2; left++) begin
        check64(64'hFFFF_FFFF_FFFF_FFFF, sh, 1'(left));
        check64(64'd1, sh, 1'(left));
        check64(64'h8000_0000_0000_0000, sh, 1'(left));
        check64(64'h0123_4567_89AB_CDEF, sh, 1'(left));
      end
    end
    for (int n = 0; n < 20000; n++)
      check64({$urandom, $urandom}, $urandom % 64, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
