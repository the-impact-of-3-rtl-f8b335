// Self-checking testbench for pg_node, the propagate-generate prefix node.
//
// All 16 combinations of the two input spans are applied. The expected pair
// is worked out from what the spans mean: the joined span generates a carry
// if its upper part generates one, or the upper part propagates one that the
// lower part generates; it propagates only if both parts propagate.
module tb_pg_node;
  import arith_pkg::*;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  pg_t hi, lo, out;

  pg_node dut (.hi(hi), .lo(lo), .out(out));

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_g, exp_p;
    for (int v = 0; v < 16; v++) begin
      {hi.g, hi.p, lo.g, lo.p} = 4'(v);
      #1;
      // Carry out of the joined span with no carry in: out of the upper part,
      // fed by whatever the lower part generates.
      exp_g = hi.g ? 1'b1 : (hi.p ? lo.g : 1'b0);
      // A carry in passes the joined span only if it passes both parts.
      exp_p = hi.p ? lo.p : 1'b0;
      checks++;
      if (out.g !== exp_g || out.p !== exp_p) begin
        failures++;
        $display("FAIL hi=%b%b lo=%b%b -> g=%b p=%b", hi.g, hi.p, lo.g, lo.p, out.g, out.p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
