// Self-checking testbench of pp_gen. For every pair of 4-bit operands it
// supplies -MR and -MD (computed here arithmetically) and checks each of the
// four partial products against a reference: with m = |MR| and
// c = (MR < 0 ? -MD : MD), partial product i is c (as 8 bits) when bit i of m
// is set and zero otherwise. It also checks that the weighted sum of the
// partial products equals MR * MD modulo 2**8. A watchdog ends the run with a
// failure if it does not finish in time.
module pp_gen_tb;
  import wallace_pkg::*;

  operand_t     mr, md;
  neg_operand_t neg_mr, neg_md;
  pp_set_t      pp;
  int checks = 0;
  int failures = 0;

  pp_gen dut (.mr(mr), .md(md), .neg_mr(neg_mr), .neg_md(neg_md), .pp(pp));

  initial begin
    for (int x = -8; x < 8; x++) begin
      for (int y = -8; y < 8; y++) begin
        int mag, mc, total;
        logic [7:0] exp_pp;
        mr = 4'(x);
        md = 4'(y);
        neg_mr = 5'(-x);
        neg_md = 5'(-y);
        #1;
        mag = (x < 0) ? -x : x;
        mc  = (x < 0) ? -y : y;
        total = 0;
        for (int i = 0; i < 4; i++) begin
          exp_pp = mag[i] ? 8'(mc) : 8'd0;
          checks++;
          if (pp[i] != exp_pp) begin
            failures++;
            $display("FAIL mr=%0d md=%0d pp[%0d]=%b expected %b", x, y, i, pp[i], exp_pp);
          end
          total += int'(pp[i]) << i;
        end
        checks++;
        if (8'(total) != 8'(x * y)) begin
          failures++;
          $display("FAIL mr=%0d md=%0d weighted sum %0d", x, y, 8'(total));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
