// Self-checking testbench of twos_comp_gen. It checks the default 4-bit
// instance and the 5-bit instance the multiplier uses, over every input
// value, against the arithmetic negation 0 - a modulo 2**WIDTH. For the 5-bit
// instance it also checks that every sign-extended 4-bit operand, including
// -8, negates exactly. A watchdog ends the run with a failure if it does not
// finish in time.
module twos_comp_gen_tb;

  logic [3:0] a4, n4;
  logic [4:0] a5, n5;
  int checks = 0;
  int failures = 0;

  twos_comp_gen                dut4 (.a(a4), .neg(n4));
  twos_comp_gen #(.WIDTH(5))   dut5 (.a(a5), .neg(n5));

  initial begin
    for (int v = 0; v < 16; v++) begin
      a4 = v[3:0];
      #1;
      checks++;
      if (n4 != 4'(16 - v)) begin
        failures++;
        $display("FAIL width 4: a=%0d -> %0d", a4, n4);
      end
    end
    for (int v = 0; v < 32; v++) begin
      a5 = v[4:0];
      #1;
      checks++;
      if (n5 != 5'(32 - v)) begin
        failures++;
        $display("FAIL width 5: a=%0d -> %0d", a5, n5);
      end
    end
    // Signed view: -x for every 4-bit x, sign-extended to 5 bits.
    for (int x = -8; x < 8; x++) begin
      a5 = 5'(x);
      #1;
      checks++;
      if ($signed(n5) != -x) begin
        failures++;
        $display("FAIL signed: -(%0d) -> %0d", x, $signed(n5));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
