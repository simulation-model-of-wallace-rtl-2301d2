// Self-checking testbench of cla_adder at its default width of 8 bits. It
// applies every pair of operands with both values of the carry in (131072
// cases) and compares {cout, sum} with the arithmetic sum a + b + cin. A
// watchdog ends the run with a failure if it does not finish in time.
module cla_adder_tb;

  logic [7:0] a, b, sum;
  logic       cin, cout;
  int checks = 0;
  int failures = 0;

  cla_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        for (int c = 0; c < 2; c++) begin
          a = 8'(x);
          b = 8'(y);
          cin = c[0];
          #1;
          checks++;
          if ({cout, sum} != 9'(x + y + c)) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d + %0d + %0d -> %0d", x, y, c, {cout, sum});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
