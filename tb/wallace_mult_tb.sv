// End-to-end testbench of the 4x4 signed Wallace tree multiplier, run with
// the top at its default configuration.
//
// It first applies the four reference cases (MR, MD) = (2, 3), (4, -5),
// (-7, 3) and (-6, -1) and compares RESULT with their known 8-bit products
// 00000110, 11101100, 11101011 and 00000110. It then applies all 256 operand
// pairs and compares RESULT with the signed product MR * MD. It counts how
// often each kind of case occurred: both operands positive, one negative,
// both negative, the negated-operand path (MR negative) and the two corner
// cases where -8 has to be negated (MR = -8, and MD = -8 with MR negative).
// A kind that never occurs counts as a failure. The multiplier is
// combinational; each case is sampled 1 time unit after its inputs change.
module wallace_mult_tb;

  logic [3:0] mr, md;
  logic [7:0] result;
  int checks = 0;
  int failures = 0;
  int n_pos_pos = 0, n_mixed = 0, n_neg_neg = 0;
  int n_neg_path = 0, n_mr_min = 0, n_md_min_neg = 0;

  wallace_mult dut (.mr(mr), .md(md), .result(result));

  task automatic apply(input int x, input int y, input logic [7:0] expected);
    mr = 4'(x);
    md = 4'(y);
    #1;
    checks++;
    if (result != expected) begin
      failures++;
      $display("FAIL mr=%0d md=%0d result=%b expected %b", x, y, result, expected);
    end
    if (x > 0 && y > 0) n_pos_pos++;
    if ((x < 0) != (y < 0) && x != 0 && y != 0) n_mixed++;
    if (x < 0 && y < 0) n_neg_neg++;
    if (x < 0) n_neg_path++;
    if (x == -8) n_mr_min++;
    if (x < 0 && y == -8) n_md_min_neg++;
  endtask

  task automatic require(input string what, input int count);
    checks++;
    $display("%-28s occurred %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL %s never occurred", what);
    end
  endtask

  initial begin
    // Reference cases with their products as 8-bit patterns.
    apply( 2,  3, 8'b00000110);
    apply( 4, -5, 8'b11101100);
    apply(-7,  3, 8'b11101011);
    apply(-6, -1, 8'b00000110);
    // Every operand pair.
    for (int x = -8; x < 8; x++)
      for (int y = -8; y < 8; y++)
        apply(x, y, 8'(x * y));
    require("both positive", n_pos_pos);
    require("one negative", n_mixed);
    require("both negative", n_neg_neg);
    require("negated operands (MR<0)", n_neg_path);
    require("MR = -8", n_mr_min);
    require("MD = -8 negated", n_md_min_neg);
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
