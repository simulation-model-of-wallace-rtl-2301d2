// Self-checking testbench of wallace_tree. It drives the partial products
// with the four values of the multiplier's own corner cases and then with
// random 8-bit values, and checks that op_a + op_b equals the weighted sum
// of pp[i] * 2**i modulo 2**8, and that op_b bit 0 is zero (column 0 holds
// only P00). A watchdog ends the run with a failure if it does not finish in
// time.
module wallace_tree_tb;
  import wallace_pkg::*;

  pp_set_t pp;
  pp_t     op_a, op_b;
  int checks = 0;
  int failures = 0;

  wallace_tree dut (.pp(pp), .op_a(op_a), .op_b(op_b));

  task automatic check();
    int total;
    #1;
    total = 0;
    for (int i = 0; i < 4; i++) total += int'(pp[i]) << i;
    checks++;
    if (8'(int'(op_a) + int'(op_b)) != 8'(total)) begin
      failures++;
      $display("FAIL pp=%h a=%h b=%h expected sum %h", pp, op_a, op_b, 8'(total));
    end
    checks++;
    if (op_b[0] != 1'b0) begin
      failures++;
      $display("FAIL op_b[0] set for pp=%h", pp);
    end
  endtask

  initial begin
    pp = '0;                 check();
    pp = '1;                 check();
    pp = {4{8'h01}};         check();
    pp = {4{8'h80}};         check();
    for (int n = 0; n < 20000; n++) begin
      pp = 32'($urandom);
      check();
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
