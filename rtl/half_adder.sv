// One-bit half adder: sum = a XOR b, carry = a AND b.
//
// Used by the Wallace tree where a column has only two bits left to combine,
// and at the low end of the reduction. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  assign sum   = a ^ b;
  assign carry = a & b;

endmodule
