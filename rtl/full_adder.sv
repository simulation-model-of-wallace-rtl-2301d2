// One-bit full adder: adds three bits of equal weight and returns the sum bit
// and the carry into the next weight.
//
// It is the building block of the ripple-carry adder inside the two's
// complement generator and of the 3:2 counters of the Wallace tree. Purely
// combinational; the carry is the majority of the three inputs.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);

endmodule
