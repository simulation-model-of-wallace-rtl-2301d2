// Two's complement generator: returns -a for a two's-complement operand a.
//
// The operand is inverted bit by bit and one is added with a ripple-carry
// adder built from full adders, which is how the multiplier forms -MD and -MR.
// The constant one enters as the second addend of the least significant full
// adder; the carry ripples from bit 0 upwards and the carry out of the top bit
// is dropped, so the result is -a modulo 2**WIDTH.
//
// WIDTH defaults to the 4-bit operand width of the multiplier. The negation
// of the most negative value does not fit in the same width, so the
// multiplier instantiates this block one bit wider than its operands and
// feeds it the sign-extended operand. Purely combinational.
module twos_comp_gen #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] neg
);

  logic [WIDTH:0] carry;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_rca
    full_adder u_fa (
      .a   (~a[i]),
      .b   (i == 0 ? 1'b1 : 1'b0),
      .cin (carry[i]),
      .sum (neg[i]),
      .cout(carry[i+1])
    );
  end

  // The carry out of the top bit has weight 2**WIDTH and is discarded.
  logic unused_carry_out;
  assign unused_carry_out = carry[WIDTH];

endmodule
