// 4x4 signed Wallace tree multiplier.
//
// Multiplies two 4-bit two's-complement numbers, the multiplier MR and the
// multiplicand MD, and returns the 8-bit two's-complement product. The design
// has four parts, in the order the data passes through them:
//
//   twos_comp_gen  forms -MR and -MD (invert, then add one with a
//                  ripple-carry adder of full adders), one bit wider than the
//                  operands so that -(-8) = +8 is exact;
//   pp_gen         when MR is negative uses -MR and -MD, otherwise MR and MD,
//                  and forms four sign-extended 8-bit partial products;
//   wallace_tree   reduces them in two levels of full and half adders to two
//                  8-bit operands;
//   cla_adder      adds those with a carry look-ahead adder into RESULT.
//
// The whole multiplier is combinational: RESULT follows MR and MD after the
// propagation delay, with no clock and no reset. Every product of the 4-bit
// range (-8..7 times -8..7, i.e. -56..64) fits the 8-bit result exactly.
// The part widths and the split into four parts follow the design
// description; extending the negators by one bit and negating both operands
// when MR is negative are this design's reading of how the partial product
// generator uses MD, -MD, MR and -MR.
module wallace_mult
  import wallace_pkg::*;
(
  input  logic [3:0] mr,      // multiplier, two's complement
  input  logic [3:0] md,      // multiplicand, two's complement
  output logic [7:0] result   // product, two's complement
);

  neg_operand_t neg_mr, neg_md;
  pp_set_t      pp;
  pp_t          op_a, op_b;
  logic         unused_cout;

  twos_comp_gen #(.WIDTH(NEG_W)) u_neg_mr (
    .a  ({mr[OP_W-1], mr}),
    .neg(neg_mr)
  );

  twos_comp_gen #(.WIDTH(NEG_W)) u_neg_md (
    .a  ({md[OP_W-1], md}),
    .neg(neg_md)
  );

  pp_gen u_pp_gen (
    .mr    (mr),
    .md    (md),
    .neg_mr(neg_mr),
    .neg_md(neg_md),
    .pp    (pp)
  );

  wallace_tree u_tree (
    .pp  (pp),
    .op_a(op_a),
    .op_b(op_b)
  );

  // The carry out of bit 7 has weight 2**8 and is outside the product.
  cla_adder #(.WIDTH(PP_W)) u_cla (
    .a   (op_a),
    .b   (op_b),
    .cin (1'b0),
    .sum (result),
    .cout(unused_cout)
  );

endmodule
