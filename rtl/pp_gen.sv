// Partial product generator of the 4x4 signed multiplier.
//
// The product MR * MD equals (-MR) * (-MD). When the multiplier MR is
// negative, the generator therefore uses -MR as multiplier and -MD as
// multiplicand; otherwise it uses MR and MD. The multiplier it uses is then
// never negative and its four bits are read as an unsigned number (0..8),
// while the chosen multiplicand (MD or -MD, 5 bits so that -(-8) = +8 fits)
// is sign-extended to 8 bits. Partial product i is that 8-bit multiplicand
// when bit i of the chosen multiplier is 1, and zero otherwise. The sum of
// pp[i] * 2**i over the four products, taken modulo 2**8, is the signed
// product.
//
// The negated operands come from two's complement generators outside this
// block. Partial products are delivered unshifted: the Wallace tree places
// bit j of pp[i] in column i + j and ignores the bits that fall beyond
// column 7. Purely combinational.
module pp_gen
  import wallace_pkg::*;
(
  input  operand_t     mr,      // multiplier, two's complement
  input  operand_t     md,      // multiplicand, two's complement
  input  neg_operand_t neg_mr,  // -MR, one bit wider than MR
  input  neg_operand_t neg_md,  // -MD, one bit wider than MD
  output pp_set_t      pp       // pp[i] has weight 2**i
);

  logic         mr_negative;
  operand_t     mplier;   // multiplier magnitude, unsigned
  neg_operand_t mcand;    // multiplicand, two's complement, 5 bits
  pp_t          mcand_ext;

  always_comb begin
    mr_negative = mr[OP_W-1];
    // For MR = -8, -MR = 01000, whose low four bits read as unsigned 8.
    mplier      = mr_negative ? neg_mr[OP_W-1:0] : mr;
    mcand       = mr_negative ? neg_md : {md[OP_W-1], md};
    mcand_ext   = {{(PP_W-NEG_W){mcand[NEG_W-1]}}, mcand};
    for (int i = 0; i < PP_N; i++) begin
      pp[i] = mplier[i] ? mcand_ext : '0;
    end
  end

  // -MR is only used when MR is negative; -MR is then positive and its sign
  // bit is 0, so only the low four bits are needed.
  logic unused_neg_mr_msb;
  assign unused_neg_mr_msb = neg_mr[NEG_W-1];

endmodule
