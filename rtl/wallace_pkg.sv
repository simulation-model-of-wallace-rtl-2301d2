// Shared sizes and types of the 4x4 signed Wallace tree multiplier.
//
// The multiplier takes two 4-bit two's-complement operands, MR (multiplier)
// and MD (multiplicand), and returns their 8-bit product. Four partial
// products of 8 bits each are formed, one per multiplier bit, and reduced by
// the Wallace tree. These sizes are the ones of the 4x4 design; the tree in
// wallace_tree.sv is wired by hand for exactly this size.
package wallace_pkg;

  // Operand width of MR and MD.
  localparam int unsigned OP_W = 4;
  // Width of a partial product and of the result.
  localparam int unsigned PP_W = 2 * OP_W;
  // Number of partial products, one per multiplier bit.
  localparam int unsigned PP_N = OP_W;
  // Width of a negated operand: one bit more than the operand, so that the
  // negation of the most negative value (-8 -> +8) is still representable.
  localparam int unsigned NEG_W = OP_W + 1;

  typedef logic [OP_W-1:0]  operand_t;
  typedef logic [NEG_W-1:0] neg_operand_t;
  typedef logic [PP_W-1:0]  pp_t;
  // Partial product i is stored unshifted; it carries weight 2**i.
  typedef pp_t [PP_N-1:0]   pp_set_t;

endpackage
