// Wallace tree of the 4x4 multiplier: reduces four partial products to two
// 8-bit operands whose sum, modulo 2**8, is the product.
//
// Bit j of partial product i (written Pij) has weight 2**(i+j); only the bits
// with i + j <= 7 are used, since the result has eight bits. The reduction
// follows the two-level layout of the design:
//
//   Level 0: column 2 combines P20, P11 in a half adder; columns 3 to 7 each
//            combine the three bits P3x, P2x, P1x in a full adder.
//   Level 1: column 3 combines the level-0 sum with P03 in a half adder;
//            columns 4 to 7 each combine the level-0 sum, P0x and the
//            level-0 carry from the column below in a full adder.
//
// What is left is at most two bits per column, which form the operands for
// the final carry look-ahead adder:
//
//   col:    7     6     5     4     3     2     1    0
//   op_a:  s1_7  s1_6  s1_5  s1_4  s1_3  s0_2  P01  P00
//   op_b:  c1_6  c1_5  c1_4  c1_3  c0_2  P02   P10  0
//
// Which of the three leftover bits of column 3 enters the level-1 half adder
// (here the level-0 sum and P03, while the level-0 carry from column 2 passes
// on) is this design's choice; it does not change the sum. Carries out of
// column 7 have weight 2**8 and are dropped. Purely combinational.
module wallace_tree
  import wallace_pkg::*;
(
  input  pp_set_t pp,     // pp[i] unshifted, weight 2**i
  output pp_t     op_a,
  output pp_t     op_b
);

  // Level-0 sums and carries, indexed by column.
  logic [7:2] s0, c0;
  // Level-1 sums and carries, indexed by column.
  logic [7:3] s1, c1;

  // ---------------- Level 0 ----------------
  half_adder u_l0_c2 (.a(pp[2][0]), .b(pp[1][1]), .sum(s0[2]), .carry(c0[2]));

  for (genvar col = 3; col <= 7; col++) begin : g_l0
    full_adder u_fa (
      .a   (pp[3][col-3]),
      .b   (pp[2][col-2]),
      .cin (pp[1][col-1]),
      .sum (s0[col]),
      .cout(c0[col])
    );
  end

  // ---------------- Level 1 ----------------
  half_adder u_l1_c3 (.a(s0[3]), .b(pp[0][3]), .sum(s1[3]), .carry(c1[3]));

  for (genvar col = 4; col <= 7; col++) begin : g_l1
    full_adder u_fa (
      .a   (s0[col]),
      .b   (pp[0][col]),
      .cin (c0[col-1]),
      .sum (s1[col]),
      .cout(c1[col])
    );
  end

  // ---------------- Operands for the final adder ----------------
  assign op_a = {s1[7:3], s0[2], pp[0][1], pp[0][0]};
  assign op_b = {c1[6:3], c0[2], pp[0][2], pp[1][0], 1'b0};

  // Carries out of column 7 (weight 2**8) and partial product bits beyond
  // column 7 do not contribute to the 8-bit result.
  logic unused_bits;
  assign unused_bits = ^{c0[7], c1[7], pp[1][7], pp[2][7:6], pp[3][7:5]};

endmodule
