// sync_union_cell: union ('+') operator cell of the tri-valued synchronous recognizer.
//
// Both operands are enabled whenever the union is (ENB2 = ENB3 = ENB1), and the result
// is the larger of the operand results on the order 0 < x < 1 (RES1 = MAX(RES2, RES3)).
// Purely combinational; RES1 depends only on the operands' RES, never on ENB, which is
// what bounds the settling path to one trip up and one trip down the tree.
//
// Interface: enb1/res1 to the parent, enb2/res2 and enb3/res3 to the two operands.
//
// The equations are the paper's; the two-bit encoding of 0, x, 1 is this design's.
module sync_union_cell
  import re_pkg::*;
(
  input  logic enb1,
  output tri_e res1,
  output logic enb2,
  input  tri_e res2,
  output logic enb3,
  input  tri_e res3
);
  assign enb2 = enb1;
  assign enb3 = enb1;
  assign res1 = tmax(res2, res3);
endmodule
