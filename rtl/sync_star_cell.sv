// sync_star_cell: Kleene-star ('*') operator cell of the tri-valued synchronous
// recognizer.
//
// A star always contains the empty string, so its result is at least x:
//   RES1 = MAX(RES2, x)
// Its operand is enabled by the cell's own enable or by a completed (non-empty) match of
// the operand, which starts the next repetition in the same cycle:
//   ENB2 = ENB1 OR (RES2 == 1)
// Because RES1 does not depend on ENB1, no enable-to-result loop exists and no second
// clock phase is needed to break one. Purely combinational.
//
// Interface: enb1/res1 to the parent, enb2/res2 to the operand.
//
// The equations are the paper's; the two-bit encoding of 0, x, 1 is this design's.
module sync_star_cell
  import re_pkg::*;
(
  input  logic enb1,
  output tri_e res1,
  output logic enb2,
  input  tri_e res2
);
  assign res1 = tmax(res2, TX);
  assign enb2 = enb1 || (res2 == T1);
endmodule
