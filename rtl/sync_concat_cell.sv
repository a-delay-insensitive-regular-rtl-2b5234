// sync_concat_cell: concatenation (';') operator cell of the tri-valued synchronous
// recognizer, for the expression "operand2 ; operand3".
//
// The first operand is enabled with the cell (ENB2 = ENB1). The second operand is
// enabled by the first operand's result; when that result is x (operand 2 matched only
// the empty string, conditional on ENB) the cell's own ENB1 stands in for it:
//   ENB3 = (RES2 == x) ? ENB1 : RES2
// The result is the second operand's, unless that is x, in which case the first
// operand's result is passed up:
//   RES1 = (RES3 == x) ? RES2 : RES3
// Purely combinational; RES1 is a function of RES2 and RES3 only.
//
// Interface: enb1/res1 to the parent, enb2/res2 (first operand), enb3/res3 (second).
//
// The equations are the paper's; the two-bit encoding of 0, x, 1 is this design's.
module sync_concat_cell
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
  assign enb3 = (res2 == TX) ? enb1 : (res2 == T1);
  assign res1 = (res3 == TX) ? res2 : res3;
endmodule
