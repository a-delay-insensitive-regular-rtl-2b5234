// di_union_cell: delay-insensitive union ('+') cell.
//
// Function as in the tri-valued synchronous cell: ENB2 = ENB3 = ENB1 and
// RES1 = MAX(RES2, RES3) on 0 < x < 1. The enables are plain wire forks. The result is
// built by the mechanical procedure: one C gate for each of the nine combinations of the
// two three-rail inputs, each output rail the OR of the C gates whose combination gives
// that value. A result rail therefore rises only after both operand results are valid
// and falls only after both are invalid.
//
// Interface: enb1 (dual-rail, in), res1 (three-rail, out) to the parent; enb2/res2 and
// enb3/res3 to the operands.
//
// The function and the construction procedure are the paper's; the paper draws no gate
// list for this cell, so the one here is derived.
module di_union_cell
  import re_pkg::*;
(
  input  rail2_t enb1,
  output rail3_t res1,
  output rail2_t enb2,
  input  rail3_t res2,
  output rail2_t enb3,
  input  rail3_t res3
);
  logic [2:0] a, b;               // rails indexed by value: 0, x, 1
  logic [2:0][2:0] m;             // m[va][vb]: minterm C gates
  logic [2:0] y;

  assign a = res2;
  assign b = res3;

  for (genvar va = 0; va < 3; va++) begin : g_a
    for (genvar vb = 0; vb < 3; vb++) begin : g_b
      c_element #(.N(2)) u_m (.in({a[va], b[vb]}), .rst(1'b0), .out(m[va][vb]));
    end
  end

  always_comb begin
    y = '0;
    for (int va = 0; va < 3; va++)
      for (int vb = 0; vb < 3; vb++)
        y[(va > vb) ? va : vb] |= m[va][vb];
  end

  assign res1 = y;
  assign enb2 = enb1;
  assign enb3 = enb1;
endmodule
