// di_concat_cell: delay-insensitive concatenation (';') cell.
//
// Function as in the tri-valued synchronous cell:
//   ENB2 = ENB1
//   ENB3 = (RES2 == x) ? ENB1 : RES2
//   RES1 = (RES3 == x) ? RES2 : RES3
// ENB2 is a wire fork. RES1 and ENB3 are built by the mechanical procedure: one C gate
// per combination of the logical inputs each depends on (RES2 and RES3: nine; RES2 and
// ENB1: six), each output rail being the OR of the C gates of its combinations. RES1 does
// not wait for ENB1, so results still travel up the tree without waiting for enables.
//
// Interface: enb1 (dual-rail, in), res1 (three-rail, out) to the parent; enb2/res2 to
// the first operand, enb3/res3 to the second.
//
// The function and the construction procedure are the paper's; the paper draws no gate
// list for this cell, so the one here is derived.
module di_concat_cell
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
  logic [1:0] e;                  // rails indexed by value: 0, 1
  logic [2:0][2:0] mr;            // mr[va][vb]: RES2 x RES3 minterms
  logic [2:0][1:0] me;            // me[va][ve]: RES2 x ENB1 minterms
  logic [2:0] y;
  logic [1:0] z;

  assign a = res2;
  assign b = res3;
  assign e = enb1;

  for (genvar va = 0; va < 3; va++) begin : g_a
    for (genvar vb = 0; vb < 3; vb++) begin : g_b
      c_element #(.N(2)) u_mr (.in({a[va], b[vb]}), .rst(1'b0), .out(mr[va][vb]));
    end
    for (genvar ve = 0; ve < 2; ve++) begin : g_e
      c_element #(.N(2)) u_me (.in({a[va], e[ve]}), .rst(1'b0), .out(me[va][ve]));
    end
  end

  always_comb begin
    y = '0;
    z = '0;
    for (int va = 0; va < 3; va++) begin
      for (int vb = 0; vb < 3; vb++)
        y[(vb == 1) ? va : vb] |= mr[va][vb];
      for (int ve = 0; ve < 2; ve++)
        z[(va == 1) ? ve : va / 2] |= me[va][ve];
    end
  end

  assign res1 = y;
  assign enb2 = enb1;
  assign enb3 = z;
endmodule
