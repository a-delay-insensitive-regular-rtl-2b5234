// di_star_cell: delay-insensitive Kleene-star ('*') cell.
//
// Function as in the tri-valued synchronous cell:
//   RES1 = MAX(RES2, x)      ENB2 = ENB1 OR (RES2 == 1)
// RES1 needs no C gates: its '0' rail is tied low (a star always holds the empty string),
// its 'x' rail is the OR of RES2's '0' and 'x' rails and its '1' rail is RES2's '1' rail.
// ENB2 follows the mechanical procedure, one C gate per combination of ENB1 and RES2
// (six), each output rail the OR of the gates of its combinations. The RES1 wiring is
// the paper's; the ENB2 gate count is this design's (one gate per combination).
//
// Interface: enb1 (dual-rail, in), res1 (three-rail, out) to the parent; enb2 (dual-rail,
// out) and res2 (three-rail, in) to the operand.
//
// Lint tools may report a combinational loop through this cell when it sits in the
// recognizer: RES flows up to the root and ENB back down to the leaves and into the state
// register, which closes the 4-phase ring. The loop passes through C gates and is the
// self-timed counterpart of the synchronous recognizer's register-to-register path.
module di_star_cell
  import re_pkg::*;
(
  input  rail2_t enb1,
  output rail3_t res1,
  output rail2_t enb2,
  input  rail3_t res2
);
  logic [2:0] a;                  // rails indexed by value: 0, x, 1
  logic [1:0] e;
  logic [2:0][1:0] m;             // m[va][ve]
  logic [1:0] z;

  assign a = res2;
  assign e = enb1;

  for (genvar va = 0; va < 3; va++) begin : g_a
    for (genvar ve = 0; ve < 2; ve++) begin : g_e
      c_element #(.N(2)) u_m (.in({a[va], e[ve]}), .rst(1'b0), .out(m[va][ve]));
    end
  end

  always_comb begin
    z = '0;
    for (int va = 0; va < 3; va++)
      for (int ve = 0; ve < 2; ve++)
        z[(va == 2) ? 1 : ve] |= m[va][ve];
  end

  assign res1.r0 = 1'b0;
  assign res1.rx = res2.r0 | res2.rx;
  assign res1.r1 = res2.r1;
  assign enb2    = z;
endmodule
