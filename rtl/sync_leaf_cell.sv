// sync_leaf_cell: leaf of the synchronous expression-tree recognizer, one per character
// of the regular expression.
//
// The cell compares the input character with its own code CH and, at the clock edge,
// stores ENB AND (char == CH) in its one-bit state register. RES is the register output,
// so RES is 1 during cycle i+1 exactly when the character of cycle i matched while ENB
// was 1. RES of a leaf is never x. This is the leaf of the earlier expression-tree
// recognizers, which the tri-valued design keeps unchanged.
//
// Interface: enb (from the parent), ch_in (the character of this cycle), res (to the
// parent, as a tri-valued code that is only ever 0 or 1).
// Timing: one register, clocked on the rising edge of clk. Reset (synchronous, active
// high) clears the register before a recognition starts; the reset style is a choice of
// this design.
module sync_leaf_cell
  import re_pkg::*;
#(
  parameter logic [7:0] CH = 8'h41
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enb,
  input  logic [7:0] ch_in,
  output tri_e       res
);
  logic q;

  always_ff @(posedge clk) begin
    if (rst) q <= 1'b0;
    else     q <= enb && (ch_in == CH);
  end

  assign res = q ? T1 : T0;
endmodule
