// di_leaf_cell: combinational part of a leaf of the delay-insensitive recognizer.
//
// The decoder compares the dual-rail character with the leaf's code and a dual-rail AND
// combines the result with the leaf's ENB; the result is the leaf's next state, which
// goes to this leaf's bit of the shared self-timed state register. The register output of
// that bit is the leaf's RES. Same function as the synchronous leaf, without the register.
//
// Interface: ch (W dual-rail character bits), enb (dual-rail, from the parent),
// next_state (dual-rail, to the register).
//
// The decoder-plus-AND structure is the paper's.
module di_leaf_cell
  import re_pkg::*;
#(
  parameter int           W    = 8,
  parameter logic [W-1:0] CODE = W'(8'h41)
) (
  input  rail2_t [W-1:0] ch,
  input  rail2_t         enb,
  output rail2_t         next_state
);
  rail2_t hit;

  di_decoder #(.W(W), .CODE(CODE)) u_dec (.ch, .y(hit));
  di_and u_and (.a(hit), .b(enb), .y(next_state));
endmodule
