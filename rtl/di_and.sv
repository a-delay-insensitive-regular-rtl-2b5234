// di_and: delay-insensitive AND of two dual-rail bits.
//
// Built by the mechanical procedure for self-timed logic: one two-input C gate per
// minterm of the input rails, and each output rail is the OR of the C gates of its
// minterms. The '1' rail is the single minterm A='1',B='1'; the '0' rail is the OR of the
// other three. An output rail rises only after both inputs are valid and falls only
// after both are invalid, as the 4-phase protocol requires.
//
// Interface: a, b, y, all dual-rail (all rails low = invalid). Combinational apart from
// the hold state of the C gates.
//
// The gate structure is the one the paper draws for this AND.
module di_and
  import re_pkg::*;
(
  input  rail2_t a,
  input  rail2_t b,
  output rail2_t y
);
  logic m00, m01, m10, m11;

  c_element #(.N(2)) u_m00 (.in({a.r0, b.r0}), .rst(1'b0), .out(m00));
  c_element #(.N(2)) u_m01 (.in({a.r0, b.r1}), .rst(1'b0), .out(m01));
  c_element #(.N(2)) u_m10 (.in({a.r1, b.r0}), .rst(1'b0), .out(m10));
  c_element #(.N(2)) u_m11 (.in({a.r1, b.r1}), .rst(1'b0), .out(m11));

  assign y.r0 = m00 | m01 | m10;
  assign y.r1 = m11;
endmodule
