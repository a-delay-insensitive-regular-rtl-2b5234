// fifo_element: one-bit self-timed FIFO element (the "L" element) with a dual-rail,
// 4-phase port on each side.
//
// Each port follows the 4-phase protocol: one of the two data rails rises, then the
// acknowledge rises, then the data rail falls, then the acknowledge falls. The element is
// built here as two Muller pipeline stages in series, each stage being a pair of C gates
// (one per rail) gated by the inverted acknowledge of the stage after it. With two stages
// the element completes its whole input handshake (data up, ack up, data down, ack down)
// as soon as a value has moved into its output stage, even while that value still waits
// on the output; the next value is acknowledged once the output has been taken. The state
// register relies on this: with single-stage elements its ring of two elements, one
// holding the present state, could never take the next state and would deadlock. The
// paper gives the element's ports and protocol; the two-stage construction is this
// design's own.
//
// Interface: d0/d1 in, ack out (input side); q0/q1 out, ack_o in (output side).
// Reset (active high) empties the first stage and loads the output stage with INIT:
// 0 = empty, 1 = holding a '0', 2 = holding a '1'.
//
// Lint tools report a combinational loop through the two stages (each stage's output
// feeds the acknowledge that gates the stage before it). The loop is the handshake itself
// and is closed through the C gates' hold state; it is intended.
module fifo_element #(
  parameter int INIT = 0
) (
  input  logic rst,
  input  logic d0,
  input  logic d1,
  output logic ack,
  output logic q0,
  output logic q1,
  input  logic ack_o
);
  logic a0, a1;      // first stage
  logic ack_b;       // acknowledge of the output stage to the first stage

  c_element #(.N(2), .RST_VAL(1'b0)) u_a0 (.in({d0, ~ack_b}), .rst, .out(a0));
  c_element #(.N(2), .RST_VAL(1'b0)) u_a1 (.in({d1, ~ack_b}), .rst, .out(a1));
  c_element #(.N(2), .RST_VAL(INIT == 1)) u_b0 (.in({a0, ~ack_o}), .rst, .out(q0));
  c_element #(.N(2), .RST_VAL(INIT == 2)) u_b1 (.in({a1, ~ack_o}), .rst, .out(q1));

  // Dual-rail code: a stage never holds both values.
  always_comb begin
    assert final (!(a0 && a1) && !(q0 && q1)) else $error("fifo_element holds both rails");
  end

  assign ack   = a0 | a1;
  assign ack_b = q0 | q1;
endmodule
