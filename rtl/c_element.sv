// c_element: Muller C gate with N inputs.
//
// The output rises when all inputs are high, falls when all inputs are low, and keeps its
// value otherwise. It is written as a level-sensitive latch whose set condition is "all
// ones" and whose clear condition is "all zeros", which is the gate's usual synthesizable
// form. The rst input forces the output to RST_VAL; gates that only ever start from
// all-zero inputs tie it low, since all-zero inputs clear the gate anyway.
//
// Lint tools report this block as a latch (or, through the circuits built from it, as
// combinational loops): holding state without a clock is what a C gate is for, and the
// self-timed circuits in this design depend on it.
//
// The gate's function is the paper's; the latch form and the reset input are this
// design's.
module c_element #(
  parameter int N       = 2,
  parameter bit RST_VAL = 1'b0
) (
  input  logic [N-1:0] in,
  input  logic         rst,
  output logic         out
);
  always_latch begin
    if (rst)          out = RST_VAL;
    else if (&in)     out = 1'b1;
    else if (~|in)    out = 1'b0;
  end
endmodule
