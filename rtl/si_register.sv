// si_register: self-timed state register of the delay-insensitive recognizer.
//
// Each bit is two FIFO elements in series, the self-timed counterpart of a master-slave
// flip-flop. The input acknowledges of all first elements are joined by one W-input C gate
// into the single acknowledge ack, which is also the output-side acknowledge of every
// second element. The register therefore behaves as follows: once every input bit is
// valid it keeps the values (the next state), raises ack and turns all its outputs
// invalid; once every input bit is invalid again it lowers ack and drives the kept values
// onto its outputs. This replaces the clock of the synchronous recognizer by a 4-phase
// handshake. Structure as described in the paper; only the FIFO element's insides are
// this design's own.
//
// Interface: d (W dual-rail inputs), q (W dual-rail outputs), ack. Reset (active high)
// empties the second element of every bit and lowers ack, so the outputs are invalid
// while reset is high, and loads the output stage of the first element with a valid '0',
// which moves to the outputs once reset falls: the cleared state the recognizer starts
// from. Passing through the invalid value lets every C gate downstream return to zero
// before the cleared state appears. Inputs must be invalid during reset.
module si_register
  import re_pkg::*;
#(
  parameter int W = 8
) (
  input  logic           rst,
  input  rail2_t [W-1:0] d,
  output rail2_t [W-1:0] q,
  output logic           ack
);
  logic [W-1:0] ack_in;
  rail2_t [W-1:0] mid;
  logic [W-1:0] ack_mid;

  for (genvar b = 0; b < W; b++) begin : g_bit
    fifo_element #(.INIT(1)) u_l1 (
      .rst, .d0(d[b].r0), .d1(d[b].r1), .ack(ack_in[b]),
      .q0(mid[b].r0), .q1(mid[b].r1), .ack_o(ack_mid[b])
    );
    fifo_element #(.INIT(0)) u_l2 (
      .rst, .d0(mid[b].r0), .d1(mid[b].r1), .ack(ack_mid[b]),
      .q0(q[b].r0), .q1(q[b].r1), .ack_o(ack)
    );
  end

  c_element #(.N(W), .RST_VAL(1'b0)) u_ack (.in(ack_in), .rst, .out(ack));
endmodule
