// di_decoder: delay-insensitive comparison of a dual-rail character with a constant code.
//
// A completion C gate over the per-bit ORs of the two rails goes high once every bit of
// the character is valid and low once every bit is invalid again. The '1' output rail is
// a C gate of that completion signal and of the AND of the rails that spell CODE; the
// '0' output rail is a C gate of the completion signal and of the OR of the rails that
// differ from CODE. This is far smaller than the one-C-gate-per-minterm procedure used
// for the other cells. The completion gate and the output C gates follow the paper's
// four-bit example; which rails feed the match and mismatch gates is read from the
// decoder's function (output '1' exactly when the character equals the code).
//
// Interface: ch (W dual-rail bits), y (dual-rail: '1' = ch equals CODE).
module di_decoder
  import re_pkg::*;
#(
  parameter int           W    = 8,
  parameter logic [W-1:0] CODE = W'(8'h41)
) (
  input  rail2_t [W-1:0] ch,
  output rail2_t         y
);
  logic [W-1:0] bit_valid;
  logic [W-1:0] bit_match;
  logic [W-1:0] bit_miss;
  logic         all_valid;

  for (genvar b = 0; b < W; b++) begin : g_bit
    assign bit_valid[b] = ch[b].r0 | ch[b].r1;
    assign bit_match[b] = CODE[b] ? ch[b].r1 : ch[b].r0;
    assign bit_miss[b]  = CODE[b] ? ch[b].r0 : ch[b].r1;
  end

  c_element #(.N(W)) u_valid (.in(bit_valid), .rst(1'b0), .out(all_valid));
  c_element #(.N(2)) u_one   (.in({all_valid, &bit_match}), .rst(1'b0), .out(y.r1));
  c_element #(.N(2)) u_zero  (.in({all_valid, |bit_miss}),  .rst(1'b0), .out(y.r0));
endmodule
