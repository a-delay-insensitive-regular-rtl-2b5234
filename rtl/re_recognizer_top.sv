// re_recognizer_top: the two recognizers for one regular expression, side by side.
//
// sync_re_recognizer is the clocked tri-valued expression-tree recognizer; it consumes
// one character per clock cycle. di_re_recognizer is its self-timed, delay-insensitive
// version, which consumes one character per 4-phase handshake on ack. Both are built
// from the same parse tree TREE (default: (A*B*C*D*E*F*G*H*)*) and, fed the same
// characters, produce the same root result. Each keeps its own ports; they share only
// the parameters.
//
// Synchronous side: clk, sync_rst, sync_enb_root, sync_ch, sync_res_root, sync_match
// (see sync_re_recognizer). Self-timed side: di_rst, di_ch, di_enb_root, di_res_root,
// di_ack (see di_re_recognizer).
//
// Placing the two recognizers side by side in one top is this design's choice; each is
// a complete recognizer on its own.
module re_recognizer_top
  import re_pkg::*;
#(
  parameter int                  N_NODES = DEFAULT_NODES,
  parameter node_t [N_NODES-1:0] TREE    = DEFAULT_TREE,
  parameter int                  W       = 8
) (
  input  logic           clk,
  input  logic           sync_rst,
  input  logic           sync_enb_root,
  input  logic [7:0]     sync_ch,
  output tri_e           sync_res_root,
  output logic           sync_match,
  input  logic           di_rst,
  input  rail2_t [W-1:0] di_ch,
  input  rail2_t         di_enb_root,
  output rail3_t         di_res_root,
  output logic           di_ack
);
  sync_re_recognizer #(.N_NODES(N_NODES), .TREE(TREE)) u_sync (
    .clk, .rst(sync_rst), .enb_root(sync_enb_root), .ch_in(sync_ch),
    .res_root(sync_res_root), .match(sync_match)
  );

  di_re_recognizer #(.N_NODES(N_NODES), .TREE(TREE), .W(W)) u_di (
    .rst(di_rst), .ch(di_ch), .enb_root(di_enb_root), .res_root(di_res_root), .ack(di_ack)
  );
endmodule
