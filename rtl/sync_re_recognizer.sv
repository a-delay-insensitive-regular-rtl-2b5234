// sync_re_recognizer: synchronous expression-tree recognizer with tri-valued results.
//
// The parse tree TREE of a regular expression is built out of cells: one leaf cell per
// character (holding the only state, one bit each) and one operator cell per union,
// concatenation and star. Each link of the tree carries ENB towards the leaves and RES
// towards the root. RES takes the values 0, x and 1, where x stands for "equal to the
// ENB of this cycle"; every RES is a function of RES values below it only, so all
// signals settle after one pass up the tree and one pass down, and the critical path is
// proportional to the tree height rather than to the tree size.
//
// Protocol: hold rst for a cycle to clear all leaf registers. Then present the k-th
// character on ch_in during the k-th cycle, with enb_root = 1 during the first cycle only
// (raising it again later starts further matches from that position). During cycle i,
// res_root reflects the characters of cycles 1..i-1; match = 1 when some string of the
// language ended there: res_root == 1, or res_root == x while enb_root == 1 (the empty
// string). The match output is a convenience of this design; the tree itself only
// produces res_root.
//
// Every cell is combinational except the leaves, so each input character costs exactly
// one clock cycle.
//
// The cells, the tree and the start-up rule (leaves cleared, root enabled in the first
// cycle) are the paper's; the parameterised tree, the reset style and the match output are
// this design's.
module sync_re_recognizer
  import re_pkg::*;
#(
  parameter int                    N_NODES = DEFAULT_NODES,
  parameter node_t [N_NODES-1:0]   TREE    = DEFAULT_TREE
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enb_root,
  input  logic [7:0] ch_in,
  output tri_e       res_root,
  output logic       match
);
  // res[i] and enb[i] are the two signals of the link above node i.
  tri_e res [N_NODES];
  logic enb [N_NODES];

  assign enb[0]   = enb_root;
  assign res_root = res[0];
  assign match    = (res[0] == T1) || ((res[0] == TX) && enb_root);

  for (genvar i = 0; i < N_NODES; i++) begin : g_node
    localparam int L = int'(TREE[i].left);
    localparam int R = int'(TREE[i].right);
    if (TREE[i].op == OP_LEAF) begin : g_leaf
      sync_leaf_cell #(.CH(TREE[i].ch)) u_cell (
        .clk, .rst, .enb(enb[i]), .ch_in, .res(res[i])
      );
    end else if (TREE[i].op == OP_UNION) begin : g_union
      sync_union_cell u_cell (
        .enb1(enb[i]), .res1(res[i]),
        .enb2(enb[L]),  .res2(res[L]),
        .enb3(enb[R]), .res3(res[R])
      );
    end else if (TREE[i].op == OP_CONCAT) begin : g_concat
      sync_concat_cell u_cell (
        .enb1(enb[i]), .res1(res[i]),
        .enb2(enb[L]),  .res2(res[L]),
        .enb3(enb[R]), .res3(res[R])
      );
    end else begin : g_star
      sync_star_cell u_cell (
        .enb1(enb[i]), .res1(res[i]),
        .enb2(enb[L]),  .res2(res[L])
      );
    end
  end

  // The tree must be well formed: children come after their parent.
  initial begin
    for (int i = 0; i < N_NODES; i++) begin
      if (TREE[i].op != OP_LEAF) begin
        assert (int'(TREE[i].left) > i && int'(TREE[i].left) < N_NODES)
          else $error("node %0d: bad left child", i);
        if (TREE[i].op != OP_STAR)
          assert (int'(TREE[i].right) > i && int'(TREE[i].right) < N_NODES)
            else $error("node %0d: bad right child", i);
      end
    end
  end
endmodule
