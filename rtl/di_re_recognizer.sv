// di_re_recognizer: self-timed, delay-insensitive expression-tree recognizer.
//
// The tri-valued synchronous recognizer is a Moore machine whose whole state is one bit
// per leaf, so it can be made self-timed by swapping its parts one for one:
//   - the leaf registers become one self-timed register (si_register), one bit per leaf;
//   - every cell's logic becomes a delay-insensitive circuit of C gates on one-hot rails:
//     two rails per ENB link and per character bit, three rails per RES link;
//   - the clock becomes a 4-phase handshake on ack.
// Unfolded, the circuit reads left to right as: leaf logic (decoder AND ENB) -> register
// -> RES tree up to the root -> ENB tree back down to the leaves, the tree shape and the
// constant circuitry per cell being those of the synchronous recognizer.
//
// Protocol, per character: wait for ack low; drive every bit of ch and enb_root to a
// valid value; wait for ack high; return all of them to invalid (all rails low); wait for
// ack low. After ack falls, res_root becomes valid with the result for the characters
// consumed so far (the same value res_root has one clock cycle later in the synchronous
// recognizer); res_root is a one-hot code and so shows by itself when it is valid. A
// string ended at the current position when res_root is 1, or x while enb_root is 1.
// Before the first character, hold rst high with all inputs invalid and then release it:
// ack is low, every leaf state becomes '0', and res_root turns valid with the result for
// the empty input. Apart from rst, which is a plain level, nothing here depends on gate or
// wire delays outside the C gates and FIFO elements.
//
// Deferred assertions check that every RES and ENB link carries at most one rail high.
//
// The structure (leaf logic, register, up tree, down tree, one handshake) is the paper's;
// the reset and the point at which the result is read are this design's.
module di_re_recognizer
  import re_pkg::*;
#(
  parameter int                  N_NODES = DEFAULT_NODES,
  parameter node_t [N_NODES-1:0] TREE    = DEFAULT_TREE,
  parameter int                  W       = 8
) (
  input  logic           rst,
  input  rail2_t [W-1:0] ch,
  input  rail2_t         enb_root,
  output rail3_t         res_root,
  output logic           ack
);
  // Number of leaves, and the state-register bit of leaf i (leaves in index order).
  function automatic int leaf_slot(input int i);
    int c = 0;
    for (int j = 0; j < i; j++) if (TREE[j].op == OP_LEAF) c++;
    return c;
  endfunction

  localparam int N_LEAVES = leaf_slot(N_NODES);

  rail3_t res [N_NODES];
  rail2_t enb [N_NODES];
  rail2_t next_state [N_LEAVES];
  rail2_t state      [N_LEAVES];
  rail2_t [N_LEAVES-1:0] reg_d, reg_q;

  assign enb[0]   = enb_root;
  assign res_root = res[0];

  for (genvar k = 0; k < N_LEAVES; k++) begin : g_reg
    assign reg_d[k] = next_state[k];
    assign state[k] = reg_q[k];
  end

  si_register #(.W(N_LEAVES)) u_reg (.rst, .d(reg_d), .q(reg_q), .ack);

  // 1-of-N code: no link ever carries two values at once.
  for (genvar i = 0; i < N_NODES; i++) begin : g_code_check
    always_comb begin
      assert final ($onehot0(res[i])) else $error("RES link %0d not 1-of-3", i);
      assert final ($onehot0(enb[i])) else $error("ENB link %0d not 1-of-2", i);
    end
  end

  for (genvar i = 0; i < N_NODES; i++) begin : g_node
    localparam int L = int'(TREE[i].left);
    localparam int R = int'(TREE[i].right);
    if (TREE[i].op == OP_LEAF) begin : g_leaf
      localparam int S = leaf_slot(i);
      di_leaf_cell #(.W(W), .CODE(W'(TREE[i].ch))) u_cell (
        .ch, .enb(enb[i]), .next_state(next_state[S])
      );
      assign res[i] = '{r1: state[S].r1, rx: 1'b0, r0: state[S].r0};
    end else if (TREE[i].op == OP_UNION) begin : g_union
      di_union_cell u_cell (
        .enb1(enb[i]), .res1(res[i]),
        .enb2(enb[L]), .res2(res[L]),
        .enb3(enb[R]), .res3(res[R])
      );
    end else if (TREE[i].op == OP_CONCAT) begin : g_concat
      di_concat_cell u_cell (
        .enb1(enb[i]), .res1(res[i]),
        .enb2(enb[L]), .res2(res[L]),
        .enb3(enb[R]), .res3(res[R])
      );
    end else begin : g_star
      di_star_cell u_cell (
        .enb1(enb[i]), .res1(res[i]),
        .enb2(enb[L]), .res2(res[L])
      );
    end
  end
endmodule
