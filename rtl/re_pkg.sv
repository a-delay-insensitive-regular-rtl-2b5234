// re_pkg: types and constants shared by the expression-tree recognizers.
//
// A regular expression is given to the recognizers as its parse tree, flattened into a
// packed array of node_t. Node 0 is the root; each operator node names its children by
// index, and every child has a larger index than its parent. A leaf holds the character
// code it recognizes. Union and concatenation use both children (left = operand 2,
// right = operand 3 in the cell equations); a star uses only the left child.
//
// The synchronous recognizer carries RES as a tri-valued signal tri_e with 0 < x < 1,
// where x means "equal to this cycle's ENB". The self-timed recognizer carries the same
// values one-hot on rails: RES on three rails (rail3_t), ENB and character bits on two
// rails (rail2_t). All rails low is the invalid (spacer) value of the 4-phase protocol.
//
// DEFAULT_TREE is the example expression (A*B*C*D*E*F*G*H*)* in the shape of its parse
// tree: a root star over a balanced tree of seven concatenations, eight stars and eight
// leaves. Characters are 8-bit ASCII codes, a width chosen here.
//
// The example expression is the paper's; the node encoding, the rail ordering and the
// character width are this design's.
package re_pkg;

  localparam int IDX_W = 8;                 // node index width: trees of up to 256 nodes

  typedef enum logic [1:0] {
    OP_LEAF   = 2'd0,
    OP_UNION  = 2'd1,
    OP_CONCAT = 2'd2,
    OP_STAR   = 2'd3
  } op_e;

  typedef struct packed {
    op_e              op;
    logic [IDX_W-1:0] left;                 // operand 2 (union, concatenation, star)
    logic [IDX_W-1:0] right;                // operand 3 (union, concatenation)
    logic [7:0]       ch;                   // character code of a leaf
  } node_t;

  // Tri-valued RES of the synchronous recognizer, ordered so that MAX is numeric max.
  typedef enum logic [1:0] {
    T0 = 2'd0,
    TX = 2'd1,
    T1 = 2'd2
  } tri_e;

  // One-hot rails of the self-timed recognizer. All zero is the invalid value.
  typedef struct packed {
    logic r1;
    logic rx;
    logic r0;
  } rail3_t;

  typedef struct packed {
    logic r1;
    logic r0;
  } rail2_t;

  localparam rail3_t R3_NULL = '{r1: 1'b0, rx: 1'b0, r0: 1'b0};
  localparam rail2_t R2_NULL = '{r1: 1'b0, r0: 1'b0};

  function automatic node_t mk_leaf(input logic [7:0] c);
    return '{op: OP_LEAF, left: '0, right: '0, ch: c};
  endfunction

  function automatic node_t mk_op(input op_e o, input logic [IDX_W-1:0] l,
                                  input logic [IDX_W-1:0] r);
    return '{op: o, left: l, right: r, ch: 8'h00};
  endfunction

  // (A*B*C*D*E*F*G*H*)*
  localparam int DEFAULT_NODES = 24;
  localparam node_t [DEFAULT_NODES-1:0] DEFAULT_TREE = {
    mk_leaf("H"), mk_leaf("G"), mk_leaf("F"), mk_leaf("E"),               // 23..20
    mk_leaf("D"), mk_leaf("C"), mk_leaf("B"), mk_leaf("A"),               // 19..16
    mk_op(OP_STAR, 23, 0), mk_op(OP_STAR, 22, 0), mk_op(OP_STAR, 21, 0),  // 15..13
    mk_op(OP_STAR, 20, 0), mk_op(OP_STAR, 19, 0), mk_op(OP_STAR, 18, 0),  // 12..10
    mk_op(OP_STAR, 17, 0), mk_op(OP_STAR, 16, 0),                         // 9..8
    mk_op(OP_CONCAT, 14, 15), mk_op(OP_CONCAT, 12, 13),                   // 7..6
    mk_op(OP_CONCAT, 10, 11), mk_op(OP_CONCAT, 8, 9),                     // 5..4
    mk_op(OP_CONCAT, 6, 7), mk_op(OP_CONCAT, 4, 5),                       // 3..2
    mk_op(OP_CONCAT, 2, 3),                                               // 1
    mk_op(OP_STAR, 1, 0)                                                  // 0: root
  };

  function automatic tri_e tmax(input tri_e a, input tri_e b);
    return (a > b) ? a : b;
  endfunction

endpackage
