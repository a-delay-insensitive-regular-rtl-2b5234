// tb_re_ref_pkg: reference model and string generator for the recognizer testbenches.
//
// accepts() decides, by dynamic programming over substrings and without using the cell
// equations, whether some string of the expression's language ends after the first p
// characters of s, starting at any position q <= p at which enb[q] was 1:
//   M[n][i][j] = s[i..j) is in L(node n)
//   leaf:   j == i+1 and s[i] == code
//   union:  M[l][i][j] or M[r][i][j]
//   concat: M[l][i][k] and M[r][k][j] for some i <= k <= j
//   star:   i == j, or M[c][i][k] and M[n][k][j] for some i < k <= j
// Children have larger indices than their parents, so nodes are evaluated from the last
// index down. gen_member() produces a random string of the language (star: 0..2 repeats).
package tb_re_ref_pkg;
  import re_pkg::*;

  localparam int MAXN = 64;
  localparam int MAXL = 24;

  function automatic bit accepts(input node_t [255:0] t, input int n,
                                 input byte s[MAXL], input int p, input bit enb[MAXL+1]);
    bit m [MAXN][MAXL+1][MAXL+1];
    for (int a = 0; a < MAXN; a++)
      for (int i = 0; i <= MAXL; i++)
        for (int j = 0; j <= MAXL; j++) m[a][i][j] = 0;
    for (int nd = n - 1; nd >= 0; nd--) begin
      int l = int'(t[nd].left);
      int r = int'(t[nd].right);
      for (int i = p; i >= 0; i--) begin
        for (int j = i; j <= p; j++) begin
          bit v = 0;
          case (t[nd].op)
            OP_LEAF:   v = (j == i + 1) && (s[i] == t[nd].ch);
            OP_UNION:  v = m[l][i][j] || m[r][i][j];
            OP_CONCAT: for (int k = i; k <= j; k++) v |= m[l][i][k] && m[r][k][j];
            default: begin
              v = (i == j);
              for (int k = i + 1; k <= j; k++) v |= m[l][i][k] && m[nd][k][j];
            end
          endcase
          m[nd][i][j] = v;
        end
      end
    end
    for (int q = 0; q <= p; q++) if (enb[q] && m[0][q][p]) return 1;
    return 0;
  endfunction

  // Append a random member of L(node nd) to s, up to MAXL characters.
  function automatic void gen_member(input node_t [255:0] t, input int nd,
                                     inout byte s[MAXL], inout int len);
    case (t[nd].op)
      OP_LEAF:   if (len < MAXL) begin s[len] = byte'(t[nd].ch); len++; end
      OP_UNION:  gen_member(t, ($urandom_range(1) != 0) ? int'(t[nd].left) : int'(t[nd].right), s, len);
      OP_CONCAT: begin
        gen_member(t, int'(t[nd].left), s, len);
        gen_member(t, int'(t[nd].right), s, len);
      end
      default: begin
        int reps = $urandom_range(2);
        for (int k = 0; k < reps; k++) gen_member(t, int'(t[nd].left), s, len);
      end
    endcase
  endfunction

  // (A;B + C*)* ; D* ; (E + F;G): a second expression that also uses union cells.
  localparam int ALT_NODES = 16;
  localparam node_t [ALT_NODES-1:0] ALT_TREE = {
    mk_leaf("C"),                                               // 15
    mk_leaf("G"), mk_leaf("F"), mk_leaf("B"), mk_leaf("A"),    // 14..11
    mk_op(OP_CONCAT, 13, 14),                                   // 10: F;G
    mk_leaf("E"), mk_leaf("D"), mk_op(OP_STAR, 15, 0),          // 9..7
    mk_op(OP_CONCAT, 11, 12),                                   // 6: A;B
    mk_op(OP_UNION, 9, 10),                                     // 5: E + F;G
    mk_op(OP_STAR, 8, 0),                                       // 4: D*
    mk_op(OP_UNION, 6, 7),                                      // 3: A;B + C*
    mk_op(OP_CONCAT, 4, 5),                                     // 2
    mk_op(OP_STAR, 3, 0),                                       // 1
    mk_op(OP_CONCAT, 1, 2)                                      // 0: root
  };
endpackage
