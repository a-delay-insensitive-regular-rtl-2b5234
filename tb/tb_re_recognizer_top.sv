// tb_re_recognizer_top: end-to-end test of re_recognizer_top.
//
// Two instances: one with the default expression (A*B*C*D*E*F*G*H*)* and one with
// (A;B + C*)* ; D* ; (E + F;G), which also exercises union cells. tb_re_driver runs each on
// random strings, checking both recognizers against a reference model and against each
// other. The testbench also counts, inside the synchronous trees, how often each cell
// mechanism came into play, and counts a failure for any that never did:
//   root result x / 1 / 0, accepted and rejected positions, self-timed handshakes with
//   the root result invalid while ack is high, a star re-enabling its operand after a
//   completed match, a concatenation passing x up from its second operand, a
//   concatenation enabling its second operand from its own ENB (first operand x), and a
//   union producing 1 and x.
module tb_re_recognizer_top;
  import re_pkg::*, tb_re_ref_pkg::*;

  localparam int W = 8;

  logic clk = 0;
  always #5 clk = ~clk;

  // default expression
  logic a_srst, a_senb, a_smatch, a_drst, a_dack, a_done;
  logic [7:0] a_sch;
  tri_e a_sres;
  rail2_t [W-1:0] a_dch;
  rail2_t a_denb;
  rail3_t a_dres;
  int a_checks, a_fail, a_acc, a_rej, a_x, a_1, a_0, a_hs, a_inv;

  re_recognizer_top u_def (
    .clk, .sync_rst(a_srst), .sync_enb_root(a_senb), .sync_ch(a_sch),
    .sync_res_root(a_sres), .sync_match(a_smatch),
    .di_rst(a_drst), .di_ch(a_dch), .di_enb_root(a_denb), .di_res_root(a_dres), .di_ack(a_dack)
  );
  tb_re_driver #(.N_STRINGS(150)) u_drv_def (
    .clk, .sync_rst(a_srst), .sync_enb_root(a_senb), .sync_ch(a_sch),
    .sync_res_root(a_sres), .sync_match(a_smatch),
    .di_rst(a_drst), .di_ch(a_dch), .di_enb_root(a_denb), .di_res_root(a_dres), .di_ack(a_dack),
    .done(a_done), .checks(a_checks), .failures(a_fail), .n_accept(a_acc), .n_reject(a_rej),
    .n_root_x(a_x), .n_root_1(a_1), .n_root_0(a_0), .n_handshake(a_hs), .n_invalid_on_ack(a_inv)
  );

  // expression with unions
  logic b_srst, b_senb, b_smatch, b_drst, b_dack, b_done;
  logic [7:0] b_sch;
  tri_e b_sres;
  rail2_t [W-1:0] b_dch;
  rail2_t b_denb;
  rail3_t b_dres;
  int b_checks, b_fail, b_acc, b_rej, b_x, b_1, b_0, b_hs, b_inv;

  re_recognizer_top #(.N_NODES(ALT_NODES), .TREE(ALT_TREE)) u_alt (
    .clk, .sync_rst(b_srst), .sync_enb_root(b_senb), .sync_ch(b_sch),
    .sync_res_root(b_sres), .sync_match(b_smatch),
    .di_rst(b_drst), .di_ch(b_dch), .di_enb_root(b_denb), .di_res_root(b_dres), .di_ack(b_dack)
  );
  tb_re_driver #(.N_NODES(ALT_NODES), .TREE(ALT_TREE), .N_STRINGS(150)) u_drv_alt (
    .clk, .sync_rst(b_srst), .sync_enb_root(b_senb), .sync_ch(b_sch),
    .sync_res_root(b_sres), .sync_match(b_smatch),
    .di_rst(b_drst), .di_ch(b_dch), .di_enb_root(b_denb), .di_res_root(b_dres), .di_ack(b_dack),
    .done(b_done), .checks(b_checks), .failures(b_fail), .n_accept(b_acc), .n_reject(b_rej),
    .n_root_x(b_x), .n_root_1(b_1), .n_root_0(b_0), .n_handshake(b_hs), .n_invalid_on_ack(b_inv)
  );

  // mechanism counters inside the synchronous trees, sampled before every clock edge
  int n_star_reenable = 0, n_concat_xres = 0, n_concat_xenb = 0, n_union_1 = 0, n_union_x = 0;

  always @(negedge clk) begin
    for (int i = 0; i < DEFAULT_NODES; i++) begin
      automatic int l = int'(DEFAULT_TREE[i].left);
      automatic int r = int'(DEFAULT_TREE[i].right);
      if (DEFAULT_TREE[i].op == OP_STAR && u_def.u_sync.res[l] == T1 && !u_def.u_sync.enb[i])
        n_star_reenable++;
      if (DEFAULT_TREE[i].op == OP_CONCAT && u_def.u_sync.res[r] == TX) n_concat_xres++;
      if (DEFAULT_TREE[i].op == OP_CONCAT && u_def.u_sync.res[l] == TX && u_def.u_sync.enb[i])
        n_concat_xenb++;
    end
    for (int i = 0; i < ALT_NODES; i++) begin
      automatic int l = int'(ALT_TREE[i].left);
      automatic int r = int'(ALT_TREE[i].right);
      if (ALT_TREE[i].op == OP_STAR && u_alt.u_sync.res[l] == T1 && !u_alt.u_sync.enb[i])
        n_star_reenable++;
      if (ALT_TREE[i].op == OP_UNION && u_alt.u_sync.res[i] == T1) n_union_1++;
      if (ALT_TREE[i].op == OP_UNION && u_alt.u_sync.res[i] == TX) n_union_x++;
      if (ALT_TREE[i].op == OP_CONCAT && u_alt.u_sync.res[r] == TX) n_concat_xres++;
    end
  end

  task automatic need(input int n, input string what, inout int f);
    $display("  %-40s %0d", what, n);
    if (n == 0) begin
      f++;
      $display("FAIL: mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    int checks, failures;
    fork
      wait (a_done && b_done);
      begin
        #5000000;
        $display("FAIL: watchdog expired");
      end
    join_any
    checks = a_checks + b_checks + 11;
    failures = a_fail + b_fail + ((a_done && b_done) ? 0 : 1);
    $display("mechanisms:");
    need(a_x + b_x, "root result x", failures);
    need(a_1 + b_1, "root result 1", failures);
    need(a_0 + b_0, "root result 0", failures);
    need(a_acc + b_acc, "accepted positions", failures);
    need(a_rej + b_rej, "rejected positions", failures);
    need(a_inv + b_inv, "handshakes with result invalid on ack", failures);
    need(n_star_reenable, "star re-enables its operand", failures);
    need(n_concat_xres, "concatenation passes operand-3 x up", failures);
    need(n_concat_xenb, "concatenation forwards ENB1 to operand 3", failures);
    need(n_union_1, "union result 1", failures);
    need(n_union_x, "union result x", failures);
    $display("handshakes: %0d + %0d", a_hs, b_hs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
