// tb_re_driver: stimulus and checking for one re_recognizer_top instance.
//
// For each of N_STRINGS strings (half drawn from the expression's language, some of
// those with one character changed, the rest random over 'A'..'I'), the driver
//   1. runs the synchronous recognizer one character per clock cycle and checks, in
//      every cycle, sync_match against the reference model of tb_re_ref_pkg;
//   2. runs the self-timed recognizer one 4-phase handshake per character and checks
//      that ack rises and falls, that the root result is invalid while ack is high, that
//      it is a valid one-hot code after ack falls, that it equals the synchronous root
//      result for the same position, and that the match it implies equals the reference.
// Most strings enable the root in the first position only; one in five enables it at
// random positions, which starts matches there as well.
module tb_re_driver
  import re_pkg::*, tb_re_ref_pkg::*;
#(
  parameter int                  N_NODES   = DEFAULT_NODES,
  parameter node_t [N_NODES-1:0] TREE      = DEFAULT_TREE,
  parameter int                  W         = 8,
  parameter int                  N_STRINGS = 100
) (
  input  logic           clk,
  output logic           sync_rst,
  output logic           sync_enb_root,
  output logic [7:0]     sync_ch,
  input  tri_e           sync_res_root,
  input  logic           sync_match,
  output logic           di_rst,
  output rail2_t [W-1:0] di_ch,
  output rail2_t         di_enb_root,
  input  rail3_t         di_res_root,
  input  logic           di_ack,
  output logic           done,
  output int             checks,
  output int             failures,
  output int             n_accept,
  output int             n_reject,
  output int             n_root_x,
  output int             n_root_1,
  output int             n_root_0,
  output int             n_handshake,
  output int             n_invalid_on_ack
);
  byte s [MAXL];
  bit  enb [MAXL+1];
  int  len;
  tri_e sres [MAXL+1];

  function automatic tri_e decode3(input rail3_t r);
    return r.r1 ? T1 : (r.rx ? TX : T0);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (string len %0d)", what, len);
    end
  endtask

  task automatic make_string();
    len = 0;
    for (int i = 0; i < MAXL; i++) s[i] = 0;
    if ($urandom_range(1) == 0) begin
      gen_member(TREE, 0, s, len);
      if (len > 12) len = 12;
      if (len > 0 && $urandom_range(2) == 0) s[$urandom_range(len - 1)] = byte'(8'h41 + $urandom_range(8));
    end else begin
      len = $urandom_range(10);
      for (int i = 0; i < len; i++) s[i] = byte'(8'h41 + $urandom_range(8));
    end
    for (int i = 0; i <= MAXL; i++) enb[i] = (i == 0);
    if ($urandom_range(4) == 0)
      for (int i = 1; i <= len; i++) enb[i] = ($urandom_range(3) == 0);
  endtask

  task automatic run_sync();
    sync_rst = 1'b1;
    @(posedge clk); #1;
    sync_rst = 1'b0;
    for (int p = 0; p <= len; p++) begin
      bit exp;
      sync_enb_root = enb[p];
      sync_ch = (p < len) ? s[p] : 8'h00;
      #1;
      exp = accepts(TREE, N_NODES, s, p, enb);
      check(sync_match == exp, $sformatf("sync match at position %0d", p));
      sres[p] = sync_res_root;
      @(posedge clk); #1;
    end
    sync_enb_root = 1'b0;
  endtask

  task automatic wait_ack(input bit level);
    int t = 0;
    while (di_ack != level && t < 100) begin #1; t++; end
    check(di_ack == level, $sformatf("ack %0d", level));
  endtask

  task automatic run_di();
    di_ch = '0;
    di_enb_root = '0;
    di_rst = 1'b1;
    #5 di_rst = 1'b0;
    #5;
    for (int p = 0; p <= len; p++) begin
      tri_e r;
      bit exp, m;
      check($onehot(di_res_root), $sformatf("di result valid at position %0d: %b", p, di_res_root));
      r = decode3(di_res_root);
      check(r == sres[p], $sformatf("di result equals sync result at %0d", p));
      exp = accepts(TREE, N_NODES, s, p, enb);
      m = (r == T1) || (r == TX && enb[p]);
      check(m == exp, $sformatf("di match at position %0d", p));
      if (r == TX) n_root_x++;
      else if (r == T1) n_root_1++;
      else n_root_0++;
      if (exp) n_accept++; else n_reject++;
      if (p < len) begin
        wait_ack(1'b0);
        for (int b = 0; b < W; b++) begin
          di_ch[b].r1 = s[p][b];
          di_ch[b].r0 = !s[p][b];
        end
        di_enb_root.r1 = enb[p];
        di_enb_root.r0 = !enb[p];
        #1;
        wait_ack(1'b1);
        check(di_res_root == R3_NULL, "di result invalid while ack is high");
        if (di_res_root == R3_NULL) n_invalid_on_ack++;
        di_ch = '0;
        di_enb_root = R2_NULL;
        #1;
        wait_ack(1'b0);
        n_handshake++;
        #1;
      end
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    n_accept = 0; n_reject = 0; n_root_x = 0; n_root_1 = 0; n_root_0 = 0;
    n_handshake = 0; n_invalid_on_ack = 0;
    sync_rst = 1; sync_enb_root = 0; sync_ch = 0;
    di_rst = 1; di_ch = '0; di_enb_root = '0;
    repeat (2) @(posedge clk);
    for (int k = 0; k < N_STRINGS; k++) begin
      make_string();
      run_sync();
      run_di();
    end
    done = 1;
  end
endmodule
