// tb_sync_re_recognizer: test of the synchronous tri-valued recognizer on two
// expressions, (A*B*C*D*E*F*G*H*)* and (A;B + C*)* ; D* ; (E + F;G).
//
// For 300 random strings per expression (half of them members of the language, some of
// those with one character changed), one character is presented per clock cycle and
// the match output is checked in every cycle against a reference model that decides
// membership by dynamic programming over substrings. One string in five enables the root
// at random positions as well as the first. The result for the first k characters must
// appear in the cycle right after the k-th character: one character per cycle.
module tb_sync_re_recognizer;
  import re_pkg::*, tb_re_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, enb_root;
  logic [7:0] ch_in;
  tri_e res_a, res_b;
  logic match_a, match_b;
  int checks = 0, failures = 0;
  int n_acc = 0, n_rej = 0;

  sync_re_recognizer u_a (.clk, .rst, .enb_root, .ch_in, .res_root(res_a), .match(match_a));
  sync_re_recognizer #(.N_NODES(ALT_NODES), .TREE(ALT_TREE)) u_b (
    .clk, .rst, .enb_root, .ch_in, .res_root(res_b), .match(match_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic run(input int which, input int n);
    byte s [MAXL];
    bit enb [MAXL+1];
    int len;
    for (int k = 0; k < n; k++) begin
      len = 0;
      for (int i = 0; i < MAXL; i++) s[i] = 0;
      if ($urandom_range(1) == 0) begin
        if (which == 0) gen_member(DEFAULT_TREE, 0, s, len);
        else            gen_member(ALT_TREE, 0, s, len);
        if (len > 12) len = 12;
        if (len > 0 && $urandom_range(2) == 0) s[$urandom_range(len - 1)] = byte'(8'h41 + $urandom_range(8));
      end else begin
        len = $urandom_range(10);
        for (int i = 0; i < len; i++) s[i] = byte'(8'h41 + $urandom_range(8));
      end
      for (int i = 0; i <= MAXL; i++) enb[i] = (i == 0);
      if ($urandom_range(4) == 0) for (int i = 1; i <= len; i++) enb[i] = ($urandom_range(3) == 0);
      rst = 1;
      @(posedge clk); #1;
      rst = 0;
      for (int p = 0; p <= len; p++) begin
        bit exp;
        enb_root = enb[p];
        ch_in = (p < len) ? s[p] : 8'h00;
        #1;
        if (which == 0) exp = accepts(DEFAULT_TREE, DEFAULT_NODES, s, p, enb);
        else            exp = accepts(ALT_TREE, ALT_NODES, s, p, enb);
        check(((which == 0) ? match_a : match_b) == exp,
              $sformatf("tree %0d string len %0d position %0d", which, len, p));
        if (exp) n_acc++; else n_rej++;
        @(posedge clk); #1;
      end
    end
  endtask

  initial begin
    rst = 1; enb_root = 0; ch_in = 0;
    run(0, 300);
    run(1, 300);
    check(n_acc > 0 && n_rej > 0, "both outcomes seen");
    $display("accepted %0d rejected %0d", n_acc, n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
