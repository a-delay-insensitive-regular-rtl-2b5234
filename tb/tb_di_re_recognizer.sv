// tb_di_re_recognizer: test of the self-timed recognizer on two expressions,
// (A*B*C*D*E*F*G*H*)* and (A;B + C*)* ; D* ; (E + F;G).
//
// For 300 random strings per expression the characters are passed in one 4-phase
// handshake each, the character bits and the root enable made valid one at a time in
// random order. Every handshake must complete (ack stays low until the last input is
// valid, then rises, and falls once the inputs are invalid again), the root result must be invalid while ack is high
// and a valid one-hot code after ack falls, and the match it implies (1, or x while the
// root is enabled) must equal the reference model's decision for the characters so far.
module tb_di_re_recognizer;
  import re_pkg::*, tb_re_ref_pkg::*;

  localparam int W = 8;

  logic rst;
  rail2_t [W-1:0] ch;
  rail2_t enb_root;
  rail3_t res_a, res_b;
  logic ack_a, ack_b;
  int checks = 0, failures = 0;
  int n_acc = 0, n_rej = 0, n_hs = 0;

  di_re_recognizer u_a (.rst, .ch, .enb_root, .res_root(res_a), .ack(ack_a));
  di_re_recognizer #(.N_NODES(ALT_NODES), .TREE(ALT_TREE)) u_b (
    .rst, .ch, .enb_root, .res_root(res_b), .ack(ack_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic wait_ack(input bit which, input bit level);
    int t = 0;
    while (((which == 0) ? ack_a : ack_b) != level && t < 100) begin #1; t++; end
    check(((which == 0) ? ack_a : ack_b) == level, $sformatf("ack %0d", level));
  endtask

  task automatic run(input int which, input int n);
    byte s [MAXL];
    bit enb [MAXL+1];
    int len;
    int order [W+1];
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
      ch = '0; enb_root = '0;
      rst = 1;
      #5 rst = 0;
      #5;
      for (int p = 0; p <= len; p++) begin
        bit exp, m;
        rail3_t r = (which == 0) ? res_a : res_b;
        check($onehot(r), $sformatf("result valid, position %0d", p));
        m = r.r1 || (r.rx && enb[p]);
        if (which == 0) exp = accepts(DEFAULT_TREE, DEFAULT_NODES, s, p, enb);
        else            exp = accepts(ALT_TREE, ALT_NODES, s, p, enb);
        check(m == exp, $sformatf("tree %0d string len %0d position %0d", which, len, p));
        if (exp) n_acc++; else n_rej++;
        if (p < len) begin
          wait_ack(which[0], 1'b0);
          // inputs become valid one at a time: ack must wait for the last one
          for (int j = 0; j <= W; j++) order[j] = j;
          order.shuffle();
          for (int j = 0; j <= W; j++) begin
            if (order[j] == W) enb_root = enb[p] ? 2'b10 : 2'b01;
            else ch[order[j]] = s[p][order[j]] ? 2'b10 : 2'b01;
            #1;
            if (j < W) check(((which == 0) ? ack_a : ack_b) == 1'b0, "ack waits for every input");
          end
          wait_ack(which[0], 1'b1);
          check(((which == 0) ? res_a : res_b) == R3_NULL, "result invalid while ack high");
          ch = '0;
          enb_root = R2_NULL;
          wait_ack(which[0], 1'b0);
          n_hs++;
          #1;
        end
      end
    end
  endtask

  initial begin
    rst = 1; ch = '0; enb_root = '0;
    run(0, 300);
    run(1, 300);
    check(n_acc > 0 && n_rej > 0, "both outcomes seen");
    $display("accepted %0d rejected %0d handshakes %0d", n_acc, n_rej, n_hs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
