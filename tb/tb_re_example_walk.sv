// tb_re_example_walk: directed test of the example (A*B*C*D*E*F*G*H*)*, both recognizers.
//
// This is the case in which the two-valued expression-tree recognizer has its longest
// settling path: the last character read was 'H', so leaf H holds 1 and every other leaf
// 0, and the enable must travel from leaf H up to the root star and back down to every
// leaf. After "H" has been read (root enabled in the first cycle only), the testbench
// checks the value on every link of the tree:
//   RES: H* and every concatenation on the path from H* to the root are 1, the root star
//        is 1, the other stars and the concatenations over them only are x;
//   ENB: every link is enabled although enb_root is now 0 (the root star re-enables).
// The synchronous links are compared for RES and ENB, the self-timed RES links after the
// handshake for 'H'. Then a second 'H' and an 'A' must still be accepted, and an 'I'
// must be rejected.
module tb_re_example_walk;
  import re_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic srst, senb, smatch, drst, dack;
  logic [7:0] sch;
  tri_e sres;
  rail2_t [7:0] dch;
  rail2_t denb;
  rail3_t dres;
  int checks = 0, failures = 0;

  re_recognizer_top dut (
    .clk, .sync_rst(srst), .sync_enb_root(senb), .sync_ch(sch),
    .sync_res_root(sres), .sync_match(smatch),
    .di_rst(drst), .di_ch(dch), .di_enb_root(denb), .di_res_root(dres), .di_ack(dack)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Expected RES on the link above each node after reading "H" (node numbering of
  // DEFAULT_TREE: 0 root star, 1..7 concatenations, 8..15 stars, 16..23 leaves A..H).
  function automatic tri_e exp_res(input int i);
    case (i)
      0, 1, 3, 7, 15, 23: return T1;      // path from leaf H to the root
      16, 17, 18, 19, 20, 21, 22: return T0;
      default: return TX;
    endcase
  endfunction

  task automatic di_step(input logic [7:0] c, input bit e);
    int t;
    for (int b = 0; b < 8; b++) dch[b] = c[b] ? 2'b10 : 2'b01;
    denb = e ? 2'b10 : 2'b01;
    t = 0; while (!dack && t < 100) begin #1; t++; end
    check(dack, "ack rises");
    dch = '0; denb = '0;
    t = 0; while (dack && t < 100) begin #1; t++; end
    check(!dack, "ack falls");
    #1;
  endtask

  initial begin
    srst = 1; senb = 0; sch = 0; drst = 1; dch = '0; denb = '0;
    @(posedge clk); #1;
    srst = 0; drst = 0;
    // synchronous: "H" with the root enabled in cycle 1
    senb = 1; sch = "H";
    @(posedge clk); #1;
    senb = 0; sch = "Z";
    #1;
    for (int i = 0; i < DEFAULT_NODES; i++) begin
      check(dut.u_sync.res[i] == exp_res(i), $sformatf("sync RES above node %0d", i));
      check(dut.u_sync.enb[i] == (i != 0), $sformatf("sync ENB above node %0d", i));
    end
    check(smatch, "\"H\" accepted");
    // self-timed: the same character
    di_step("H", 1'b1);
    for (int i = 0; i < DEFAULT_NODES; i++) begin
      automatic rail3_t r = dut.u_di.res[i];
      check(r == rail3_t'(3'(1 << int'(exp_res(i)))), $sformatf("di RES above node %0d", i));
    end
    // more characters: H, A accepted; I rejected from then on
    for (int k = 0; k < 3; k++) begin
      automatic logic [7:0] c = (k == 0) ? "H" : (k == 1) ? "A" : "I";
      sch = c;
      @(posedge clk); #1;
      di_step(c, 1'b0);
      check(smatch == (k < 2), $sformatf("sync after character %0d", k + 2));
      check((dres.r1 == 1'b1) == (k < 2) && $onehot(dres), $sformatf("di after character %0d", k + 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
