// tb_re_full_size: re_recognizer_top with every parameter at its default, i.e. the
// expression (A*B*C*D*E*F*G*H*)* with 8-bit characters, run end to end by tb_re_driver
// on 200 random strings through both the synchronous and the self-timed recognizer.
module tb_re_full_size;
  import re_pkg::*;

  localparam int W = 8;

  logic clk = 0;
  always #5 clk = ~clk;

  logic srst, senb, smatch, drst, dack, done;
  logic [7:0] sch;
  tri_e sres;
  rail2_t [W-1:0] dch;
  rail2_t denb;
  rail3_t dres;
  int checks, failures, n_acc, n_rej, n_x, n_1, n_0, n_hs, n_inv;

  re_recognizer_top dut (
    .clk, .sync_rst(srst), .sync_enb_root(senb), .sync_ch(sch),
    .sync_res_root(sres), .sync_match(smatch),
    .di_rst(drst), .di_ch(dch), .di_enb_root(denb), .di_res_root(dres), .di_ack(dack)
  );
  tb_re_driver #(.N_STRINGS(200)) u_drv (
    .clk, .sync_rst(srst), .sync_enb_root(senb), .sync_ch(sch),
    .sync_res_root(sres), .sync_match(smatch),
    .di_rst(drst), .di_ch(dch), .di_enb_root(denb), .di_res_root(dres), .di_ack(dack),
    .done, .checks, .failures, .n_accept(n_acc), .n_reject(n_rej),
    .n_root_x(n_x), .n_root_1(n_1), .n_root_0(n_0), .n_handshake(n_hs), .n_invalid_on_ack(n_inv)
  );

  initial begin
    int f;
    fork
      wait (done);
      begin
        #5000000;
        $display("FAIL: watchdog expired");
      end
    join_any
    f = failures + (done ? 0 : 1) + ((n_acc > 0 && n_rej > 0) ? 0 : 1);
    $display("accepted %0d rejected %0d handshakes %0d", n_acc, n_rej, n_hs);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, f);
    $finish;
  end
endmodule
