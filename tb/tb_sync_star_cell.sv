// tb_sync_star_cell: exhaustive test of the tri-valued Kleene-star cell.
//
// For every ENB1 and operand result the outputs are checked against a case table and
// against the two-valued star (RES1 = ENB2 = ENB1 OR RES2) with every x replaced by the
// ENB of its own link.
module tb_sync_star_cell;
  import re_pkg::*;

  logic enb1, enb2;
  tri_e res1, res2;
  int checks = 0, failures = 0;

  sync_star_cell dut (.*);

  function automatic logic sub(input tri_e r, input logic e);
    return (r == TX) ? e : (r == T1);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 3; a++) begin
        enb1 = e[0]; res2 = tri_e'(a);
        #1;
        check(res1 == ((a == 2) ? T1 : TX), $sformatf("res1 e=%0d a=%0d", e, a));
        check(enb2 == (e[0] || a == 2), $sformatf("enb2 e=%0d a=%0d", e, a));
        check(sub(res1, enb1) == (enb1 || sub(res2, enb2)), "two-valued: res1");
        check(enb2 == (enb1 || sub(res2, enb2)), "two-valued: enb2");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
