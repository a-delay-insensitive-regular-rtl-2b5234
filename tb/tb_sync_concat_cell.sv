// tb_sync_concat_cell: exhaustive test of the tri-valued concatenation cell.
//
// For every ENB1 and every pair of operand results the outputs are checked against a
// case-by-case table of the cell equations and against the plain two-valued
// concatenation (ENB2 = ENB1, ENB3 = RES2, RES1 = RES3) after every x is replaced by the
// ENB of its own link, which is the case analysis that proves the tri-valued cell right.
module tb_sync_concat_cell;
  import re_pkg::*;

  logic enb1, enb2, enb3;
  tri_e res1, res2, res3;
  int checks = 0, failures = 0;

  sync_concat_cell dut (.*);

  function automatic logic sub(input tri_e r, input logic e);
    return (r == TX) ? e : (r == T1);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) begin
          tri_e exp_res;
          logic exp_enb3;
          enb1 = e[0]; res2 = tri_e'(a); res3 = tri_e'(b);
          #1;
          case (b)
            0: exp_res = T0;
            1: exp_res = tri_e'(a);
            default: exp_res = T1;
          endcase
          case (a)
            0: exp_enb3 = 1'b0;
            1: exp_enb3 = e[0];
            default: exp_enb3 = 1'b1;
          endcase
          check(res1 == exp_res, $sformatf("res1 e=%0d a=%0d b=%0d", e, a, b));
          check(enb3 == exp_enb3, $sformatf("enb3 e=%0d a=%0d b=%0d", e, a, b));
          check(enb2 == e[0], "enb2 follows enb1");
          check(enb3 == sub(res2, enb2), "two-valued: enb3 = res2");
          check(sub(res1, enb1) == sub(res3, enb3), "two-valued: res1 = res3");
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
