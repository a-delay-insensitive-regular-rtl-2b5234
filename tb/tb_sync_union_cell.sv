// tb_sync_union_cell: exhaustive test of the tri-valued union cell.
//
// For every ENB1 and every pair of operand results the outputs are checked twice:
// against a truth table of MAX written out case by case, and against the behaviour of
// the plain two-valued union (RES1 = RES2 OR RES3, ENB2 = ENB3 = ENB1) after every x is
// replaced by the ENB of its own link.
module tb_sync_union_cell;
  import re_pkg::*;

  logic enb1, enb2, enb3;
  tri_e res1, res2, res3;
  int checks = 0, failures = 0;

  sync_union_cell dut (.*);

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
          tri_e exp;
          enb1 = e[0]; res2 = tri_e'(a); res3 = tri_e'(b);
          #1;
          if (a == 2 || b == 2)      exp = T1;
          else if (a == 1 || b == 1) exp = TX;
          else                       exp = T0;
          check(res1 == exp, $sformatf("res1 e=%0d a=%0d b=%0d", e, a, b));
          check(enb2 == e[0] && enb3 == e[0], "enables follow enb1");
          check(sub(res1, enb1) == (sub(res2, enb2) || sub(res3, enb3)), "two-valued union");
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
