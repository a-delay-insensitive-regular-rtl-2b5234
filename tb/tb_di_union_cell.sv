// tb_di_union_cell: test of the delay-insensitive union cell under the 4-phase protocol.
//
// For every value of ENB1, RES2 and RES3 the three logical inputs are made valid one at a
// time in random order, then invalid one at a time in random order. After each step every
// output must be invalid while some input it depends on has not yet become valid, carry
// the expected one-hot value once all have, keep it while any of them is still valid, and
// return to invalid after all of them are invalid again. RES1 depends on RES2 and RES3
// (expected MAX on 0 < x < 1); ENB2 and ENB3 depend on ENB1.
module tb_di_union_cell;
  import re_pkg::*;

  rail2_t enb1, enb2, enb3;
  rail3_t res1, res2, res3;
  int checks = 0, failures = 0;

  di_union_cell dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [2:0] onehot(input int v);
    return 3'(1 << v);
  endfunction

  initial begin
    enb1 = '0; res2 = '0; res3 = '0;
    #1;
    for (int rep = 0; rep < 4; rep++)
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) begin
          bit [2:0] on;       // which logical inputs are valid: 0 enb1, 1 res2, 2 res3
          int order [3];
          automatic int exp_res = (a > b) ? a : b;
          order = '{0, 1, 2};
          order.shuffle();
          on = '0;
          for (int phase = 0; phase < 2; phase++) begin
            if (phase == 1) order.shuffle();
            for (int k = 0; k < 3; k++) begin
              on[order[k]] = (phase == 0);
              enb1 = on[0] ? 2'(1 << e) : '0;
              res2 = on[1] ? onehot(a) : '0;
              res3 = on[2] ? onehot(b) : '0;
              #1;
              if (phase == 0)
                check(res1 == ((on[1] && on[2]) ? onehot(exp_res) : 3'b000),
                      $sformatf("res1 set e=%0d a=%0d b=%0d on=%b: %b", e, a, b, on, res1));
              else
                check(res1 == ((on[1] || on[2]) ? onehot(exp_res) : 3'b000),
                      $sformatf("res1 reset e=%0d a=%0d b=%0d on=%b: %b", e, a, b, on, res1));
              check(enb2 == (on[0] ? 2'(1 << e) : 2'b00) && enb3 == enb2, "enb2/enb3");
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
