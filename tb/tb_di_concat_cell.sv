// tb_di_concat_cell: test of the delay-insensitive concatenation cell under the 4-phase
// protocol.
//
// For every value of ENB1, RES2 and RES3 the three logical inputs are made valid one at a
// time in random order, then invalid one at a time in random order. After each step:
// RES1 (depends on RES2, RES3; expected RES3, or RES2 when RES3 is x) and ENB3 (depends
// on RES2, ENB1; expected RES2, or ENB1 when RES2 is x) must be invalid until all of
// their inputs are valid, then hold the expected value until all of them are invalid.
// ENB2 must follow ENB1.
module tb_di_concat_cell;
  import re_pkg::*;

  rail2_t enb1, enb2, enb3;
  rail3_t res1, res2, res3;
  int checks = 0, failures = 0;

  di_concat_cell dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    enb1 = '0; res2 = '0; res3 = '0;
    #1;
    for (int rep = 0; rep < 4; rep++)
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) begin
          bit [2:0] on;       // 0 enb1, 1 res2, 2 res3
          int order [3];
          automatic int exp_res = (b == 1) ? a : b;
          automatic int exp_enb = (a == 1) ? e : a / 2;
          bit res_valid, enb_valid;
          order = '{0, 1, 2};
          order.shuffle();
          on = '0;
          for (int phase = 0; phase < 2; phase++) begin
            if (phase == 1) order.shuffle();
            for (int k = 0; k < 3; k++) begin
              on[order[k]] = (phase == 0);
              enb1 = on[0] ? 2'(1 << e) : '0;
              res2 = on[1] ? 3'(1 << a) : '0;
              res3 = on[2] ? 3'(1 << b) : '0;
              #1;
              res_valid = (phase == 0) ? (on[1] && on[2]) : (on[1] || on[2]);
              enb_valid = (phase == 0) ? (on[0] && on[1]) : (on[0] || on[1]);
              check(res1 == (res_valid ? 3'(1 << exp_res) : 3'b000),
                    $sformatf("res1 e=%0d a=%0d b=%0d on=%b ph=%0d: %b", e, a, b, on, phase, res1));
              check(enb3 == (enb_valid ? 2'(1 << exp_enb) : 2'b00),
                    $sformatf("enb3 e=%0d a=%0d b=%0d on=%b ph=%0d: %b", e, a, b, on, phase, enb3));
              check(enb2 == enb1, "enb2");
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
