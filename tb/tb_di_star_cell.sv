// tb_di_star_cell: test of the delay-insensitive Kleene-star cell under the 4-phase
// protocol.
//
// For every value of ENB1 and RES2 the two inputs are made valid in random order and then
// invalid in random order. RES1 (depends on RES2 only; expected MAX(RES2, x)) and ENB2
// (depends on ENB1 and RES2; expected ENB1 OR RES2 == 1) must be invalid until all their
// inputs are valid, then hold the expected value until all of them are invalid.
module tb_di_star_cell;
  import re_pkg::*;

  rail2_t enb1, enb2;
  rail3_t res1, res2;
  int checks = 0, failures = 0;

  di_star_cell dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    enb1 = '0; res2 = '0;
    #1;
    for (int rep = 0; rep < 6; rep++)
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 3; a++) begin
        bit [1:0] on;       // 0 enb1, 1 res2
        int order [2];
        automatic int exp_res = (a == 2) ? 2 : 1;
        automatic int exp_enb = (e == 1 || a == 2) ? 1 : 0;
        bit enb_valid;
        order = '{0, 1};
        order.shuffle();
        on = '0;
        for (int phase = 0; phase < 2; phase++) begin
          if (phase == 1) order.shuffle();
          for (int k = 0; k < 2; k++) begin
            on[order[k]] = (phase == 0);
            enb1 = on[0] ? 2'(1 << e) : '0;
            res2 = on[1] ? 3'(1 << a) : '0;
            #1;
            enb_valid = (phase == 0) ? (on[0] && on[1]) : (on[0] || on[1]);
            check(res1 == (on[1] ? 3'(1 << exp_res) : 3'b000),
                  $sformatf("res1 e=%0d a=%0d on=%b: %b", e, a, on, res1));
            check(enb2 == (enb_valid ? 2'(1 << exp_enb) : 2'b00),
                  $sformatf("enb2 e=%0d a=%0d on=%b ph=%0d: %b", e, a, on, phase, enb2));
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
