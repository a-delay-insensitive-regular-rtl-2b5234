// tb_si_register: test of the self-timed state register (4 bits).
//
// After reset the outputs must show the cleared state, all '0'. Then, for 100 random next
// states: the input bits are made valid one at a time in random order, ack must stay low
// until the last one is valid, then rise, with every output invalid; the inputs are made
// invalid one at a time, ack must stay high until the last one is invalid, then fall,
// and the outputs must then show the next state that was written.
module tb_si_register;
  import re_pkg::*;

  localparam int W = 4;

  logic rst, ack;
  rail2_t [W-1:0] d, q;
  int checks = 0, failures = 0;

  si_register #(.W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic bit [W-1:0] value_of(input rail2_t [W-1:0] r);
    bit [W-1:0] v;
    for (int b = 0; b < W; b++) v[b] = r[b].r1;
    return v;
  endfunction

  function automatic bit all_valid(input rail2_t [W-1:0] r);
    for (int b = 0; b < W; b++) if (!(r[b].r0 ^ r[b].r1)) return 0;
    return 1;
  endfunction

  initial begin
    int order [W];
    d = '0;
    rst = 1;
    #2;
    check(q == '0 && !ack, "outputs invalid and ack low during reset");
    rst = 0;
    #2;
    check(all_valid(q) && value_of(q) == '0, "cleared state after reset");
    for (int k = 0; k < 100; k++) begin
      automatic bit [W-1:0] nx = W'($urandom_range((1 << W) - 1));
      for (int b = 0; b < W; b++) order[b] = b;
      order.shuffle();
      for (int j = 0; j < W; j++) begin
        d[order[j]] = nx[order[j]] ? 2'b10 : 2'b01;
        #1;
        if (j < W - 1) check(!ack, "ack waits for all inputs");
      end
      check(ack, "ack after all inputs valid");
      check(q == '0, "outputs invalid while ack high");
      order.shuffle();
      for (int j = 0; j < W; j++) begin
        d[order[j]] = 2'b00;
        #1;
        if (j < W - 1) check(ack, "ack held until all inputs invalid");
      end
      check(!ack, "ack released");
      check(all_valid(q) && value_of(q) == nx, $sformatf("next state %b", nx));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
