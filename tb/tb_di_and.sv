// tb_di_and: test of the delay-insensitive dual-rail AND under the 4-phase protocol.
//
// For every pair of input values, both orders of making the inputs valid and of making
// them invalid are used. The output must stay invalid until both inputs are valid, then
// carry A AND B, and stay valid until both inputs are invalid.
module tb_di_and;
  import re_pkg::*;

  rail2_t a, b, y;
  int checks = 0, failures = 0;

  di_and dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    a = '0; b = '0;
    #1;
    for (int va = 0; va < 2; va++)
      for (int vb = 0; vb < 2; vb++)
        for (int first = 0; first < 2; first++)
          for (int lastoff = 0; lastoff < 2; lastoff++) begin
            automatic rail2_t exp = (va == 1 && vb == 1) ? 2'b10 : 2'b01;
            if (first == 0) a = 2'(1 << va); else b = 2'(1 << vb);
            #1 check(y == 2'b00, "invalid with one input");
            a = 2'(1 << va); b = 2'(1 << vb);
            #1 check(y == exp, $sformatf("a=%0d b=%0d -> %b", va, vb, y));
            if (lastoff == 0) a = '0; else b = '0;
            #1 check(y == exp, "held with one input still valid");
            a = '0; b = '0;
            #1 check(y == 2'b00, "invalid after both inputs invalid");
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
