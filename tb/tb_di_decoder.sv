// tb_di_decoder: test of the delay-insensitive character decoder.
//
// Two decoders: the four-bit one for code 0110 and an eight-bit one for 'A' (0x41). For
// random characters (one in three equal to the code) the bits are made valid one at a
// time in random order, then invalid in random order. Each output must stay invalid
// until every bit is valid, then show '1' exactly when the character equals the code,
// and stay valid until every bit is invalid again.
module tb_di_decoder;
  import re_pkg::*;

  rail2_t [3:0] ch4;
  rail2_t [7:0] ch8;
  rail2_t y4, y8;
  int checks = 0, failures = 0;

  di_decoder #(.W(4), .CODE(4'b0110)) dut4 (.ch(ch4), .y(y4));
  di_decoder #(.W(8), .CODE(8'h41))   dut8 (.ch(ch8), .y(y8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int order [8];
    ch4 = '0; ch8 = '0;
    #1;
    for (int k = 0; k < 200; k++) begin
      automatic bit [7:0] c8 = ($urandom_range(2) == 0) ? 8'h41 : 8'($urandom_range(255));
      automatic bit [3:0] c4 = ($urandom_range(2) == 0) ? 4'b0110 : 4'($urandom_range(15));
      automatic rail2_t e8 = (c8 == 8'h41) ? 2'b10 : 2'b01;
      automatic rail2_t e4 = (c4 == 4'b0110) ? 2'b10 : 2'b01;
      for (int b = 0; b < 8; b++) order[b] = b;
      order.shuffle();
      for (int j = 0; j < 8; j++) begin
        ch8[order[j]] = c8[order[j]] ? 2'b10 : 2'b01;
        if (order[j] < 4) ch4[order[j]] = c4[order[j]] ? 2'b10 : 2'b01;
        #1;
        check(y8 == ((j == 7) ? e8 : 2'b00), $sformatf("8-bit set %h step %0d: %b", c8, j, y8));
      end
      check(y4 == e4, $sformatf("4-bit %b -> %b", c4, y4));
      order.shuffle();
      for (int j = 0; j < 8; j++) begin
        ch8[order[j]] = 2'b00;
        if (order[j] < 4) ch4[order[j]] = 2'b00;
        #1;
        check(y8 == ((j == 7) ? 2'b00 : e8), $sformatf("8-bit reset %h step %0d", c8, j));
      end
      check(y4 == 2'b00, "4-bit invalid");
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
