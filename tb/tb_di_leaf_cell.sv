// tb_di_leaf_cell: test of the delay-insensitive leaf logic (code 'Q').
//
// For random characters and enables, applied in random order with the enable before,
// among or after the character bits, next_state must stay invalid until the enable and
// every character bit are valid, then be ENB AND (char == code), and stay valid until
// all of them are invalid again.
module tb_di_leaf_cell;
  import re_pkg::*;

  localparam logic [7:0] CODE = 8'h51;

  rail2_t [7:0] ch;
  rail2_t enb, next_state;
  int checks = 0, failures = 0;

  di_leaf_cell #(.W(8), .CODE(CODE)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int order [9];           // 0..7 character bits, 8 enable
    ch = '0; enb = '0;
    #1;
    for (int k = 0; k < 200; k++) begin
      automatic bit [7:0] c = ($urandom_range(1) == 0) ? CODE : 8'($urandom_range(255));
      automatic bit e = 1'($urandom_range(1));
      automatic rail2_t exp = (e && c == CODE) ? 2'b10 : 2'b01;
      for (int j = 0; j < 9; j++) order[j] = j;
      order.shuffle();
      for (int j = 0; j < 9; j++) begin
        if (order[j] == 8) enb = e ? 2'b10 : 2'b01;
        else ch[order[j]] = c[order[j]] ? 2'b10 : 2'b01;
        #1;
        check(next_state == ((j == 8) ? exp : 2'b00), $sformatf("set %h e=%0d step %0d", c, e, j));
      end
      order.shuffle();
      for (int j = 0; j < 9; j++) begin
        if (order[j] == 8) enb = 2'b00;
        else ch[order[j]] = 2'b00;
        #1;
        check(next_state == ((j == 8) ? 2'b00 : exp), $sformatf("reset %h e=%0d step %0d", c, e, j));
      end
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
