// tb_sync_leaf_cell: test of the synchronous leaf cell.
//
// Random characters (biased towards the leaf's code) and enables are applied for 300
// cycles; one cycle after each clock edge RES must be 1 exactly when the previous cycle
// had ENB = 1 and the leaf's character. Reset must clear RES.
module tb_sync_leaf_cell;
  import re_pkg::*;

  localparam logic [7:0] CH = 8'h5A;   // 'Z'

  logic clk = 0, rst, enb;
  logic [7:0] ch_in;
  tri_e res;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sync_leaf_cell #(.CH(CH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic exp;
    rst = 1; enb = 1; ch_in = CH;
    @(posedge clk); #1;
    check(res == T0, "reset clears");
    rst = 0;
    for (int k = 0; k < 300; k++) begin
      enb = ($urandom_range(3) != 0);
      ch_in = ($urandom_range(1) == 0) ? CH : 8'($urandom_range(255));
      exp = enb && (ch_in == CH);
      @(posedge clk); #1;
      check(res == (exp ? T1 : T0), $sformatf("cycle %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
