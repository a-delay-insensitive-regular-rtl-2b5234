// tb_c_element: test of the Muller C gate (three inputs) and its reset.
//
// Random input vectors are applied; a model keeps the expected output: 1 after all ones,
// 0 after all zeros, unchanged otherwise. Reset must force the output to RST_VAL.
module tb_c_element;
  logic [2:0] in;
  logic rst, out;
  int checks = 0, failures = 0;

  c_element #(.N(3), .RST_VAL(1'b1)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic model;
    in = 3'b010; rst = 1;
    #1 check(out == 1'b1, "reset value");
    rst = 0; model = 1'b1;
    for (int k = 0; k < 400; k++) begin
      in = 3'($urandom_range(7));
      if ($urandom_range(3) == 0) in = ($urandom_range(1) == 0) ? 3'b000 : 3'b111;
      if (in == 3'b111) model = 1'b1;
      else if (in == 3'b000) model = 1'b0;
      #1 check(out == model, $sformatf("step %0d in=%b", k, in));
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
