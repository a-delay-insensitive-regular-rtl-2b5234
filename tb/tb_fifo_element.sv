// tb_fifo_element: test of the one-bit 4-phase FIFO element.
//
// 1. Reset: an element with INIT = 2 must show a valid '1' on its output, one with
//    INIT = 0 nothing.
// 2. Decoupling: with the consumer stalled, the element must complete the whole input
//    handshake of one value while that value stays on its output, and must not
//    acknowledge a second value until the consumer has taken the first.
// 3. Streaming: a producer and a consumer, each with random delays between their protocol
//    steps, pass 200 random bits; the consumer checks order and values and that a data
//    rail never drops before it has acknowledged.
module tb_fifo_element;
  logic rst;
  logic d0, d1, ack, q0, q1, ack_o;
  logic e_d0, e_d1, e_ack, e_q0, e_q1;
  int checks = 0, failures = 0;
  bit sent [$];

  fifo_element #(.INIT(0)) dut (.rst, .d0, .d1, .ack, .q0, .q1, .ack_o);
  fifo_element #(.INIT(2)) dut_init (.rst, .d0(e_d0), .d1(e_d1), .ack(e_ack),
                                     .q0(e_q0), .q1(e_q1), .ack_o(1'b0));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic put(input bit v);
    int t = 0;
    while (ack && t < 100) begin #1; t++; end
    if (v) d1 = 1; else d0 = 1;
    t = 0;
    while (!ack && t < 100) begin #1; t++; end
    check(ack, "input acknowledged");
    #($urandom_range(3));
    d0 = 0; d1 = 0;
    t = 0;
    while (ack && t < 100) begin #1; t++; end
    check(!ack, "input acknowledge released");
  endtask

  task automatic get(output bit v);
    int t = 0;
    while (!(q0 || q1) && t < 200) begin #1; t++; end
    check(q0 ^ q1, "one output rail valid");
    v = q1;
    #($urandom_range(3));
    check(q0 ^ q1, "output held until acknowledged");
    ack_o = 1;
    t = 0;
    while ((q0 || q1) && t < 100) begin #1; t++; end
    check(!(q0 || q1), "output released");
    #($urandom_range(3));
    ack_o = 0;
  endtask

  initial begin
    bit v;
    d0 = 0; d1 = 0; ack_o = 0; e_d0 = 0; e_d1 = 0;
    rst = 1;
    #2;
    check(e_q1 && !e_q0, "INIT=2 holds '1'");
    check(!q0 && !q1 && !ack, "INIT=0 empty");
    rst = 0;
    #2;
    check(e_q1 && !e_q0, "INIT=2 keeps '1' after reset");
    // input handshake completes while the output is stalled
    put(1'b1);
    check(q1 && !q0 && !ack, "value on output, input side released");
    d0 = 1;
    #10;
    check(!ack, "second value waits while the output is full");
    d0 = 0;
    #1;
    get(v); check(v == 1'b1, "first value");
    put(1'b0);
    get(v); check(v == 1'b0, "second value");
    // streaming
    fork
      for (int k = 0; k < 200; k++) begin
        automatic bit b = 1'($urandom_range(1));
        sent.push_back(b);
        put(b);
        #($urandom_range(4));
      end
      for (int k = 0; k < 200; k++) begin
        get(v);
        check(sent.size() > 0 && v == sent.pop_front(), $sformatf("value %0d", k));
        #($urandom_range(4));
      end
    join
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
