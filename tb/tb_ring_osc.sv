// tb_ring_osc: self-checking test of the ring oscillator model.
//
// Two instances as on the test chip. With the enable low the output must
// settle and stay still; with it high the output must toggle with a period of
// 2 * 95 * 20 = 3800 time units, and both rings must give the same count.
module tb_ring_osc;
  logic en = 0;
  logic osc0, osc1;
  int checks = 0, failures = 0;
  int edges0 = 0, edges1 = 0;
  longint t_first, t_last;

  ring_osc u0 (.en(en), .osc(osc0));
  ring_osc u1 (.en(en), .osc(osc1));

  always @(posedge osc0) begin
    if (edges0 == 0) t_first = $time;
    t_last = $time;
    edges0++;
  end
  always @(posedge osc1) edges1++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5000;                       // settle with the ring disabled
    edges0 = 0; edges1 = 0;
    #10000;
    check(edges0 == 0 && edges1 == 0, "no oscillation when disabled");
    en = 1;
    #100000;
    en = 0;
    check(edges0 > 20, "oscillates when enabled");
    check(edges0 == edges1, "identical rings agree");
    check((t_last - t_first) == longint'(edges0 - 1) * 3800, "period 3800 units");
    #10000;
    edges0 = 0;
    #10000;
    check(edges0 == 0, "stops when disabled again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
