// tb_stream_join: self-checking testbench for stream_join.
//
// Drives both input streams and the output back-pressure with random
// values and checks the firing rule the outputs must follow:
//   fire = a_v & b_v & !o_b,  o_v = fire,  a_b = b_b = !fire,
// with o_d = {a_d, b_d}.  All combinations of the three control inputs are
// also stepped through once.  Ends with the TB_RESULT line; a watchdog
// stops a hung run.
module tb_stream_join;

  localparam int W = 16;

  logic [W-1:0]   a_d, b_d;
  logic [2*W-1:0] o_d;
  logic           a_v, b_v, a_b, b_b, o_v, o_b;
  int checks = 0, failures = 0;

  stream_join #(.WIDTH(W)) u_dut (
    .a_d (a_d), .a_v (a_v), .a_b (a_b),
    .b_d (b_d), .b_v (b_v), .b_b (b_b),
    .o_d (o_d), .o_v (o_v), .o_b (o_b)
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  task automatic apply(input logic av, input logic bv, input logic ob);
    logic exp_fire;
    a_v = av; b_v = bv; o_b = ob;
    a_d = W'($urandom); b_d = W'($urandom);
    #1;
    exp_fire = av && bv && !ob;
    check(o_v == exp_fire, $sformatf("o_v %0d for a_v %0d b_v %0d o_b %0d", o_v, av, bv, ob));
    check(a_b == !exp_fire, "a_b");
    check(b_b == !exp_fire, "b_b");
    if (exp_fire) check(o_d == {a_d, b_d}, "tuple");
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) apply(k[0], k[1], k[2]);
    for (int k = 0; k < 1000; k++) apply(1'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
