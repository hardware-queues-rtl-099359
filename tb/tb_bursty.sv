// tb_bursty: bursty producer and steady consumer joined by a queue.
//
// Workload: both sides average one word every two cycles over an 8-cycle
// envelope, but the producer sends in bursts (a word on each of 4
// consecutive cycles, then 4 idle cycles) while the consumer is ready on
// every other cycle.  Joined directly, each transfer would need both sides
// ready in the same cycle and the pair would run slower than either side.
// With a shift-register queue (q_srl, default DEPTH 16, WIDTH 16) between
// them neither side waits: the test checks that over 100 envelopes
//   - the producer is never back-pressured (its burst pattern is kept),
//   - once the first word is in, the consumer gets a word on every cycle
//     it is ready (its steady pattern is kept),
//   - 4 words cross per 8-cycle envelope (throughput 1/2 at both ends),
//   - the queue never holds more than 2 words, and the words arrive in
//     order and unchanged.
// The burst shape is this testbench's choice; the document gives only the
// envelope length and the average rates.
module tb_bursty;

  localparam int W = 16;
  localparam int NENV = 100;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [W-1:0] i_d, o_d;
  logic         i_v, i_b, o_v, o_b;
  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, maxocc = 0, stalls = 0, starved = 0;
  logic [W-1:0] model[$];

  always #5 clk = ~clk;

  q_srl u_dut (
    .clk (clk), .rst_n (rst_n),
    .i_d (i_d), .i_v (i_v), .i_b (i_b),
    .o_d (o_d), .o_v (o_v), .o_b (o_b)
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i_v = 1'b0; o_b = 1'b1; i_d = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 8 * NENV + 8; cyc++) begin
      @(negedge clk);
      i_v = (cyc < 8 * NENV) && (cyc % 8 < 4);  // burst of 4, then 4 idle
      i_d = W'($urandom);
      o_b = (cyc % 2 == 0);                      // ready on odd cycles
      #1;
      if (i_v && i_b) stalls++;
      if (!o_b && cyc > 0 && cyc < 8 * NENV) begin
        if (!o_v) starved++;
      end
      if (o_v && !o_b) begin
        check(model.size() > 0 && o_d == model[0], $sformatf("word %0d", n_out));
        if (model.size() > 0) void'(model.pop_front());
        n_out++;
      end
      if (i_v && !i_b) begin
        model.push_back(i_d);
        n_in++;
      end
      if (model.size() > maxocc) maxocc = model.size();
      @(posedge clk);
    end
    check(stalls == 0, $sformatf("producer stalled %0d times", stalls));
    check(starved == 0, $sformatf("consumer found nothing %0d times", starved));
    check(n_in == 4 * NENV, $sformatf("%0d words in, expected %0d", n_in, 4 * NENV));
    check(n_out == 4 * NENV, $sformatf("%0d words out, expected %0d", n_out, 4 * NENV));
    check(maxocc <= 2, $sformatf("queue held %0d words", maxocc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
