// tb_q_circ: self-checking testbench for q_circ.
//
// Instances: the default DEPTH=16, DEPTH=5 (wrap not at a power of two), DEPTH=1.
// Each instance is driven by a random producer and a random consumer; a
// reference queue (an SV queue of words) predicts every output word.  The
// checks per instance:
//   - every word leaves in order and unchanged;
//   - every cycle o_v == (words stored > 0) and i_b == (words stored == capacity),
//     for the reserve instance i_b == (empty slots <= RESERVE);
//   - fill: with the output back-pressured, exactly capacity (less any reserve) words are
//     taken before i_b holds the producer off;
//   - rate: with the consumer always ready and the producer always valid,
//     one word per cycle enters and leaves (40 of 40 cycles;
//     20 of 40 for a one-word circular buffer);
//   - latency: a word put into an empty queue is valid at the output
//     after 1 cycle(s).
// A watchdog ends the run with a failure if it hangs.
module tb_q_circ;

  localparam int unsigned W = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   done = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- instance 0: defaults
  if (1) begin : g_i0
    localparam int CAP = 16;
    localparam int RES = 0;
    localparam int LAT = 1;
    localparam bit GATE = 0;
    localparam int RATE = 40;  // words per 40 cycles at full load
    logic [W-1:0] i_d, o_d;
    logic         i_v, i_b, o_v, o_b;
    logic [W-1:0] model[$];
    logic [W-1:0] next_word;
    int           pv, pb;  // producer valid / consumer back-pressure odds in %
    bit           want;
    int           mode;    // 0 random, 1 fill, 2 rate, 3 latency
    int           n_in, n_out;

    q_circ  u_dut (
      .clk (clk), .rst_n (rst_n),
      .i_d (i_d), .i_v (i_v), .i_b (i_b),
      .o_d (o_d), .o_v (o_v), .o_b (o_b)
    );

    // one cycle: drive at the falling edge, check, commit at the rising edge
    task automatic cycle();
      bit fin, fout;
      @(negedge clk);
      unique case (mode)
        0: begin want = ($urandom_range(99) < pv); o_b = ($urandom_range(99) < pb); end
        1: begin want = 1'b1; o_b = 1'b1; end
        2: begin want = 1'b1; o_b = 1'b0; end
        default: begin want = 1'b0; o_b = 1'b0; end
      endcase
      i_d = next_word;
      #1;
      i_v = GATE ? (want && !i_b) : want;
      #1;
      check(o_v == (model.size() > 0), $sformatf("i0: o_v %0d with %0d stored", o_v, model.size()));
      check(i_b == ((CAP - model.size()) <= RES), $sformatf("i0: i_b %0d with %0d stored", i_b, model.size()));
      fin  = i_v && (GATE || !i_b);
      fout = o_v && !o_b;
      if (fout) begin
        check(model.size() > 0, $sformatf("i0: output with empty model"));
        if (model.size() > 0) begin
          check(o_d == model[0], $sformatf("i0: data %h expected %h", o_d, model[0]));
          void'(model.pop_front());
        end
        n_out++;
      end
      if (fin) begin
        model.push_back(i_d);
        next_word = W'($urandom);
        n_in++;
      end
      @(posedge clk);
    endtask

    initial begin
      int acc, t;
      i_v = 1'b0; o_b = 1'b1; i_d = '0; mode = 0; pv = 50; pb = 50;
      next_word = W'($urandom);
      wait (rst_n);
      // random traffic with a few rate mixes
      for (int ph = 0; ph < 6; ph++) begin
        pv = (ph % 3 == 0) ? 90 : (ph % 3 == 1) ? 30 : 60;
        pb = (ph % 2 == 0) ? 20 : 70;
        repeat (400) cycle();
      end
      // drain
      mode = 3;
      repeat (4 * CAP + 10) cycle();
      check(model.size() == 0, $sformatf("i0: not drained, %0d left", model.size()));
      // fill
      mode = 1; n_in = 0;
      repeat (3 * CAP + 10) cycle();
      check(n_in == CAP - RES, $sformatf("i0: fill took %0d expected %0d", n_in, CAP - RES));
      check(i_b, $sformatf("i0: i_b low when filled"));
      // drain, then run at full rate
      mode = 3;
      repeat (4 * CAP + 10) cycle();
      mode = 2;
      repeat (CAP + 10) cycle();
      n_in = 0; n_out = 0;
      repeat (40) cycle();
      check(n_in == RATE && n_out == RATE, $sformatf("i0: rate in %0d out %0d, expected %0d of 40", n_in, n_out, RATE));
      // latency through an empty queue
      mode = 3;
      repeat (4 * CAP + 10) cycle();
      check(model.size() == 0 && !o_v, $sformatf("i0: not empty before latency test"));
      mode = 3;
      @(negedge clk); i_d = next_word; i_v = 1'b1; o_b = 1'b1;
      model.push_back(next_word);
      @(posedge clk);
      @(negedge clk); i_v = 1'b0;
      t = 1;
      while (!o_v && t < 100) begin @(negedge clk); t++; end
      check(t == LAT, $sformatf("i0: latency %0d expected %0d", t, LAT));
      check(o_d == model[0], $sformatf("i0: latency word %h expected %h", o_d, model[0]));
      mode = 3;
      repeat (4 * CAP + 10) cycle();
      check(model.size() == 0, $sformatf("i0: final drain"));
      done++;
    end
  end

  // ---- instance 1: DEPTH 5
  if (1) begin : g_i1
    localparam int CAP = 5;
    localparam int RES = 0;
    localparam int LAT = 1;
    localparam bit GATE = 0;
    localparam int RATE = 40;  // words per 40 cycles at full load
    logic [W-1:0] i_d, o_d;
    logic         i_v, i_b, o_v, o_b;
    logic [W-1:0] model[$];
    logic [W-1:0] next_word;
    int           pv, pb;  // producer valid / consumer back-pressure odds in %
    bit           want;
    int           mode;    // 0 random, 1 fill, 2 rate, 3 latency
    int           n_in, n_out;

    q_circ #(.DEPTH(5)) u_dut (
      .clk (clk), .rst_n (rst_n),
      .i_d (i_d), .i_v (i_v), .i_b (i_b),
      .o_d (o_d), .o_v (o_v), .o_b (o_b)
    );

    // one cycle: drive at the falling edge, check, commit at the rising edge
    task automatic cycle();
      bit fin, fout;
      @(negedge clk);
      unique case (mode)
        0: begin want = ($urandom_range(99) < pv); o_b = ($urandom_range(99) < pb); end
        1: begin want = 1'b1; o_b = 1'b1; end
        2: begin want = 1'b1; o_b = 1'b0; end
        default: begin want = 1'b0; o_b = 1'b0; end
      endcase
      i_d = next_word;
      #1;
      i_v = GATE ? (want && !i_b) : want;
      #1;
      check(o_v == (model.size() > 0), $sformatf("i1: o_v %0d with %0d stored", o_v, model.size()));
      check(i_b == ((CAP - model.size()) <= RES), $sformatf("i1: i_b %0d with %0d stored", i_b, model.size()));
      fin  = i_v && (GATE || !i_b);
      fout = o_v && !o_b;
      if (fout) begin
        check(model.size() > 0, $sformatf("i1: output with empty model"));
        if (model.size() > 0) begin
          check(o_d == model[0], $sformatf("i1: data %h expected %h", o_d, model[0]));
          void'(model.pop_front());
        end
        n_out++;
      end
      if (fin) begin
        model.push_back(i_d);
        next_word = W'($urandom);
        n_in++;
      end
      @(posedge clk);
    endtask

    initial begin
      int acc, t;
      i_v = 1'b0; o_b = 1'b1; i_d = '0; mode = 0; pv = 50; pb = 50;
      next_word = W'($urandom);
      wait (rst_n);
      // random traffic with a few rate mixes
      for (int ph = 0; ph < 6; ph++) begin
        pv = (ph % 3 == 0) ? 90 : (ph % 3 == 1) ? 30 : 60;
        pb = (ph % 2 == 0) ? 20 : 70;
        repeat (400) cycle();
      end
      // drain
      mode = 3;
      repeat (4 * CAP + 10) cycle();
      check(model.size() == 0, $sformatf("i1: not drained, %0d left", model.size()));
      // fill
      mode = 1; n_in = 0;
      repeat (3 * CAP + 10) cycle();
      check(n_in == CAP - RES, $sformatf("i1: fill took %0d expected %0d", n_in, CAP - RES));
      check(i_b, $sformatf("i1: i_b low when filled"));
      // drain, then run at full rate
      mode = 3;
      repeat (4 * CAP + 10) cycle();
      mode = 2;
      repeat (CAP + 10) cycle();
      n_in = 0; n_out = 0;
      repeat (40) cycle();
      check(n_in == RATE && n_out == RATE, $sformatf("i1: rate in %0d out %0d, expected %0d of 40", n_in, n_out, RATE));
      // latency through an empty queue
      mode = 3;
      repeat (4 * CAP + 10) cycle();
      check(model.size() == 0 && !o_v, $sformatf("i1: not empty before latency test"));
      mode = 3;
      @(negedge clk); i_d = next_word; i_v = 1'b1; o_b = 1'b1;
      model.push_back(next_word);
      @(posedge clk);
      @(negedge clk); i_v = 1'b0;
      t = 1;
      while (!o_v && t < 100) begin @(negedge clk); t++; end
      check(t == LAT, $sformatf("i1: latency %0d expected %0d", t, LAT));
      check(o_d == model[0], $sformatf("i1: latency word %h expected %h", o_d, model[0]));
      mode = 3;
      repeat (4 * CAP + 10) cycle();
      check(model.size() == 0, $sformatf("i1: final drain"));
      done++;
    end
  end

  // ---- instance 2: DEPTH 1: half rate, a word cannot enter while the only one leaves
  if (1) begin : g_i2
    localparam int CAP = 1;
    localparam int RES = 0;
    localparam int LAT = 1;
    localparam bit GATE = 0;
    localparam int RATE = 20;  // words per 40 cycles at full load
    logic [W-1:0] i_d, o_d;
    logic         i_v, i_b, o_v, o_b;
    logic [W-1:0] model[$];
    logic [W-1:0] next_word;
    int           pv, pb;  // producer valid / consumer back-pressure odds in %
    bit           want;
    int           mode;    // 0 random, 1 fill, 2 rate, 3 latency
    int           n_in, n_out;

    q_circ #(.DEPTH(1)) u_dut (
      .clk (clk), .rst_n (rst_n),
      .i_d (i_d), .i_v (i_v), .i_b (i_b),
      .o_d (o_d), .o_v (o_v), .o_b (o_b)
    );

    // one cycle: drive at the falling edge, check, commit at the rising edge
    task automatic cycle();
      bit fin, fout;
      @(negedge clk);
      unique case (mode)
        0: begin want = ($urandom_range(99) < pv); o_b = ($urandom_range(99) < pb); end
        1: begin want = 1'b1; o_b = 1'b1; end
        2: begin want = 1'b1; o_b = 1'b0; end
        default: begin want = 1'b0; o_b = 1'b0; end
      endcase
      i_d = next_word;
      #1;
      i_v = GATE ? (want && !i_b) : want;
      #1;
      check(o_v == (model.size() > 0), $sformatf("i2: o_v %0d with %0d stored", o_v, model.size()));
      check(i_b == ((CAP - model.size()) <= RES), $sformatf("i2: i_b %0d with %0d stored", i_b, model.size()));
      fin  = i_v && (GATE || !i_b);
      fout = o_v && !o_b;
      if (fout) begin
        check(model.size() > 0, $sformatf("i2: output with empty model"));
        if (model.size() > 0) begin
          check(o_d == model[0], $sformatf("i2: data %h expected %h", o_d, model[0]));
          void'(model.pop_front());
        end
        n_out++;
      end
      if (fin) begin
        model.push_back(i_d);
        next_word = W'($urandom);
        n_in++;
      end
      @(posedge clk);
    endtask

    initial begin
      int acc, t;
      i_v = 1'b0; o_b = 1'b1; i_d = '0; mode = 0; pv = 50; pb = 50;
      next_word = W'($urandom);
      wait (rst_n);
      // random traffic with a few rate mixes
      for (int ph = 0; ph < 6; ph++) begin
        pv = (ph % 3 == 0) ? 90 : (ph % 3 == 1) ? 30 : 60;
        pb = (ph % 2 == 0) ? 20 : 70;
        repeat (400) cycle();
      end
      // drain
      mode = 3;
      repeat (4 * CAP + 10) cycle();
      check(model.size() == 0, $sformatf("i2: not drained, %0d left", model.size()));
      // fill
      mode = 1; n_in = 0;
      repeat (3 * CAP + 10) cycle();
      check(n_in == CAP - RES, $sformatf("i2: fill took %0d expected %0d", n_in, CAP - RES));
      check(i_b, $sformatf("i2: i_b low when filled"));
      // drain, then run at full rate
      mode = 3;
      repeat (4 * CAP + 10) cycle();
      mode = 2;
      repeat (CAP + 10) cycle();
      n_in = 0; n_out = 0;
      repeat (40) cycle();
      check(n_in == RATE && n_out == RATE, $sformatf("i2: rate in %0d out %0d, expected %0d of 40", n_in, n_out, RATE));
      // latency through an empty queue
      mode = 3;
      repeat (4 * CAP + 10) cycle();
      check(model.size() == 0 && !o_v, $sformatf("i2: not empty before latency test"));
      mode = 3;
      @(negedge clk); i_d = next_word; i_v = 1'b1; o_b = 1'b1;
      model.push_back(next_word);
      @(posedge clk);
      @(negedge clk); i_v = 1'b0;
      t = 1;
      while (!o_v && t < 100) begin @(negedge clk); t++; end
      check(t == LAT, $sformatf("i2: latency %0d expected %0d", t, LAT));
      check(o_d == model[0], $sformatf("i2: latency word %h expected %h", o_d, model[0]));
      mode = 3;
      repeat (4 * CAP + 10) cycle();
      check(model.size() == 0, $sformatf("i2: final drain"));
      done++;
    end
  end

endmodule
