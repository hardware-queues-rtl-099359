// tb_hwq_top: end-to-end testbench of hwq_top at its default parameters
// (WIDTH 16, DEPTH 16, N_PIPE 2).
//
// Every channel gets a producer model (tb_stream_src) and a consumer model
// (tb_stream_sink).  Producers emit numbered words whose values the
// consumers recompute, so each consumer checks that every word arrives
// once, in order and unchanged; the tuple channel checks {x_k, y_k}.  The
// run goes through phases of producer / consumer activity (busy producer
// and busy consumer, blocked consumer, slow producer, both at full rate,
// random), then drains and checks that every channel delivered all it took (the
// tuple channel: as many tuples as the shorter of its two streams).
// In the full-rate phase every channel must move one word per cycle at both
// ends (40 of 40 cycles).  The first word of each channel, entering empty
// queues, must take the channel's latency: N_RELAY + 1 cycles for the
// relayed channel (2 relays), N_PIPE + 1 for the pipelined ones, 2 for the
// logic-relayed and tuple channels, DEPTH for the systolic queue.  The testbench also counts how often each
// mechanism of the design happened and fails a mechanism that never did:
// relay back-pressure, SRL+DVBF full, reserve back-pressure and words
// arriving under stale back-pressure (both pipelined channels), enabled
// register stall, SRL+D output-register bypass and its More state, systolic
// queue full, join waiting for one stream, join firing, circular buffer
// wrap and full, SRL+DV and SRL+DVB full.  The overflow assertion inside
// the reserve queues stops the run if a pipelined word ever finds no room.
module tb_hwq_top;

  import hwq_pkg::*;

  localparam int W = 16;
  localparam int D = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  int   pv, pb, pvy;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  // ---- channel signals
  logic [W-1:0]   r_i_d, r_o_d, p_i_d, p_o_d, l_i_d, l_o_d, g_i_d, g_o_d, s_i_d, s_o_d, x_i_d, y_i_d;
  logic           r_i_v, r_i_b, r_o_v, r_o_b, p_i_v, p_i_b, p_o_v, p_o_b;
  logic           l_i_v, l_i_b, l_o_v, l_o_b, g_i_v, g_i_b, g_o_v, g_o_b;
  logic           s_i_v, s_i_b, s_o_v, s_o_b, x_i_v, x_i_b, y_i_v, y_i_b;
  logic [2*W-1:0] j_o_d;
  logic           j_o_v, j_o_b;

  hwq_top u_dut (.*);

  // ---- producers and consumers: r p l g s, then x y -> j
  localparam int NCH = 5;
  int src_n [NCH + 2];
  int src_st [NCH + 2];
  int snk_n [NCH + 1];
  int snk_c [NCH + 1];
  int snk_f [NCH + 1];
  logic [W-1:0]   exp_w [NCH];
  logic [2*W-1:0] exp_j;

  function automatic logic [W-1:0] word(int ch, int k);
    return W'(ch * 1000 + 7 + k * (2 * ch + 3));
  endfunction

  always_comb begin
    for (int c = 0; c < NCH; c++) exp_w[c] = word(c, snk_n[c]);
    exp_j = {word(5, snk_n[NCH]), word(6, snk_n[NCH])};
  end

  tb_stream_src #(.W(W), .SEED(0*1000+7), .STEP(3))  u_src_r (.clk, .rst_n, .pv(pv), .i_d(r_i_d), .i_v(r_i_v), .i_b(r_i_b), .n(src_n[0]), .stalls(src_st[0]));
  tb_stream_src #(.W(W), .SEED(1*1000+7), .STEP(5))  u_src_p (.clk, .rst_n, .pv(pv), .i_d(p_i_d), .i_v(p_i_v), .i_b(p_i_b), .n(src_n[1]), .stalls(src_st[1]));
  tb_stream_src #(.W(W), .SEED(2*1000+7), .STEP(7))  u_src_l (.clk, .rst_n, .pv(pv), .i_d(l_i_d), .i_v(l_i_v), .i_b(l_i_b), .n(src_n[2]), .stalls(src_st[2]));
  tb_stream_src #(.W(W), .SEED(3*1000+7), .STEP(9))  u_src_g (.clk, .rst_n, .pv(pv), .i_d(g_i_d), .i_v(g_i_v), .i_b(g_i_b), .n(src_n[3]), .stalls(src_st[3]));
  tb_stream_src #(.W(W), .SEED(4*1000+7), .STEP(11)) u_src_s (.clk, .rst_n, .pv(pv), .i_d(s_i_d), .i_v(s_i_v), .i_b(s_i_b), .n(src_n[4]), .stalls(src_st[4]));
  tb_stream_src #(.W(W), .SEED(5*1000+7), .STEP(13)) u_src_x (.clk, .rst_n, .pv(pv), .i_d(x_i_d), .i_v(x_i_v), .i_b(x_i_b), .n(src_n[5]), .stalls(src_st[5]));
  tb_stream_src #(.W(W), .SEED(6*1000+7), .STEP(15)) u_src_y (.clk, .rst_n, .pv(pvy), .i_d(y_i_d), .i_v(y_i_v), .i_b(y_i_b), .n(src_n[6]), .stalls(src_st[6]));

  tb_stream_sink #(.W(W))   u_snk_r (.clk, .rst_n, .pb(pb), .o_d(r_o_d), .o_v(r_o_v), .o_b(r_o_b), .exp_d(exp_w[0]), .n(snk_n[0]), .checks(snk_c[0]), .failures(snk_f[0]));
  tb_stream_sink #(.W(W))   u_snk_p (.clk, .rst_n, .pb(pb), .o_d(p_o_d), .o_v(p_o_v), .o_b(p_o_b), .exp_d(exp_w[1]), .n(snk_n[1]), .checks(snk_c[1]), .failures(snk_f[1]));
  tb_stream_sink #(.W(W))   u_snk_l (.clk, .rst_n, .pb(pb), .o_d(l_o_d), .o_v(l_o_v), .o_b(l_o_b), .exp_d(exp_w[2]), .n(snk_n[2]), .checks(snk_c[2]), .failures(snk_f[2]));
  tb_stream_sink #(.W(W))   u_snk_g (.clk, .rst_n, .pb(pb), .o_d(g_o_d), .o_v(g_o_v), .o_b(g_o_b), .exp_d(exp_w[3]), .n(snk_n[3]), .checks(snk_c[3]), .failures(snk_f[3]));
  tb_stream_sink #(.W(W))   u_snk_s (.clk, .rst_n, .pb(pb), .o_d(s_o_d), .o_v(s_o_v), .o_b(s_o_b), .exp_d(exp_w[4]), .n(snk_n[4]), .checks(snk_c[4]), .failures(snk_f[4]));
  tb_stream_sink #(.W(2*W)) u_snk_j (.clk, .rst_n, .pb(pb), .o_d(j_o_d), .o_v(j_o_v), .o_b(j_o_b), .exp_d(exp_j),    .n(snk_n[5]), .checks(snk_c[5]), .failures(snk_f[5]));

  // ---- mechanism counters
  typedef enum int {
    M_RELAY_STALL, M_DVBF_FULL, M_P_RESERVE, M_P_STALE, M_G_RESERVE, M_G_STALE,
    M_ENREG_STALL, M_SRLD_BYPASS, M_SRLD_MORE, M_SYSTOLIC_FULL, M_JOIN_WAIT,
    M_JOIN_FIRE, M_CIRC_WRAP, M_CIRC_FULL, M_DV_FULL, M_DVB_FULL, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"relay back-pressure", "SRL+DVBF full", "p reserve back-pressure",
    "p word under stale back-pressure", "g reserve back-pressure", "g word under stale back-pressure",
    "enabled register stall", "SRL+D output register bypass", "SRL+D state More", "systolic full",
    "join waits for one stream", "join fires", "circular buffer wrap", "circular buffer full",
    "SRL+DV full", "SRL+DVB full"};

  initial for (int m = 0; m < M_NUM; m++) mech[m] = 0;

  // ---- first-word latency: cycle of the first word taken in, cycle its
  // output first turns valid (all queues start empty)
  int cyc = 0;
  int t_in [NCH + 2];
  int t_out [NCH + 1];
  logic in_take [NCH + 2];
  logic out_v [NCH + 1];
  assign in_take = '{r_i_v && !r_i_b, p_i_v && !p_i_b, l_i_v && !l_i_b, g_i_v && !g_i_b,
                     s_i_v && !s_i_b, x_i_v && !x_i_b, y_i_v && !y_i_b};
  assign out_v = '{r_o_v, p_o_v, l_o_v, g_o_v, s_o_v, j_o_v};
  initial begin
    for (int c = 0; c < NCH + 2; c++) t_in[c] = -1;
    for (int c = 0; c < NCH + 1; c++) t_out[c] = -1;
  end
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int c = 0; c < NCH + 2; c++) if (in_take[c] && t_in[c] < 0) t_in[c] <= cyc;
  end
  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < NCH + 1; c++) if (out_v[c] && t_out[c] < 0) t_out[c] <= cyc;
  end

  always @(posedge clk) if (rst_n) begin
    if (r_i_v && r_i_b)                                              mech[M_RELAY_STALL]++;
    if (u_dut.u_r_queue.full_q)                                      mech[M_DVBF_FULL]++;
    if (u_dut.u_p_queue.i_b && !u_dut.u_p_queue.full)                mech[M_P_RESERVE]++;
    if (u_dut.u_p_queue.i_v && u_dut.u_p_queue.i_b)                  mech[M_P_STALE]++;
    if (u_dut.u_g_queue.i_b && !u_dut.u_g_queue.full)                mech[M_G_RESERVE]++;
    if (u_dut.u_g_queue.i_v && u_dut.u_g_queue.i_b)                  mech[M_G_STALE]++;
    if (u_dut.u_l_relay.i_b)                                         mech[M_ENREG_STALL]++;
    if (u_dut.u_l_queue.state == SRLD_ONE && u_dut.u_l_queue.act == ACT_CONSPROD) mech[M_SRLD_BYPASS]++;
    if (u_dut.u_l_queue.state == SRLD_MORE)                          mech[M_SRLD_MORE]++;
    if (s_i_b)                                                       mech[M_SYSTOLIC_FULL]++;
    if (u_dut.xq_v != u_dut.yq_v)                                    mech[M_JOIN_WAIT]++;
    if (u_dut.t_v && !u_dut.t_b)                                     mech[M_JOIN_FIRE]++;
    if (u_dut.u_j_queue.put && u_dut.u_j_queue.tail == 4'(D - 1))    mech[M_CIRC_WRAP]++;
    if (u_dut.u_j_queue.i_b)                                         mech[M_CIRC_FULL]++;
    if (x_i_b)                                                       mech[M_DV_FULL]++;
    if (y_i_b)                                                       mech[M_DVB_FULL]++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic phase(input int v, input int b, input int vy, input int ncyc);
    pv = v; pb = b; pvy = vy;
    repeat (ncyc) @(posedge clk);
  endtask

  initial begin
    int s0 [NCH + 2];
    int k0 [NCH + 1];
    pv = 0; pb = 100; pvy = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    phase(90, 10, 40, 600);   // busy producers, mostly ready consumers
    phase(90, 90, 90, 600);   // consumers mostly blocked: queues fill
    phase(30, 20, 90, 600);   // slow producers: queues run near empty
    phase(60, 50, 30, 1500);  // random
    // full rate at both ends
    phase(100, 0, 100, 200);
    @(negedge clk);
    for (int c = 0; c < NCH + 2; c++) s0[c] = src_n[c];
    for (int c = 0; c < NCH + 1; c++) k0[c] = snk_n[c];
    repeat (40) @(posedge clk);
    @(negedge clk);
    for (int c = 0; c < NCH + 2; c++)
      check(src_n[c] - s0[c] == 40, $sformatf("full rate: producer %0d took %0d of 40", c, src_n[c] - s0[c]));
    for (int c = 0; c < NCH + 1; c++)
      check(snk_n[c] - k0[c] == 40, $sformatf("full rate: consumer %0d took %0d of 40", c, snk_n[c] - k0[c]));
    // drain
    phase(0, 0, 0, 300);
    @(negedge clk);
    for (int c = 0; c < NCH; c++)
      check(snk_n[c] == src_n[c], $sformatf("channel %0d: %0d words in, %0d out", c, src_n[c], snk_n[c]));
    // words of the stream that ran ahead wait in its queue for partners
    check(snk_n[NCH] == ((src_n[NCH] < src_n[NCH + 1]) ? src_n[NCH] : src_n[NCH + 1]),
          $sformatf("tuples: x %0d y %0d out %0d", src_n[NCH], src_n[NCH + 1], snk_n[NCH]));
    for (int c = 0; c < NCH + 1; c++) begin
      checks += snk_c[c];
      failures += snk_f[c];
      check(snk_c[c] > 100, $sformatf("consumer %0d checked only %0d words", c, snk_c[c]));
    end
    // latency of the first word: relays and queues add one cycle each,
    // pipeline registers N_PIPE, the systolic queue DEPTH; the join none
    begin
      int exp_lat [NCH + 1] = '{2 + 1, 2 + 1, 1 + 1, 2 + 1, D, 1 + 1};
      int start;
      for (int c = 0; c < NCH + 1; c++) begin
        start = (c < NCH) ? t_in[c] : ((t_in[NCH] > t_in[NCH + 1]) ? t_in[NCH] : t_in[NCH + 1]);
        check(t_out[c] - start == exp_lat[c],
              $sformatf("channel %0d: first word took %0d cycles, expected %0d", c, t_out[c] - start, exp_lat[c]));
      end
    end
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-34s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism never happened: %s", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
