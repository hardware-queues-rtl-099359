// tb_stream_pipe: self-checking testbench for stream_pipe.
//
// Three instances: interconnect pipelining with N_FWD = N_BWD = 2 (the
// default), logic pipelining with N_FWD = 3, N_BWD = 0, and N_FWD = N_BWD
// = 1.  A random producer (which may hold i_v while back-pressured) and a
// random back-pressure at the queue end drive each one.  The testbench
// records, at every rising edge, whether the producer's word committed
// (i_v & !i_b) and the queue's o_b, and checks that
//   o_v, o_d after edge e == the commit and word recorded at edge e-N_FWD+1
//   i_b after edge e      == o_b recorded at edge e-N_BWD+1 (1 before any)
// so every committed word arrives exactly once, N_FWD cycles later.  Ends
// with the TB_RESULT line; a watchdog stops a hung run.
module tb_stream_pipe;

  localparam int W = 16;
  localparam int NCYC = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0, done = 0;

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
    repeat (100000) @(posedge clk);
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

  for (genvar g = 0; g < 3; g++) begin : g_inst
    localparam int NF = (g == 0) ? 2 : (g == 1) ? 3 : 1;
    localparam int NB = (g == 0) ? 2 : (g == 1) ? 0 : 1;
    logic [W-1:0] i_d, o_d;
    logic         i_v, i_b, o_v, o_b;
    logic         h_commit [NCYC];
    logic [W-1:0] h_data   [NCYC];
    logic         h_ob     [NCYC];

    stream_pipe #(.WIDTH(W), .N_FWD(NF), .N_BWD(NB)) u_dut (
      .clk (clk), .rst_n (rst_n),
      .i_d (i_d), .i_v (i_v), .i_b (i_b),
      .o_d (o_d), .o_v (o_v), .o_b (o_b)
    );

    initial begin
      int src;
      i_v = 1'b0; o_b = 1'b1; i_d = '0;
      wait (rst_n);
      for (int e = 0; e < NCYC; e++) begin
        @(negedge clk);
        // check the outputs after edge e-1
        if (e > 0) begin
          src = e - 1 - NF + 1;
          if (src >= 0) begin
            check(o_v == h_commit[src], $sformatf("pipe %0d: o_v %0d expected %0d", g, o_v, h_commit[src]));
            if (h_commit[src])
              check(o_d == h_data[src], $sformatf("pipe %0d: o_d %h expected %h", g, o_d, h_data[src]));
          end else begin
            check(!o_v, $sformatf("pipe %0d: o_v before any word", g));
          end
          if (NB > 0) begin
            src = e - 1 - NB + 1;
            check(i_b == ((src >= 0) ? h_ob[src] : 1'b1), $sformatf("pipe %0d: i_b %0d", g, i_b));
          end
        end
        i_v = ($urandom_range(99) < 60) ? 1'b1 : i_v && ($urandom_range(1) == 0);
        i_d = W'($urandom);
        o_b = ($urandom_range(99) < 40);
        if (NB == 0) begin
          #1;
          check(i_b == o_b, $sformatf("pipe %0d: direct i_b", g));
        end
        @(posedge clk);
        h_commit[e] = i_v && !i_b;
        h_data[e]   = i_d;
        h_ob[e]     = o_b;
      end
      done++;
    end
  end

endmodule
