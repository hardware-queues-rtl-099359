// tb_srl_store: self-checking testbench for srl_store.
//
// Two instances: the default 16 x 16 (one cell deep) and 8 bits x 40 words
// (three cells in cascade, the last partly used).  Random words are shifted
// in under a random enable; a reference array shifted the same way predicts
// the word at every position, and each cycle every position is read back
// through the address port.  Ends with the TB_RESULT line; a watchdog stops
// a hung run.
module tb_srl_store;

  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : g_inst
    localparam int W = (g == 0) ? 16 : 8;
    localparam int D = (g == 0) ? 16 : 40;
    localparam int AW = $clog2(D);
    logic          en;
    logic [W-1:0]  d, q;
    logic [AW-1:0] addr;
    logic [W-1:0]  ref_a [D];

    srl_store #(.WIDTH(W), .DEPTH(D)) u_dut (.clk(clk), .en(en), .d(d), .addr(addr), .q(q));

    initial begin
      en = 1'b0; addr = '0; d = '0;
      for (int k = 0; k < D + 600; k++) begin
        @(negedge clk);
        en = (k < D) || ($urandom_range(2) != 0);
        d  = W'($urandom);
        if (k >= D) begin
          for (int p = 0; p < D; p++) begin
            addr = AW'(p);
            #0.01;
            check(q == ref_a[p], $sformatf("inst %0d pos %0d: %h expected %h", g, p, q, ref_a[p]));
          end
        end
        @(posedge clk);
        if (en) begin
          for (int p = D - 1; p > 0; p--) ref_a[p] = ref_a[p-1];
          ref_a[0] = d;
        end
      end
      done++;
    end
  end

endmodule
