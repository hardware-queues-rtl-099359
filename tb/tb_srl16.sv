// tb_srl16: self-checking testbench for srl16.
//
// Shifts random bits in with a random clock enable and keeps its own
// 16-bit reference.  Every cycle it checks q at a random address and the
// cascade output q15 against the reference.  Ends with the TB_RESULT line;
// a watchdog stops a hung run.
module tb_srl16;

  logic clk = 1'b0;
  logic ce, d, q, q15;
  logic [3:0]  a;
  logic [15:0] ref_sr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  srl16 u_dut (.clk(clk), .ce(ce), .d(d), .a(a), .q(q), .q15(q15));

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
    // fill all 16 positions so the reference is known
    ce = 1'b1;
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      d = 1'($urandom);
      a = '0;
      @(posedge clk);
      ref_sr = {ref_sr[14:0], d};
    end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      ce = ($urandom_range(3) != 0);
      d  = 1'($urandom);
      a  = 4'($urandom);
      #1;
      check(q == ref_sr[a], $sformatf("q at %0d is %0b expected %0b", a, q, ref_sr[a]));
      check(q15 == ref_sr[15], "q15");
      @(posedge clk);
      if (ce) ref_sr = {ref_sr[14:0], d};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
