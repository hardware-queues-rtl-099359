// tb_stream_sink: consumer model and checker for the system testbench.
//
// Each cycle, at the falling edge, it raises o_b with probability pb
// percent.  When o_v is high and o_b low at a rising edge it takes the word
// and compares it with exp_d, the word the testbench expects next (worked
// out from n, the count of words taken so far).  checks and failures count
// the comparisons and the mismatches.
module tb_stream_sink #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  int           pb,
  input  logic [W-1:0] o_d,
  input  logic         o_v,
  output logic         o_b,
  input  logic [W-1:0] exp_d,
  output int           n,
  output int           checks,
  output int           failures
);

  initial begin
    o_b = 1'b1;
    n = 0;
    checks = 0;
    failures = 0;
  end

  always @(negedge clk) o_b <= ($urandom_range(99) < pb);

  always @(posedge clk) begin
    if (rst_n && o_v && !o_b) begin
      checks <= checks + 1;
      if (o_d !== exp_d) begin
        failures <= failures + 1;
        if (failures < 10) $display("FAIL %0t: %m word %0d is %h expected %h", $time, n, o_d, exp_d);
      end
      n <= n + 1;
    end
  end

endmodule
