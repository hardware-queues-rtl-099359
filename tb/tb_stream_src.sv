// tb_stream_src: producer model for the system testbench.
//
// Offers word k of its stream, k = 0, 1, 2 ..., where word k is
// SEED + k * STEP (truncated to W bits), so a consumer can work out every
// expected word independently.  Each cycle, at the falling edge, it raises
// i_v with probability pv percent (a raised i_v is kept until the word is
// taken, as a real producer would); a word is taken when i_v is high and
// i_b low at the rising edge.  n counts the words taken; stalls counts the
// cycles i_v was held off by i_b.
module tb_stream_src #(
  parameter int W    = 16,
  parameter int SEED = 1,
  parameter int STEP = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  int           pv,
  output logic [W-1:0] i_d,
  output logic         i_v,
  input  logic         i_b,
  output int           n,
  output int           stalls
);

  logic took;

  initial begin
    i_v = 1'b0;
    i_d = W'(SEED);
    n = 0;
    stalls = 0;
    took = 1'b0;
  end

  // Decide the next offer: a new word after one was taken, or when idle.
  always @(negedge clk) begin
    if (!rst_n)             i_v <= 1'b0;
    else if (took || !i_v)  i_v <= ($urandom_range(99) < pv);
    i_d <= W'(SEED + n * STEP);
  end

  always @(posedge clk) begin
    took <= rst_n && i_v && !i_b;
    if (rst_n && i_v && !i_b) n <= n + 1;
    if (rst_n && i_v && i_b)  stalls <= stalls + 1;
  end

endmodule
