// q_systolic: systolic queue, a cascade of DEPTH enabled-register stages.
//
// Each stage (q_enreg) holds at most one word and passes it on when the
// next stage can take it, so words advance one stage per cycle and the
// queue holds up to DEPTH words.  Latency through an empty queue is DEPTH
// cycles; throughput is one word per cycle.  Back-pressure ripples
// combinationally from o_b to i_b through every full stage.  The cascade
// structure follows the document; the default depth is this design's
// choice.
module q_systolic #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] i_d,
  input  logic             i_v,
  output logic             i_b,
  output logic [WIDTH-1:0] o_d,
  output logic             o_v,
  input  logic             o_b
);

  logic [WIDTH-1:0] d [DEPTH+1];
  logic             v [DEPTH+1];
  logic             b [DEPTH+1];

  assign d[0] = i_d;
  assign v[0] = i_v;
  assign i_b  = b[0];

  for (genvar k = 0; k < DEPTH; k++) begin : g_stage
    q_enreg #(.WIDTH(WIDTH)) u_stage (
      .clk   (clk),
      .rst_n (rst_n),
      .i_d   (d[k]),
      .i_v   (v[k]),
      .i_b   (b[k]),
      .o_d   (d[k+1]),
      .o_v   (v[k+1]),
      .o_b   (b[k+1])
    );
  end

  assign o_d      = d[DEPTH];
  assign o_v      = v[DEPTH];
  assign b[DEPTH] = o_b;

endmodule
