// hwq_top: a streaming system built from the queues and stream-pipelining
// structures, as independent channels side by side.
//
// Every channel is a stream from a producer to a consumer outside this
// module (ports <ch>_i_* from the producer, <ch>_o_* to the consumer), with
// data D, valid V and back-pressure B; a word moves when V is high and B is
// low at a rising clock edge.
//   r  interconnect relaying : a cascade of N_RELAY depth-2 shift-register
//                              queues (Q2) relays the stream over a long
//                              distance into the original queue, here
//                              SRL+DVBF (q_srl_dvbf).  Each relay stage
//                              adds one cycle of latency and keeps full
//                              throughput.
//   p  interconnect pipelining: N_PIPE registers on D, V and B
//                              (stream_pipe) into a shift-register queue
//                              that holds 2*N_PIPE slots in reserve.
//   l  logic relaying        : an enabled register queue (q_enreg), whose
//                              register can be retimed into the producer,
//                              in front of the original queue, here SRL+D.
//   g  logic pipelining      : N_PIPE registers on D and V only, B direct,
//                              into a shift-register queue with N_PIPE
//                              slots in reserve.
//   s  systolic queue        : a cascade of DEPTH enabled-register stages.
//   x, y -> j  tuple alignment: stream x through SRL+DV, stream y through
//                              SRL+DVB, joined word by word by a slave
//                              process (stream_join) into {x, y} pairs that
//                              are buffered in a circular-buffer queue.
// All queues are DEPTH deep (the relay queues are 2).  N_PIPE and N_RELAY
// default to 2: the number of stages depends on the distance to cover.  Reset is asynchronous
// and active low.  The channel structures follow the document; which queue
// variant stands as the "original queue" in each channel and the join
// channel are this design's choices, made so that every queue variant is
// used.
module hwq_top #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned N_PIPE  = 2,
  parameter int unsigned N_RELAY = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // r: interconnect relaying
  input  logic [WIDTH-1:0]   r_i_d,
  input  logic               r_i_v,
  output logic               r_i_b,
  output logic [WIDTH-1:0]   r_o_d,
  output logic               r_o_v,
  input  logic               r_o_b,
  // p: interconnect pipelining
  input  logic [WIDTH-1:0]   p_i_d,
  input  logic               p_i_v,
  output logic               p_i_b,
  output logic [WIDTH-1:0]   p_o_d,
  output logic               p_o_v,
  input  logic               p_o_b,
  // l: logic relaying
  input  logic [WIDTH-1:0]   l_i_d,
  input  logic               l_i_v,
  output logic               l_i_b,
  output logic [WIDTH-1:0]   l_o_d,
  output logic               l_o_v,
  input  logic               l_o_b,
  // g: logic pipelining
  input  logic [WIDTH-1:0]   g_i_d,
  input  logic               g_i_v,
  output logic               g_i_b,
  output logic [WIDTH-1:0]   g_o_d,
  output logic               g_o_v,
  input  logic               g_o_b,
  // s: systolic queue
  input  logic [WIDTH-1:0]   s_i_d,
  input  logic               s_i_v,
  output logic               s_i_b,
  output logic [WIDTH-1:0]   s_o_d,
  output logic               s_o_v,
  input  logic               s_o_b,
  // x, y -> j: tuple alignment
  input  logic [WIDTH-1:0]   x_i_d,
  input  logic               x_i_v,
  output logic               x_i_b,
  input  logic [WIDTH-1:0]   y_i_d,
  input  logic               y_i_v,
  output logic               y_i_b,
  output logic [2*WIDTH-1:0] j_o_d,
  output logic               j_o_v,
  input  logic               j_o_b
);

  // ---- r: chain of N_RELAY depth-2 relay queues (Q2) -> original queue
  logic [WIDTH-1:0] r_m_d [N_RELAY+1];
  logic             r_m_v [N_RELAY+1];
  logic             r_m_b [N_RELAY+1];

  assign r_m_d[0] = r_i_d;
  assign r_m_v[0] = r_i_v;
  assign r_i_b    = r_m_b[0];

  for (genvar k = 0; k < N_RELAY; k++) begin : g_relay
    q_srl #(.DEPTH(2), .WIDTH(WIDTH)) u_r_relay (
      .clk, .rst_n,
      .i_d (r_m_d[k]),   .i_v (r_m_v[k]),   .i_b (r_m_b[k]),
      .o_d (r_m_d[k+1]), .o_v (r_m_v[k+1]), .o_b (r_m_b[k+1])
    );
  end

  q_srl_dvbf #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_r_queue (
    .clk, .rst_n,
    .i_d (r_m_d[N_RELAY]), .i_v (r_m_v[N_RELAY]), .i_b (r_m_b[N_RELAY]),
    .o_d (r_o_d), .o_v (r_o_v), .o_b (r_o_b)
  );

  // ---- p: pipelined D, V, B -> queue with 2N reserve
  logic [WIDTH-1:0] p_m_d;
  logic             p_m_v, p_m_b;

  stream_pipe #(.WIDTH(WIDTH), .N_FWD(N_PIPE), .N_BWD(N_PIPE)) u_p_pipe (
    .clk, .rst_n,
    .i_d (p_i_d), .i_v (p_i_v), .i_b (p_i_b),
    .o_d (p_m_d), .o_v (p_m_v), .o_b (p_m_b)
  );
  q_srl #(.DEPTH(DEPTH), .WIDTH(WIDTH), .RESERVE(2 * N_PIPE)) u_p_queue (
    .clk, .rst_n,
    .i_d (p_m_d), .i_v (p_m_v), .i_b (p_m_b),
    .o_d (p_o_d), .o_v (p_o_v), .o_b (p_o_b)
  );

  // ---- l: enabled register relay -> original queue
  logic [WIDTH-1:0] l_m_d;
  logic             l_m_v, l_m_b;

  q_enreg #(.WIDTH(WIDTH)) u_l_relay (
    .clk, .rst_n,
    .i_d (l_i_d), .i_v (l_i_v), .i_b (l_i_b),
    .o_d (l_m_d), .o_v (l_m_v), .o_b (l_m_b)
  );
  q_srl_d #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_l_queue (
    .clk, .rst_n,
    .i_d (l_m_d), .i_v (l_m_v), .i_b (l_m_b),
    .o_d (l_o_d), .o_v (l_o_v), .o_b (l_o_b)
  );

  // ---- g: pipelined D, V (B direct) -> queue with N reserve
  logic [WIDTH-1:0] g_m_d;
  logic             g_m_v, g_m_b;

  stream_pipe #(.WIDTH(WIDTH), .N_FWD(N_PIPE), .N_BWD(0)) u_g_pipe (
    .clk, .rst_n,
    .i_d (g_i_d), .i_v (g_i_v), .i_b (g_i_b),
    .o_d (g_m_d), .o_v (g_m_v), .o_b (g_m_b)
  );
  q_srl #(.DEPTH(DEPTH), .WIDTH(WIDTH), .RESERVE(N_PIPE)) u_g_queue (
    .clk, .rst_n,
    .i_d (g_m_d), .i_v (g_m_v), .i_b (g_m_b),
    .o_d (g_o_d), .o_v (g_o_v), .o_b (g_o_b)
  );

  // ---- s: systolic queue
  q_systolic #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_s_queue (
    .clk, .rst_n,
    .i_d (s_i_d), .i_v (s_i_v), .i_b (s_i_b),
    .o_d (s_o_d), .o_v (s_o_v), .o_b (s_o_b)
  );

  // ---- x, y -> j: queued streams joined into tuples, buffered
  logic [WIDTH-1:0]   xq_d, yq_d;
  logic               xq_v, xq_b, yq_v, yq_b;
  logic [2*WIDTH-1:0] t_d;
  logic               t_v, t_b;

  q_srl_dv #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_x_queue (
    .clk, .rst_n,
    .i_d (x_i_d), .i_v (x_i_v), .i_b (x_i_b),
    .o_d (xq_d), .o_v (xq_v), .o_b (xq_b)
  );
  q_srl_dvb #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_y_queue (
    .clk, .rst_n,
    .i_d (y_i_d), .i_v (y_i_v), .i_b (y_i_b),
    .o_d (yq_d), .o_v (yq_v), .o_b (yq_b)
  );
  stream_join #(.WIDTH(WIDTH)) u_join (
    .a_d (xq_d), .a_v (xq_v), .a_b (xq_b),
    .b_d (yq_d), .b_v (yq_v), .b_b (yq_b),
    .o_d (t_d),  .o_v (t_v),  .o_b (t_b)
  );
  q_circ #(.WIDTH(2 * WIDTH), .DEPTH(DEPTH)) u_j_queue (
    .clk, .rst_n,
    .i_d (t_d),   .i_v (t_v),   .i_b (t_b),
    .o_d (j_o_d), .o_v (j_o_v), .o_b (j_o_b)
  );

endmodule
