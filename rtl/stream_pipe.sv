// stream_pipe: pipeline registers on a stream, for long wires or deep logic.
//
// N_FWD registers delay data and valid from the producer to the queue, and
// N_BWD registers delay back-pressure from the queue to the producer
// (interconnect pipelining: N_FWD = N_BWD = N; logic pipelining, where the
// registers are retimed into the producer's logic: N_FWD = N, N_BWD = 0).
// Because the producer sees back-pressure late, the receiving queue must
// start back-pressuring while N_FWD + N_BWD slots are still empty (q_srl
// RESERVE).  The first forward stage registers a word only when it commits
// at the producer side (i_v & !i_b), so a producer holding i_v under
// back-pressure is not sent twice; every o_v the queue sees is a committed
// word that it must accept.  Latency: N_FWD cycles forward, N_BWD back.
// Reset (asynchronous, active low) clears the valid stages and sets the
// back-pressure stages, so nothing is sent before the queue's state has
// arrived.  The register placement follows the document; the commit
// qualification and the reset values are this design's choices.
module stream_pipe #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned N_FWD = 2,
  parameter int unsigned N_BWD = 2
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

  if (N_FWD < 1) begin : g_bad_param
    $error("stream_pipe needs N_FWD >= 1");
  end

  logic [WIDTH-1:0] d_q [N_FWD];
  logic             v_q [N_FWD];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_FWD; k++) v_q[k] <= 1'b0;
    end else begin
      v_q[0] <= i_v && !i_b;
      for (int k = 1; k < N_FWD; k++) v_q[k] <= v_q[k-1];
    end
  end

  always_ff @(posedge clk) begin
    d_q[0] <= i_d;
    for (int k = 1; k < N_FWD; k++) d_q[k] <= d_q[k-1];
  end

  assign o_d = d_q[N_FWD-1];
  assign o_v = v_q[N_FWD-1];

  if (N_BWD == 0) begin : g_b_direct
    assign i_b = o_b;
  end else begin : g_b_pipe
    logic [N_BWD-1:0] b_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        b_q <= '1;
      end else begin
        b_q[0] <= o_b;
        for (int k = 1; k < N_BWD; k++) b_q[k] <= b_q[k-1];
      end
    end
    assign i_b = b_q[N_BWD-1];
  end

endmodule
