// q_enreg: enabled register queue, a systolic queue stage of depth 1.
//
// The stage is one data register plus one valid bit, which is also the
// stage's empty/full state.  It loads a new word (or the absence of one)
// every cycle unless it is full and the downstream side back-pressures it;
// that same condition is the back-pressure it sends upstream:
//   en  = !(o_v & o_b)        i_b = o_v & o_b
// Data and valid leave straight from flip-flops, but i_b is combinational
// from o_b, so a chain of these stages has a back-pressure path through all
// of them.  Full throughput: a word per cycle.
//
// Handshake on both sides: a word moves when V is high and B is low at a
// rising clock edge.  Reset (asynchronous, active low) clears the valid
// bit; the data register is not reset.  The load rule follows the
// document; the reset style follows its shift-register queue.
module q_enreg #(
  parameter int unsigned WIDTH = 16
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

  logic             v_q;
  logic [WIDTH-1:0] d_q;
  logic             en;

  assign en  = !(v_q && o_b);
  assign i_b = !en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  v_q <= 1'b0;
    else if (en) v_q <= i_v;
  end

  always_ff @(posedge clk) begin
    if (en) d_q <= i_d;
  end

  assign o_v = v_q;
  assign o_d = d_q;

endmodule
