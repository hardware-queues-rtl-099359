// stream_join: a process that aligns two streams into tuples.
//
// A slave process with two input streams and one output stream.  It fires
// when both inputs are valid and the output is not back-pressured; firing
// takes one word from each input and emits the pair {a_d, b_d} in the same
// cycle.  It has no storage: o_v and the input back-pressures are
// combinational in a_v, b_v and o_b, so a queue (which drives its
// flow-control outputs from its own state) must sit on each side of it.
//   fire = a_v & b_v & !o_b;   o_v = fire;   a_b = b_b = !fire
// The firing rule follows the document; forming the tuple is this design's
// choice of operation.
module stream_join #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0]   a_d,
  input  logic               a_v,
  output logic               a_b,
  input  logic [WIDTH-1:0]   b_d,
  input  logic               b_v,
  output logic               b_b,
  output logic [2*WIDTH-1:0] o_d,
  output logic               o_v,
  input  logic               o_b
);

  logic fire;

  assign fire = a_v && b_v && !o_b;
  assign o_v  = fire;
  assign a_b  = !fire;
  assign b_b  = !fire;
  assign o_d  = {a_d, b_d};

endmodule
