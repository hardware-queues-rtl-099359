// q_circ: circular-buffer queue.
//
// Words are kept in a DEPTH-word memory.  A tail pointer marks where the
// next word is written, a head pointer where the oldest word is read; both
// wrap from DEPTH-1 to 0, and an occupancy counter tells full from empty.
// o_d is an asynchronous read of the head word.  Flow control, all from
// registers:  o_v = (count != 0),  i_b = (count == DEPTH).  A word is taken
// when i_v & !i_b and given when o_v & !o_b at a rising edge, both in the
// same cycle if needed, so throughput is one word per cycle.  Reset
// (asynchronous, active low) empties the queue; the memory is not reset.
// The document names this structure (memory with head and tail pointers);
// the counter, the read style and the default depth are this design's.
module q_circ #(
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

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    head, tail;
  logic [PW:0]      count;
  logic             put, get;

  assign put = i_v && !i_b;
  assign get = o_v && !o_b;

  function automatic logic [PW-1:0] wrap_inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (put) tail <= wrap_inc(tail);
      if (get) head <= wrap_inc(head);
      if (put && !get)      count <= count + 1'b1;
      else if (get && !put) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (put) mem[tail] <= i_d;
  end

  assign o_d = mem[head];
  assign o_v = (count != '0);
  assign i_b = (count == (PW + 1)'(DEPTH));

endmodule
