// q_srl_d: shift-register queue with a data output register (SRL+D).
//
// The head word sits in a data output register, so o_d comes straight from
// a flip-flop instead of through the shift register's read multiplexer.
// The register extends the shift register: capacity DEPTH = 1 output
// register + DEPTH-1 shift positions.  A word arriving at an empty queue,
// or at a queue whose only word is leaving, bypasses the shift register
// and goes straight into the output register.  Three states, Empty / One /
// More, and addr = (stored words) - 2 in More (next-state logic in
// srld_ctrl).  Flow control, combinational from the state registers:
//   o_v = !(state == Empty)      i_b = (state == More) & (addr == DEPTH-2)
// One word per cycle.  Handshake on both sides: a word moves when V is high
// and B low at a rising edge.  Reset (asynchronous, active low) empties the
// queue and clears the output register.  Structure and flow control follow
// the document; the qualification of i_b with state More (needed for
// DEPTH = 2) and the state encoding are this design's choices.
module q_srl_d
  import hwq_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
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

  localparam int unsigned SDEPTH = DEPTH - 1;  // shift register positions
  localparam int unsigned AW     = (SDEPTH > 1) ? $clog2(SDEPTH) : 1;

  if (DEPTH < 2) begin : g_bad_param
    $error("q_srl_d needs DEPTH >= 2");
  end

  srld_state_e      state, state_n;
  logic [AW-1:0]    addr, addr_n;
  logic             shift_en, dload, dsel_srl;
  q_action_e        act;
  logic             full, zero;
  logic [WIDTH-1:0] srl_q, d_q;

  assign zero = (addr == '0);
  assign full = (addr == AW'(DEPTH - 2));

  srld_ctrl #(.AW(AW)) u_ctrl (
    .state    (state),
    .addr     (addr),
    .full     (full),
    .zero     (zero),
    .i_v      (i_v),
    .o_b      (o_b),
    .state_n  (state_n),
    .addr_n   (addr_n),
    .shift_en (shift_en),
    .dload    (dload),
    .dsel_srl (dsel_srl),
    .act      (act)
  );

  srl_store #(.WIDTH(WIDTH), .DEPTH(SDEPTH), .AW(AW)) u_store (
    .clk  (clk),
    .en   (shift_en),
    .d    (i_d),
    .addr (addr),
    .q    (srl_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SRLD_EMPTY;
      addr  <= '0;
      d_q   <= '0;
    end else begin
      state <= state_n;
      addr  <= addr_n;
      if (dload) d_q <= dsel_srl ? srl_q : i_d;
    end
  end

  assign o_d = d_q;
  assign o_v = (state != SRLD_EMPTY);
  assign i_b = (state == SRLD_MORE) && full;

endmodule
