// q_srl_dv: SRL+D queue with pre-computed valid (SRL+DV).
//
// Identical in behaviour to q_srl_d (data output register, Empty / One /
// More controller in srld_ctrl, capacity DEPTH), but o_v comes from its own
// flip-flop, loaded every cycle with !(state_next == Empty), so the
// consumer sees valid with only a clock-to-output delay instead of through
// a state decode.  i_b is still the combinational compare
// (state == More) & (addr == DEPTH-2).  Reset (asynchronous, active low)
// empties the queue and clears o_v.  The registered valid follows the
// document; the rest is as in q_srl_d.
module q_srl_dv
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
    $error("q_srl_dv needs DEPTH >= 2");
  end

  srld_state_e      state, state_n;
  logic [AW-1:0]    addr, addr_n;
  logic             shift_en, dload, dsel_srl;
  q_action_e        act;
  logic             full, zero;
  logic [WIDTH-1:0] srl_q, d_q;
  logic             v_q;

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
      v_q   <= 1'b0;
    end else begin
      state <= state_n;
      addr  <= addr_n;
      if (dload) d_q <= dsel_srl ? srl_q : i_d;
      v_q   <= (state_n != SRLD_EMPTY);
    end
  end

  assign o_d = d_q;
  assign o_v = v_q;
  assign i_b = (state == SRLD_MORE) && full;

endmodule
