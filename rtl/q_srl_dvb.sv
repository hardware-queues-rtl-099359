// q_srl_dvb: SRL+DV queue with pre-computed back-pressure (SRL+DVB).
//
// Identical in behaviour to q_srl_d, but both flow-control outputs come
// from flip-flops: o_v is loaded with !(state_next == Empty) and i_b with
// full_next = (state_next == More) & (addr_next == DEPTH-2).  The
// controller's own full test still compares the current address.  Reset
// (asynchronous, active low) empties the queue and clears o_v and i_b.
// The registered back-pressure follows the document; qualifying full_next
// with state More is this design's choice (needed for DEPTH = 2).
module q_srl_dvb
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
    $error("q_srl_dvb needs DEPTH >= 2");
  end

  srld_state_e      state, state_n;
  logic [AW-1:0]    addr, addr_n;
  logic             shift_en, dload, dsel_srl;
  q_action_e        act;
  logic             full, zero;
  logic [WIDTH-1:0] srl_q, d_q;
  logic             v_q, b_q;

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
      b_q   <= 1'b0;
    end else begin
      state <= state_n;
      addr  <= addr_n;
      if (dload) d_q <= dsel_srl ? srl_q : i_d;
      v_q   <= (state_n != SRLD_EMPTY);
      b_q   <= (state_n == SRLD_MORE) && (addr_n == AW'(DEPTH - 2));
    end
  end

  assign o_d = d_q;
  assign o_v = v_q;
  assign i_b = b_q;

endmodule
