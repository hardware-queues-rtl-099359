// q_srl_dvbf: SRL+DVB queue with specialised, pre-computed fullness
// (SRL+DVBF).
//
// Identical in behaviour to q_srl_d.  o_v and i_b come from flip-flops as in
// q_srl_dvb, but the full flag is not computed by comparing the next
// address.  Instead it is worked out for each state and action from the
// current address, which breaks the address-compare -> controller ->
// address-update loop:
//   consume only, in More : full_next = (addr == DEPTH-3)
//   consume only, in One  : full_next = (DEPTH == 2)
//   idle                  : full_next = full
//   anything else         : full_next = 0
// The same registered flag is the controller's full test and drives i_b.
// The zero test remains an address compare.  Reset (asynchronous, active
// low) empties the queue and clears o_v and the full flag.  The per-state
// special-casing follows the document; the table above is this design's
// working-out of it.
module q_srl_dvbf
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
    $error("q_srl_dvbf needs DEPTH >= 2");
  end

  srld_state_e      state, state_n;
  logic [AW-1:0]    addr, addr_n;
  logic             shift_en, dload, dsel_srl;
  q_action_e        act;
  logic             full, zero;
  logic [WIDTH-1:0] srl_q, d_q;
  logic             v_q, full_q, full_n;

  assign zero = (addr == '0);
  assign full = full_q;

  // Fullness after this cycle, special-cased by state and action.
  always_comb begin
    unique case (act)
      ACT_CONSUME: full_n = (state == SRLD_MORE) ? (addr == AW'(DEPTH - 3))
                          : (state == SRLD_ONE)  ? (DEPTH == 2)
                          : 1'b0;
      ACT_IDLE:    full_n = full_q;
      default:     full_n = 1'b0;
    endcase
  end

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
      v_q    <= 1'b0;
      full_q <= 1'b0;
    end else begin
      state <= state_n;
      addr  <= addr_n;
      if (dload) d_q <= dsel_srl ? srl_q : i_d;
      v_q    <= (state_n != SRLD_EMPTY);
      full_q <= full_n;
    end
  end

  assign o_d = d_q;
  assign o_v = v_q;
  assign i_b = full_q;

endmodule
