// q_srl: shift-register queue.
//
// Words are stored in an addressable shift register (srl_store): a word
// taken in enters position 0 and pushes the others up, and the oldest word
// is read at position addr, where addr = (number of stored words) - 1.  The
// controller has one state bit, empty or non-empty, and chooses each cycle
// whether to consume (shift in), produce (let the head word go), both or
// neither, and the next address:
//   empty                     : consume if i_v
//   non-empty, full           : produce if !o_b          (addr - 1)
//   non-empty, not full       : i_v & o_b  consume        (addr + 1)
//                               i_v & !o_b consume+produce (addr)
//                               !i_v & !o_b produce        (addr - 1, or empty
//                                                          when addr == 0)
// Flow control: o_v = non-empty, o_d = word at addr, i_b = full.  The queue
// runs at one word per cycle for DEPTH >= 2.  o_d comes through the
// shift register's read multiplexer, so its clock-to-output delay grows
// with DEPTH.
//
// RESERVE (default 0) makes i_b rise while RESERVE or fewer slots are
// still empty, for a queue fed through pipeline registers whose
// back-pressure reaches the producer late (interconnect pipelining: 2N,
// logic pipelining: N).  Such a queue keeps accepting every arriving word
// until it is truly full; an assertion reports a word arriving when full.
//
// Reset (asynchronous, active low) empties the queue; stored words are not
// reset.  Controller and flow control follow the document; the reserve as
// a parameter, and the shift register built from 16-deep cells, follow its
// description of pipelined queues and of the FPGA shift cells.
module q_srl
  import hwq_pkg::*;
#(
  parameter int unsigned DEPTH   = 16,
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned RESERVE = 0
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

  localparam int unsigned AW = $clog2(DEPTH);

  if (DEPTH < 2 || RESERVE >= DEPTH) begin : g_bad_param
    $error("q_srl needs DEPTH >= 2 and RESERVE < DEPTH");
  end

  srl_state_e    state, state_n;
  logic [AW-1:0] addr, addr_n;
  logic          shift_en;
  logic          full, zero;
  logic [AW:0]   count;

  assign full  = (addr == AW'(DEPTH - 1));
  assign zero  = (addr == '0);
  assign count = (state == SRL_EMPTY) ? '0 : ((AW + 1)'(addr) + 1'b1);

  always_comb begin
    shift_en = 1'b0;
    addr_n   = addr;
    state_n  = state;
    unique case (state)
      SRL_EMPTY: begin
        if (i_v) begin
          shift_en = 1'b1;
          addr_n   = '0;
          state_n  = SRL_NONEMPTY;
        end
      end
      SRL_NONEMPTY: begin
        if (full) begin
          if (!o_b) addr_n = addr - 1'b1;
        end else if (i_v && o_b) begin
          shift_en = 1'b1;
          addr_n   = addr + 1'b1;
        end else if (i_v && !o_b) begin
          shift_en = 1'b1;
        end else if (!i_v && !o_b) begin
          if (zero) state_n = SRL_EMPTY;
          else      addr_n  = addr - 1'b1;
        end
      end
      default: state_n = SRL_EMPTY;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SRL_EMPTY;
      addr  <= '0;
    end else begin
      state <= state_n;
      addr  <= addr_n;
    end
  end

  srl_store #(.WIDTH(WIDTH), .DEPTH(DEPTH), .AW(AW)) u_store (
    .clk  (clk),
    .en   (shift_en),
    .d    (i_d),
    .addr (addr),
    .q    (o_d)
  );

  assign o_v = (state == SRL_NONEMPTY);
  assign i_b = ((AW + 1)'(DEPTH) - count) <= (AW + 1)'(RESERVE);

  // With a reserve, every arriving word is already committed upstream and
  // must find room.  (Without one, a producer may hold i_v while i_b is high.)
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
    (RESERVE == 0) || !(i_v && (state == SRL_NONEMPTY) && full));

endmodule
