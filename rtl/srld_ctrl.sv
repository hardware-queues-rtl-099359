// srld_ctrl: next-state logic shared by the shift-register queues that keep
// their head word in a data output register (SRL+D and its variants).
//
// Purely combinational.  States: Empty; One (only the output register holds
// a word); More (the output register holds the head word and the shift
// register holds addr+1 further words, so addr = count - 2).  Each cycle it
// picks one action from i_v, o_b and the full/zero flags:
//   Empty            : i_v -> consume into the output register, go to One
//   One              : i_v & o_b   -> consume into the shift register, More
//                      i_v & !o_b  -> consume + produce, the new word goes
//                                     straight into the output register
//                      !i_v & !o_b -> produce, go to Empty
//   More, full       : !o_b -> produce (output register <= shift[addr])
//   More, not full   : i_v & o_b   -> consume (shift in, addr + 1)
//                      i_v & !o_b  -> consume + produce (shift in and
//                                     output register <= shift[addr])
//                      !i_v & !o_b -> produce
// A produce in More with addr == 0 returns to One.  The variants differ
// only in how full is obtained and which outputs are registered.
module srld_ctrl
  import hwq_pkg::*;
#(
  parameter int unsigned AW = 4
) (
  input  srld_state_e   state,
  input  logic [AW-1:0] addr,
  input  logic          full,
  input  logic          zero,
  input  logic          i_v,
  input  logic          o_b,
  output srld_state_e   state_n,
  output logic [AW-1:0] addr_n,
  output logic          shift_en,  // shift i_d into the shift register
  output logic          dload,     // load the data output register
  output logic          dsel_srl,  // 1: from shift[addr], 0: from i_d
  output q_action_e     act
);

  always_comb begin
    state_n  = state;
    addr_n   = addr;
    shift_en = 1'b0;
    dload    = 1'b0;
    dsel_srl = 1'b0;
    act      = ACT_IDLE;
    unique case (state)
      SRLD_EMPTY: begin
        addr_n = '0;
        if (i_v) begin
          dload   = 1'b1;
          state_n = SRLD_ONE;
          act     = ACT_CONSUME;
        end
      end
      SRLD_ONE: begin
        addr_n = '0;
        if (i_v && o_b) begin
          shift_en = 1'b1;
          state_n  = SRLD_MORE;
          act      = ACT_CONSUME;
        end else if (i_v && !o_b) begin
          dload = 1'b1;
          act   = ACT_CONSPROD;
        end else if (!i_v && !o_b) begin
          state_n = SRLD_EMPTY;
          act     = ACT_PRODUCE;
        end
      end
      SRLD_MORE: begin
        if (full) begin
          if (!o_b) begin
            dload    = 1'b1;
            dsel_srl = 1'b1;
            act      = ACT_PRODUCE;
            if (zero) state_n = SRLD_ONE;
            else      addr_n  = addr - 1'b1;
          end
        end else if (i_v && o_b) begin
          shift_en = 1'b1;
          addr_n   = addr + 1'b1;
          act      = ACT_CONSUME;
        end else if (i_v && !o_b) begin
          shift_en = 1'b1;
          dload    = 1'b1;
          dsel_srl = 1'b1;
          act      = ACT_CONSPROD;
        end else if (!i_v && !o_b) begin
          dload    = 1'b1;
          dsel_srl = 1'b1;
          act      = ACT_PRODUCE;
          if (zero) state_n = SRLD_ONE;
          else      addr_n  = addr - 1'b1;
        end
      end
      default: state_n = SRLD_EMPTY;
    endcase
  end

endmodule
