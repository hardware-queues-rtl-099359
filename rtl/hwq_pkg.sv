// hwq_pkg: state encodings shared by the queue controllers.
//
// The plain shift-register queue needs one state bit (empty / non-empty);
// the queues with a data output register (SRL+D and its pre-computed
// variants) need three states: Empty, One (only the output register holds
// a word) and More (the output register and the shift register hold words).
// The encodings themselves are this design's choice.
package hwq_pkg;

  typedef enum logic {
    SRL_EMPTY    = 1'b0,
    SRL_NONEMPTY = 1'b1
  } srl_state_e;

  typedef enum logic [1:0] {
    SRLD_EMPTY = 2'd0,
    SRLD_ONE   = 2'd1,
    SRLD_MORE  = 2'd2
  } srld_state_e;

  // Action the controller takes in one cycle.
  typedef enum logic [1:0] {
    ACT_IDLE     = 2'd0,
    ACT_CONSUME  = 2'd1,
    ACT_PRODUCE  = 2'd2,
    ACT_CONSPROD = 2'd3
  } q_action_e;

endpackage
