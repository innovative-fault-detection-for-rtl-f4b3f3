// aes_fsm: one-hot finite state machine of the AES controller.
//
// States, one flip-flop each: INIT, Load Inputs, Round 0 .. Round 10
// (aes_pkg ST_* bit positions). INIT waits while encrypt = 0 and moves to
// Load Inputs when encrypt = 1; every other state passes its token to the
// next state on each clock; Round 10 returns to INIT.
//
// Each next-state bit is a single AND/OR of the current bits, so the machine
// behaves like real one-hot hardware under faults: a lost token leaves it
// blocked in the all-zero state, an extra token makes two states run at once.
// The controller detects both by comparing two copies of this module.
//
// The states and transitions follow the controller flowchart; the reset
// style is this design's choice.
// sync_reset returns the machine to INIT on the next rising edge.
// fi_state is a fault-injection mask XORed onto the state flip-flop D inputs
// (zero in normal use). Asynchronous active-low reset to INIT.
module aes_fsm
  import aes_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    encrypt,
  input  logic    sync_reset,
  input  onehot_t fi_state,
  output onehot_t state
);

  onehot_t state_q, state_d;

  always_comb begin
    state_d          = '0;
    state_d[ST_INIT] = (state_q[ST_INIT] & ~encrypt) | state_q[ST_R0+NR];
    state_d[ST_LOAD] = state_q[ST_INIT] & encrypt;
    state_d[ST_R0]   = state_q[ST_LOAD];
    for (int k = 1; k <= NR; k++) state_d[ST_R0+k] = state_q[ST_R0+k-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          state_q <= INIT_STATE;
    else if (sync_reset) state_q <= INIT_STATE;
    else                 state_q <= state_d ^ fi_state;
  end

  assign state = state_q;

endmodule
