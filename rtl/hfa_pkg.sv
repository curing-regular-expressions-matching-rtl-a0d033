// Shared constants of the bifurcated H-cFA pattern matcher.
//
// The default sizes follow the published design point where one is given
// (16K automaton states, a 16-flag history buffer, up to 8 conditional
// transitions per state and character, up to 6 history counters, an 8-bit
// anomaly counter with eps = 0.01, about a million flows). The others
// (counter width, slow-path DFA size, queue and buffer depths) are choices
// of this implementation.
//
// A conditional transition is packed LSB first as
//   next[STATE_W] | cond[FLAGS] | clr[FLAGS] | set[FLAGS] | gt | valid
// cond : flags that must be set for the transition to be eligible
// clr  : flags the transition resets (action "-s")
// set  : flags the transition sets   (action "+s")
// gt   : counter test for the flags in cond: 0 = counter must be zero
//        (exact length restriction), 1 = counter must be above zero
// valid: slot holds a transition
package hfa_pkg;

  localparam int unsigned DEF_STATE_W = 14;      // 16K states
  localparam int unsigned DEF_FLAGS   = 16;      // history flags
  localparam int unsigned DEF_NUM_CTR = 6;       // history counters
  localparam int unsigned DEF_CTR_W   = 16;      // counter width
  localparam int unsigned DEF_SLOTS   = 8;       // transitions per (state, char)
  localparam int unsigned DEF_NUM_SIG = 3;       // signatures in the slow path
  localparam int unsigned DEF_SSTATE_W = 3;      // slow-path DFA state bits
  localparam int unsigned DEF_FLOWS   = 1 << 20; // flows
  localparam int unsigned DEF_ANOM_K  = 8;       // anomaly counter bits
  localparam int unsigned DEF_INV_EPS = 100;     // 1/eps
  localparam int unsigned DEF_NUM_Q   = 4;       // slow-path queues
  localparam int unsigned DEF_PKT_SLOTS = 16;    // packets in flight
  localparam int unsigned DEF_MAX_LEN = 256;     // bytes per packet

  // Width of one packed conditional transition.
  function automatic int unsigned entry_w(int unsigned state_w, int unsigned flags);
    return state_w + 3 * flags + 2;
  endfunction

  // Dispatcher of the top level.
  typedef enum logic [2:0] {
    D_INIT,     // clearing per-flow memories after reset
    D_IDLE,     // choosing the next packet
    D_LOAD,     // loading the flow context into the fast path
    D_RUN,      // feeding payload bytes to the fast path
    D_LAST,     // looking at the trigger of the last byte
    D_FINISH    // storing context, queueing slow-path work, verdict
  } disp_state_e;

  // Slow-path sequencer.
  typedef enum logic [1:0] {
    S_IDLE,     // waiting for a request
    S_SIG,      // choosing the next signature of the request
    S_RUN,      // parsing bytes with one signature DFA
    S_DONE      // reporting the verdict
  } slow_state_e;

endpackage
