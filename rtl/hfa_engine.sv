// Fast-path automaton: a counting history-based finite automaton (H-cFA).
//
// The engine keeps one current state plus a small history buffer of flags
// and counters. Each clock with byte_valid it fetches every transition for
// (state, byte) from the transition memory, selects the eligible one with
// the strongest condition, moves to its next state and applies its flag
// actions; so it makes exactly one state traversal per input byte, like a
// DFA, while the history lets it follow closures and length restrictions
// without the DFA's state explosion. If no transition is eligible the engine
// goes to state 0, keeps its history and raises miss for that byte.
//
// Each state also has an entry in a trigger table: a bit per signature whose
// prefix the state completes, and the slow-path DFA state in which that
// signature's slow automaton must start. trig/slow_start describe the
// current state, i.e. the state after the last consumed byte (registered).
//
// Per-flow context {counters, flags, state} (state in the low bits) is
// loaded with ctx_ld before the first byte of a packet and read from ctx_out
// after the last one. The host loads the transition memory (tm_*), the
// trigger table (si_*) and the length restrictions (len_*). Reset puts the
// engine in state 0 with an empty history.
module hfa_engine
  import hfa_pkg::*;
#(
  parameter int unsigned STATE_W  = DEF_STATE_W,
  parameter int unsigned FLAGS    = DEF_FLAGS,
  parameter int unsigned NUM_CTR  = DEF_NUM_CTR,
  parameter int unsigned CTR_W    = DEF_CTR_W,
  parameter int unsigned SLOTS    = DEF_SLOTS,
  parameter int unsigned NUM_SIG  = DEF_NUM_SIG,
  parameter int unsigned SSTATE_W = DEF_SSTATE_W,
  localparam int unsigned ENTRY_W = entry_w(STATE_W, FLAGS),
  localparam int unsigned WORD_W  = SLOTS * ENTRY_W,
  localparam int unsigned CTX_W   = STATE_W + FLAGS + NUM_CTR * CTR_W,
  localparam int unsigned IDX_W   = (NUM_CTR > 1) ? $clog2(NUM_CTR) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // per-flow context
  input  logic                        ctx_ld,
  input  logic [CTX_W-1:0]            ctx_in,
  output logic [CTX_W-1:0]            ctx_out,
  // payload
  input  logic                        byte_valid,
  input  logic [7:0]                  byte_in,
  output logic [NUM_SIG-1:0]          trig,
  output logic [NUM_SIG*SSTATE_W-1:0] slow_start,
  output logic                        miss,
  // host programming
  input  logic                        tm_we,
  input  logic [STATE_W-1:0]          tm_state,
  input  logic [7:0]                  tm_char,
  input  logic [WORD_W-1:0]           tm_word,
  input  logic                        si_we,
  input  logic [STATE_W-1:0]          si_state,
  input  logic [NUM_SIG-1:0]          si_trig,
  input  logic [NUM_SIG*SSTATE_W-1:0] si_start,
  input  logic                        len_we,
  input  logic [IDX_W-1:0]            len_idx,
  input  logic [CTR_W-1:0]            len_val
);

  logic [STATE_W-1:0]       state;
  logic [WORD_W-1:0]        word;
  logic                     hit;
  logic [STATE_W-1:0]       next_state;
  logic [FLAGS-1:0]         set_mask, clr_mask;
  logic [FLAGS-1:0]         flags, ok_eq, ok_gt;
  logic [NUM_CTR*CTR_W-1:0] ctrs;

  hfa_trans_mem #(.STATE_W(STATE_W), .FLAGS(FLAGS), .SLOTS(SLOTS)) u_mem (
    .clk, .rd_state(state), .rd_char(byte_in), .rd_word(word),
    .wr_en(tm_we), .wr_state(tm_state), .wr_char(tm_char), .wr_word(tm_word)
  );

  hfa_select #(.STATE_W(STATE_W), .FLAGS(FLAGS), .SLOTS(SLOTS)) u_sel (
    .word, .flags, .ok_eq, .ok_gt, .hit, .next_state, .set_mask, .clr_mask
  );

  hfa_history #(.FLAGS(FLAGS), .NUM_CTR(NUM_CTR), .CTR_W(CTR_W)) u_hist (
    .clk, .rst_n,
    .ld(ctx_ld), .ld_flags(ctx_in[STATE_W +: FLAGS]),
    .ld_ctrs(ctx_in[STATE_W + FLAGS +: NUM_CTR * CTR_W]),
    .step(byte_valid && !ctx_ld), .set_mask, .clr_mask,
    .len_we, .len_idx, .len_val,
    .flags, .ctrs, .ok_eq, .ok_gt
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
      miss  <= 1'b0;
    end else if (ctx_ld) begin
      state <= ctx_in[STATE_W-1:0];
      miss  <= 1'b0;
    end else if (byte_valid) begin
      state <= next_state;  // 0 when nothing is eligible
      miss  <= !hit;
    end
  end

  // Trigger table: which signatures' prefixes the state completes, and the
  // slow-path start state for each.
  logic [NUM_SIG-1:0]          trig_mem  [1 << STATE_W];
  logic [NUM_SIG*SSTATE_W-1:0] start_mem [1 << STATE_W];

  always_ff @(posedge clk) begin
    if (si_we) begin
      trig_mem[si_state]  <= si_trig;
      start_mem[si_state] <= si_start;
    end
  end

  assign trig       = trig_mem[state];
  assign slow_start = start_mem[state];
  assign ctx_out    = {ctrs, flags, state};

endmodule
