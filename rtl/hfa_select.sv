// Transition selection of the history-based automaton.
//
// Receives all transitions fetched for the current (state, character) and
// picks the one to take. A slot is eligible when it is valid and every flag
// named in its condition is set in the history; for history counters the
// flag's counter must also be zero (exact length restriction) or, when the
// slot's gt bit is set, above zero ("less than" restriction). Among eligible
// slots the one whose condition names the most flags wins; an unconditional
// slot (empty condition) is always eligible and so acts as the fallback.
// Well-formed automata never tie; if they do, the lowest slot wins.
//
// Purely combinational: per slot an AND-reduction for the condition and a
// population count, then a linear maximum search. ok_eq/ok_gt come from the
// history block and are 1 for flags that have no counter.
module hfa_select
  import hfa_pkg::*;
#(
  parameter int unsigned STATE_W = DEF_STATE_W,
  parameter int unsigned FLAGS   = DEF_FLAGS,
  parameter int unsigned SLOTS   = DEF_SLOTS,
  localparam int unsigned ENTRY_W = entry_w(STATE_W, FLAGS),
  localparam int unsigned CNT_W   = $clog2(FLAGS + 1),
  localparam int unsigned SIW     = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic [SLOTS*ENTRY_W-1:0] word,
  input  logic [FLAGS-1:0]         flags,
  input  logic [FLAGS-1:0]         ok_eq,
  input  logic [FLAGS-1:0]         ok_gt,
  output logic                     hit,
  output logic [STATE_W-1:0]       next_state,
  output logic [FLAGS-1:0]         set_mask,
  output logic [FLAGS-1:0]         clr_mask
);

  typedef struct packed {
    logic               valid;
    logic               gt;
    logic [FLAGS-1:0]   set;
    logic [FLAGS-1:0]   clr;
    logic [FLAGS-1:0]   cond;
    logic [STATE_W-1:0] next;
  } entry_t;

  entry_t           e     [SLOTS];
  logic [SLOTS-1:0] elig;
  logic [CNT_W-1:0] weight[SLOTS];

  always_comb begin
    for (int s = 0; s < SLOTS; s++) begin
      e[s] = entry_t'(word[s*ENTRY_W +: ENTRY_W]);
      elig[s] = e[s].valid
              && ((e[s].cond & ~flags) == '0)
              && ((e[s].cond & ~(e[s].gt ? ok_gt : ok_eq)) == '0);
      weight[s] = '0;
      for (int f = 0; f < FLAGS; f++) weight[s] += CNT_W'(e[s].cond[f]);
    end
  end

  always_comb begin
    logic [CNT_W-1:0] best_w;
    logic [SIW-1:0]   best;
    hit    = 1'b0;
    best_w = '0;
    best   = 0;
    for (int s = 0; s < SLOTS; s++) begin
      if (elig[s] && (!hit || weight[s] > best_w)) begin
        hit    = 1'b1;
        best_w = weight[s];
        best   = SIW'(s);
      end
    end
    next_state = hit ? e[best].next : '0;
    set_mask   = hit ? e[best].set  : '0;
    clr_mask   = hit ? e[best].clr  : '0;
  end

endmodule
