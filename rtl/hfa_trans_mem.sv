// Transition memory of the history-based automaton.
//
// One wide word per (state, input character) holds every transition that can
// leave that state on that character: up to SLOTS conditional transitions,
// stored side by side so that a single access fetches all of them. The word
// is read combinationally, which lets the engine make one state traversal per
// clock. A host loads the compiled automaton through the write port, one word
// per clock. There is no reset: a slot whose valid bit is clear never fires,
// and the host must write every word the automaton can reach.
//
// The word is stored as SLOTS parallel arrays, one per slot, all addressed
// by {state, char}; this is the same single wide access, kept as separate
// memories so that each stays a manageable size for tools.
//
// The word-per-(state,char) layout and SLOTS = 8 follow the published memory
// organisation; the entry packing (see hfa_pkg) uses separate set and reset
// masks, which makes an entry 64 bits rather than 48.
module hfa_trans_mem
  import hfa_pkg::*;
#(
  parameter int unsigned STATE_W = DEF_STATE_W,
  parameter int unsigned FLAGS   = DEF_FLAGS,
  parameter int unsigned SLOTS   = DEF_SLOTS,
  localparam int unsigned ENTRY_W = entry_w(STATE_W, FLAGS),
  localparam int unsigned WORD_W  = SLOTS * ENTRY_W
) (
  input  logic               clk,
  input  logic [STATE_W-1:0] rd_state,
  input  logic [7:0]         rd_char,
  output logic [WORD_W-1:0]  rd_word,
  input  logic               wr_en,
  input  logic [STATE_W-1:0] wr_state,
  input  logic [7:0]         wr_char,
  input  logic [WORD_W-1:0]  wr_word
);

  localparam int unsigned DEPTH = 1 << (STATE_W + 8);

  // one memory per slot: every slot is written and read at the same address
  for (genvar s = 0; s < SLOTS; s++) begin : g_slot
    logic [ENTRY_W-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (wr_en) mem[{wr_state, wr_char}] <= wr_word[s*ENTRY_W +: ENTRY_W];
    end

    assign rd_word[s*ENTRY_W +: ENTRY_W] = mem[{rd_state, rd_char}];
  end

endmodule
