// Per-flow parse state of the fast path.
//
// Packets of many flows arrive interleaved, so the fast path saves its
// context (automaton state and history buffer) when a packet ends and loads
// the flow's context when its next packet begins. This block is that store:
// FLOWS words of W bits, one combinational read port and one write port.
// The default holds about a million flows; the context width is set by the
// engine (state + flags + counters). There is no reset; the top level
// clears every word after reset.
module flow_state_mem
  import hfa_pkg::*;
#(
  parameter int unsigned FLOWS = DEF_FLOWS,
  parameter int unsigned W     = DEF_STATE_W + DEF_FLAGS + DEF_NUM_CTR * DEF_CTR_W,
  localparam int unsigned AW   = $clog2(FLOWS)
) (
  input  logic          clk,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data
);

  logic [W-1:0] mem [FLOWS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];

endmodule
