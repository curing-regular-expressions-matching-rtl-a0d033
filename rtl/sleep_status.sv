// Slow-path sleep status.
//
// For every flow and every signature this block remembers whether the
// signature's slow-path automaton is awake, i.e. whether the previous packet
// of the flow left it in a state that still holds part of the signature's
// suffix, and in which slow-path DFA state it stopped. The dispatcher reads
// a flow's row when a packet starts (combinational read) and sends the
// packet to the slow path for every awake signature, resuming from the
// saved state. The slow path writes one (flow, signature) entry when it
// finishes a signature. With wr_row set a write clears the flow's whole row
// instead (wr_sig ignored); the top level uses it to sweep all flows after
// reset. Indexing by flow for every flow is a simplification: only a small
// fraction of flows is ever awake in the slow path.
module sleep_status
  import hfa_pkg::*;
#(
  parameter int unsigned FLOWS    = DEF_FLOWS,
  parameter int unsigned NUM_SIG  = DEF_NUM_SIG,
  parameter int unsigned SSTATE_W = DEF_SSTATE_W,
  localparam int unsigned AW      = $clog2(FLOWS),
  localparam int unsigned SW      = (NUM_SIG > 1) ? $clog2(NUM_SIG) : 1
) (
  input  logic                        clk,
  input  logic [AW-1:0]               rd_flow,
  output logic [NUM_SIG-1:0]          rd_active,
  output logic [NUM_SIG*SSTATE_W-1:0] rd_state,
  input  logic                        wr_en,
  input  logic                        wr_row,
  input  logic [AW-1:0]               wr_flow,
  input  logic [SW-1:0]               wr_sig,
  input  logic                        wr_active,
  input  logic [SSTATE_W-1:0]         wr_state
);

  logic [NUM_SIG-1:0]          act_mem [FLOWS];
  logic [NUM_SIG*SSTATE_W-1:0] st_mem  [FLOWS];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      if (wr_row) begin
        act_mem[wr_flow] <= '0;
        st_mem[wr_flow]  <= '0;
      end else begin
        act_mem[wr_flow][wr_sig] <= wr_active;
        st_mem[wr_flow][wr_sig*SSTATE_W +: SSTATE_W] <= wr_state;
      end
    end
  end

  assign rd_active = act_mem[rd_flow];
  assign rd_state  = st_mem[rd_flow];

endmodule
