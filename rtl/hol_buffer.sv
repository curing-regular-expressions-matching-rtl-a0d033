// Head-of-line (HoL) buffer of the dispatcher.
//
// While a packet of a flow is being handled by the slow path, later packets
// of that flow must not pass through the fast path, or a signature spread
// over several packets could slip through. Such packets are parked here so
// that packets of other flows keep moving. Entries (a descriptor plus its
// flow id) are kept in arrival order, each with a blocked bit. pop_valid /
// pop_data offer the oldest unblocked entry; since all entries of one flow
// share the flow's blocked state, packets of a flow leave in order. pop
// removes it and the younger entries close the gap.
//
// blk_set / blk_clr with blk_flow mark every entry of a flow blocked or
// unblocked (the flow was diverted / its slow-path work finished); such an
// event also overrides push_blocked of an entry pushed in the same cycle.
// has_flow tells whether any entry belongs to lookup_flow, so that a new packet of
// such a flow queues behind them. push appends (ignored when full); a pop
// and a push may share a cycle. Depth is a choice of this design.
module hol_buffer #(
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned FLOW_W = 20,
  parameter int unsigned W      = 36
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push,
  input  logic [W-1:0]      push_data,
  input  logic [FLOW_W-1:0] push_flow,
  input  logic              push_blocked,
  output logic              full,
  input  logic [FLOW_W-1:0] lookup_flow,
  output logic              has_flow,
  output logic              pop_valid,
  output logic [W-1:0]      pop_data,
  input  logic              pop,
  input  logic              blk_set,
  input  logic              blk_clr,
  input  logic [FLOW_W-1:0] blk_flow
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0]      data    [DEPTH];
  logic [FLOW_W-1:0] flow    [DEPTH];
  logic [DEPTH-1:0]  blocked;
  logic [CW-1:0]     count;
  int unsigned       pick;

  assign full = (count == CW'(DEPTH));

  always_comb begin
    pop_valid = 1'b0;
    pick      = 0;
    has_flow  = 1'b0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (CW'(i) < count) begin
        if (!blocked[i]) begin
          pop_valid = 1'b1;
          pick      = i;
        end
        if (flow[i] == lookup_flow) has_flow = 1'b1;
      end
    end
    pop_data = data[pick];
  end

  // next contents
  logic [W-1:0]      nd [DEPTH];
  logic [FLOW_W-1:0] nf [DEPTH];
  logic [DEPTH-1:0]  nb;
  logic [CW-1:0]     nc;
  logic              do_pop;

  always_comb begin
    do_pop = pop && pop_valid;
    nc = count;
    nb = blocked;
    for (int i = 0; i < DEPTH; i++) begin
      nd[i] = data[i];
      nf[i] = flow[i];
    end
    // remove the popped entry, shifting younger ones down
    if (do_pop) begin
      for (int i = 0; i < DEPTH - 1; i++) begin
        if (i >= int'(pick)) begin
          nd[i] = nd[i+1];
          nf[i] = nf[i+1];
          nb[i] = nb[i+1];
        end
      end
      nc = nc - 1'b1;
    end
    if (push && !full) begin
      nd[int'(nc)] = push_data;
      nf[int'(nc)] = push_flow;
      nb[int'(nc)] = push_blocked;
      nc = nc + 1'b1;
    end
    // flow status updates apply to all entries, including one pushed now
    for (int i = 0; i < DEPTH; i++) begin
      if (blk_set && nf[i] == blk_flow) nb[i] = 1'b1;
      if (blk_clr && nf[i] == blk_flow) nb[i] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      blocked <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        data[i] <= '0;
        flow[i] <= '0;
      end
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        data[i] <= nd[i];
        flow[i] <= nf[i];
      end
      blocked <= nb;
      count   <= nc;
    end
  end

endmodule
