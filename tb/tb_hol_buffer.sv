// Self-checking test of the HoL buffer against a reference list: random
// pushes (with a blocked bit), pops, and flow blocked/unblocked events over
// a few flows. The offered entry must be the oldest unblocked one, entries
// of one flow must leave in arrival order, has_flow must match the list and
// a push into a full buffer is ignored.
module tb_hol_buffer;
  localparam int unsigned DEPTH = 8, FLOW_W = 4, W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, push_blocked = 0, full, has_flow, pop_valid, pop = 0, blk_set = 0, blk_clr = 0;
  logic [W-1:0] push_data = 0, pop_data;
  logic [FLOW_W-1:0] push_flow = 0, lookup_flow = 0, blk_flow = 0;

  hol_buffer #(.DEPTH(DEPTH), .FLOW_W(FLOW_W), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [W-1:0] d; logic [FLOW_W-1:0] f; bit b; } ent_t;
  ent_t l [$];
  int unsigned seq = 0;
  int unsigned last_seq [16];
  bit          fb [16];       // flow blocked state, shared by its entries

  initial begin
    for (int i = 0; i < 16; i++) begin last_seq[i] = 0; fb[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int pick;
      bit room;
      @(negedge clk);
      push = 1'($urandom);
      push_flow = FLOW_W'($urandom_range(5));
      push_blocked = fb[push_flow];
      seq++;
      push_data = W'(seq);
      pop = 1'($urandom);
      blk_set = ($urandom_range(5) == 0);
      blk_clr = !blk_set && ($urandom_range(3) == 0);
      blk_flow = FLOW_W'($urandom_range(5));
      lookup_flow = FLOW_W'($urandom_range(5));
      #1;
      pick = -1;
      for (int i = l.size() - 1; i >= 0; i--) if (!l[i].b) pick = i;
      checks++;
      if (pop_valid != (pick >= 0) || (pick >= 0 && pop_data != l[pick].d)) begin
        failures++; $display("pop mismatch n=%0d", n);
      end
      checks++;
      begin
        bit h;
        h = 0;
        foreach (l[i]) if (l[i].f == lookup_flow) h = 1;
        if (has_flow != h || full != (l.size() == DEPTH)) begin failures++; $display("lookup/full mismatch"); end
      end
      @(posedge clk);
      room = l.size() < DEPTH;
      if (pop && pick >= 0) begin
        // per-flow order
        checks++;
        if (l[pick].d <= W'(last_seq[l[pick].f]) && last_seq[l[pick].f] != 0) begin failures++; $display("order"); end
        last_seq[l[pick].f] = l[pick].d;
        l.delete(pick);
      end
      if (push && room) begin
        // entries of a flow share the flow's state
        l.push_back('{push_data, push_flow, push_blocked});
      end
      if (blk_set) fb[blk_flow] = 1;
      if (blk_clr) fb[blk_flow] = 0;
      foreach (l[i]) begin
        if (blk_set && l[i].f == blk_flow) l[i].b = 1;
        if (blk_clr && l[i].f == blk_flow) l[i].b = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
