// Slow-path request queues, one per anomaly class.
//
// Requests for the slow path are sorted by the anomaly class of their flow
// into NUM_Q FIFOs of DEPTH entries. The slow path always serves the
// non-empty queue with the lowest class first, so a well-behaved flow that
// happens to divert a packet overtakes the traffic of anomalous flows. A
// request whose queue is full is not stored; enq_drop reports this in the
// same cycle, and the caller treats the packet as discarded.
//
// Interface: enq/enq_q/enq_data push; deq_valid/deq_data show the head of the
// queue that will be served; deq pops it. A push and a pop may happen in the
// same cycle. Strict priority and dropping on overflow are this design's
// reading of the protection scheme; depth and queue count are choices.
module slow_path_queues
  import hfa_pkg::*;
#(
  parameter int unsigned NUM_Q = DEF_NUM_Q,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned W     = 64,
  localparam int unsigned QW   = (NUM_Q > 1) ? $clog2(NUM_Q) : 1,
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enq,
  input  logic [QW-1:0] enq_q,
  input  logic [W-1:0]  enq_data,
  output logic          enq_drop,
  input  logic          deq,
  output logic          deq_valid,
  output logic [W-1:0]  deq_data
);

  logic [W-1:0]  mem  [NUM_Q][DEPTH];
  logic [PW-1:0] rd   [NUM_Q];
  logic [PW-1:0] wr   [NUM_Q];
  logic [PW:0]   cnt  [NUM_Q];
  logic [QW-1:0] sel;

  always_comb begin
    deq_valid = 1'b0;
    sel       = '0;
    for (int q = NUM_Q - 1; q >= 0; q--) begin
      if (cnt[q] != 0) begin
        deq_valid = 1'b1;
        sel       = QW'(q);
      end
    end
    deq_data = mem[sel][rd[sel]];
    enq_drop = enq && (cnt[enq_q] == (PW+1)'(DEPTH));
  end

  logic [NUM_Q-1:0] push, pop;
  always_comb begin
    for (int q = 0; q < NUM_Q; q++) begin
      push[q] = enq && !enq_drop && (enq_q == QW'(q));
      pop[q]  = deq && deq_valid && (sel == QW'(q));
    end
  end

  always_ff @(posedge clk) begin
    for (int q = 0; q < NUM_Q; q++)
      if (push[q]) mem[q][wr[q]] <= enq_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < NUM_Q; q++) begin
        rd[q]  <= '0;
        wr[q]  <= '0;
        cnt[q] <= '0;
      end
    end else begin
      for (int q = 0; q < NUM_Q; q++) begin
        if (push[q]) wr[q] <= (wr[q] == PW'(DEPTH - 1)) ? '0 : wr[q] + 1'b1;
        if (pop[q]) rd[q] <= (rd[q] == PW'(DEPTH - 1)) ? '0 : rd[q] + 1'b1;
        cnt[q] <= cnt[q] + (PW+1)'(push[q]) - (PW+1)'(pop[q]);
      end
    end
  end

endmodule
