// Per-flow anomaly counters for slow-path overload protection.
//
// Every flow has a K-bit counter that works as a moving average of how
// often its packets match a prefix in the fast path. When a packet of the
// flow finishes in the fast path (upd), the counter is raised by INV_EPS
// (1/eps) if the packet matched a prefix and lowered by 1 otherwise,
// saturating at 0 and 2^K-1. A well-behaved flow, diverting fewer than eps
// of its packets, therefore drifts towards zero, while a flow that diverts
// more climbs to the ceiling. The full-scale value stands for an anomaly
// index of eps; anomalous is raised when an update hits the ceiling.
//
// index/qclass/anomalous are combinational and show the value the counter
// takes with this update (flow, matched), so the caller can pick the
// slow-path queue in the same cycle; the counter is written at the clock
// edge when upd is high. qclass is the top bits of the index: a low class
// means a well-behaved flow. clr_en writes zero (used by the after-reset
// sweep of the top level).
module anomaly_counter
  import hfa_pkg::*;
#(
  parameter int unsigned FLOWS   = DEF_FLOWS,
  parameter int unsigned K       = DEF_ANOM_K,
  parameter int unsigned INV_EPS = DEF_INV_EPS,
  parameter int unsigned NUM_Q   = DEF_NUM_Q,
  localparam int unsigned AW     = $clog2(FLOWS),
  localparam int unsigned QW     = (NUM_Q > 1) ? $clog2(NUM_Q) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] flow,
  input  logic          upd,
  input  logic          matched,
  output logic [K-1:0]  index,
  output logic [QW-1:0] qclass,
  output logic          anomalous,
  input  logic          clr_en,
  input  logic [AW-1:0] clr_addr
);

  localparam logic [K:0] CEIL = {1'b0, {K{1'b1}}};

  logic [K-1:0] mem [FLOWS];
  logic [K-1:0] cur;
  logic [K:0]   sum;

  assign cur = mem[flow];

  always_comb begin
    anomalous = 1'b0;
    if (matched) begin
      sum = {1'b0, cur} + (K+1)'(INV_EPS);
      if (sum >= CEIL) begin
        sum       = CEIL;
        anomalous = 1'b1;
      end
    end else begin
      sum = (cur == 0) ? '0 : {1'b0, cur} - 1'b1;
    end
    index  = sum[K-1:0];
    qclass = (NUM_Q > 1) ? QW'(index >> (K - QW)) : '0;
  end

  always_ff @(posedge clk) begin
    if (clr_en)   mem[clr_addr] <= '0;
    else if (upd) mem[flow]     <= index;
  end

endmodule
