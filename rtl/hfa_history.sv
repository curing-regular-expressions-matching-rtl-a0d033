// History buffer of the counting history-based automaton (H-cFA).
//
// FLAGS one-bit flags record that the parse has reached a closure. Flag i
// for i < NUM_CTR also owns a CTR_W-bit down-counter that implements a length
// restriction: when a transition sets the flag, the counter is loaded with
// the programmed length; when a transition resets the flag, the counter is
// cleared; on every other character a positive counter is decremented. The
// character that loads a counter does not decrement it, so after "b" loads 4
// in the example [^a]{4}, exactly four more characters bring it to zero.
// A flag that one transition both sets and resets ends up set.
//
// Timing: step applies the actions of the transition taken this cycle; the
// new history is visible the next cycle. ld overwrites the history with a
// flow's saved context (takes priority over step). ok_eq/ok_gt give, per
// flag, "counter is zero" / "counter is above zero"; both are 1 for flags
// without a counter. Length values are written by a host through len_*.
module hfa_history
  import hfa_pkg::*;
#(
  parameter int unsigned FLAGS   = DEF_FLAGS,
  parameter int unsigned NUM_CTR = DEF_NUM_CTR,
  parameter int unsigned CTR_W   = DEF_CTR_W,
  localparam int unsigned IDX_W  = (NUM_CTR > 1) ? $clog2(NUM_CTR) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ld,
  input  logic [FLAGS-1:0]         ld_flags,
  input  logic [NUM_CTR*CTR_W-1:0] ld_ctrs,
  input  logic                     step,
  input  logic [FLAGS-1:0]         set_mask,
  input  logic [FLAGS-1:0]         clr_mask,
  input  logic                     len_we,
  input  logic [IDX_W-1:0]         len_idx,
  input  logic [CTR_W-1:0]         len_val,
  output logic [FLAGS-1:0]         flags,
  output logic [NUM_CTR*CTR_W-1:0] ctrs,
  output logic [FLAGS-1:0]         ok_eq,
  output logic [FLAGS-1:0]         ok_gt
);

  logic [CTR_W-1:0] ctr [NUM_CTR];
  logic [CTR_W-1:0] len [NUM_CTR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags <= '0;
      for (int i = 0; i < NUM_CTR; i++) begin
        ctr[i] <= '0;
        len[i] <= '0;
      end
    end else begin
      if (len_we) len[len_idx] <= len_val;
      if (ld) begin
        flags <= ld_flags;
        for (int i = 0; i < NUM_CTR; i++) ctr[i] <= ld_ctrs[i*CTR_W +: CTR_W];
      end else if (step) begin
        flags <= (flags & ~clr_mask) | set_mask;
        for (int i = 0; i < NUM_CTR; i++) begin
          if (set_mask[i])      ctr[i] <= len[i];
          else if (clr_mask[i]) ctr[i] <= '0;
          else if (ctr[i] != 0) ctr[i] <= ctr[i] - 1'b1;
        end
      end
    end
  end

  always_comb begin
    ok_eq = '1;
    ok_gt = '1;
    for (int i = 0; i < NUM_CTR; i++) begin
      ctrs[i*CTR_W +: CTR_W] = ctr[i];
      ok_eq[i] = (ctr[i] == 0);
      ok_gt[i] = (ctr[i] != 0);
    end
  end

endmodule
