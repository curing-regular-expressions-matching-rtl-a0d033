// Slow path: one small DFA per signature, run packet by packet.
//
// The fast path only recognises signature prefixes. When a prefix of
// signature s matches, the packet is handed to the slow path, which parses
// it with s's own DFA for the entire signature (not just the suffix), so
// further prefix matches of s later in the packet are followed here and the
// fast path needs to trigger s at most once per packet. Each request names
// the flow, the packet's buffer slot and length, and for every requested
// signature the byte offset and DFA state to start from: just after the
// trigger with the start state the fast path supplies, or from offset 0 with
// the state saved when the flow's previous packet left the signature awake.
//
// Signatures of a request are handled in increasing order, one byte per
// clock, so a request takes about (len - offset + 2) cycles per requested
// signature: the slow path is meant to be slower than the fast path and is
// sized for the small share of packets that reach it. Entering an accepting state marks the signature matched. At the
// end of the packet the final state and its live bit (the state still holds
// part of the signature, so the automaton must stay awake for the flow's
// next packet) are written to the sleep status (ss_*). done pulses for one
// cycle with the flow, slot and match mask. req_ready pulses when a request
// is taken. The next-state, accept and live tables are loaded by the host
// (tw_*, ta_*); there is no reset of the tables.
module slow_path_dfa
  import hfa_pkg::*;
#(
  parameter int unsigned NUM_SIG   = DEF_NUM_SIG,
  parameter int unsigned SSTATE_W  = DEF_SSTATE_W,
  parameter int unsigned FLOWS     = DEF_FLOWS,
  parameter int unsigned PKT_SLOTS = DEF_PKT_SLOTS,
  parameter int unsigned MAX_LEN   = DEF_MAX_LEN,
  localparam int unsigned AW  = $clog2(FLOWS),
  localparam int unsigned PSW = (PKT_SLOTS > 1) ? $clog2(PKT_SLOTS) : 1,
  localparam int unsigned IW  = (MAX_LEN > 1) ? $clog2(MAX_LEN) : 1,
  localparam int unsigned LW  = $clog2(MAX_LEN + 1),
  localparam int unsigned SW  = (NUM_SIG > 1) ? $clog2(NUM_SIG) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // request
  input  logic                        req_valid,
  output logic                        req_ready,
  input  logic [AW-1:0]               req_flow,
  input  logic [PSW-1:0]              req_slot,
  input  logic [LW-1:0]               req_len,
  input  logic [NUM_SIG-1:0]          req_mask,
  input  logic [NUM_SIG*SSTATE_W-1:0] req_start,
  input  logic [NUM_SIG*LW-1:0]       req_off,
  // packet buffer read port
  output logic [PSW-1:0]              pb_slot,
  output logic [IW-1:0]               pb_idx,
  input  logic [7:0]                  pb_byte,
  // sleep status write
  output logic                        ss_we,
  output logic [AW-1:0]               ss_flow,
  output logic [SW-1:0]               ss_sig,
  output logic                        ss_active,
  output logic [SSTATE_W-1:0]         ss_state,
  // completion
  output logic                        done,
  output logic [AW-1:0]               done_flow,
  output logic [PSW-1:0]              done_slot,
  output logic [NUM_SIG-1:0]          done_match,
  output logic                        busy,
  // host programming
  input  logic                        tw_en,
  input  logic [SW-1:0]               tw_sig,
  input  logic [SSTATE_W-1:0]         tw_state,
  input  logic [7:0]                  tw_char,
  input  logic [SSTATE_W-1:0]         tw_next,
  input  logic                        ta_en,
  input  logic [SW-1:0]               ta_sig,
  input  logic [SSTATE_W-1:0]         ta_state,
  input  logic                        ta_acc,
  input  logic                        ta_live
);

  localparam int unsigned NS = 1 << SSTATE_W;

  logic [SSTATE_W-1:0] nxt_mem [NUM_SIG * NS * 256];
  logic                acc_mem [NUM_SIG * NS];
  logic                live_mem[NUM_SIG * NS];

  always_ff @(posedge clk) begin
    if (tw_en) nxt_mem[(int'(tw_sig) * NS + int'(tw_state)) * 256 + int'(tw_char)] <= tw_next;
    if (ta_en) begin
      acc_mem[int'(ta_sig) * NS + int'(ta_state)]  <= ta_acc;
      live_mem[int'(ta_sig) * NS + int'(ta_state)] <= ta_live;
    end
  end

  slow_state_e                st;
  logic [AW-1:0]              flow;
  logic [PSW-1:0]             slot;
  logic [LW-1:0]              len;
  logic [NUM_SIG-1:0]         mask;
  logic [NUM_SIG*SSTATE_W-1:0] starts;
  logic [NUM_SIG*LW-1:0]      offs;
  logic [SW-1:0]              sig;
  logic [SSTATE_W-1:0]        cur;
  logic [LW-1:0]              idx;
  logic [NUM_SIG-1:0]         match;

  logic [SSTATE_W-1:0] nxt;
  assign nxt = nxt_mem[(int'(sig) * NS + int'(cur)) * 256 + int'(pb_byte)];

  // next requested signature at or above sig
  logic          found;
  logic [SW-1:0] first;
  always_comb begin
    found = 1'b0;
    first = '0;
    for (int i = NUM_SIG - 1; i >= 0; i--) begin
      if (mask[i] && (i >= int'(sig))) begin
        found = 1'b1;
        first = SW'(i);
      end
    end
  end

  assign req_ready  = (st == S_IDLE) && req_valid;
  assign pb_slot    = slot;
  assign pb_idx     = IW'(idx);
  assign busy       = (st != S_IDLE);
  assign done       = (st == S_DONE);
  assign done_flow  = flow;
  assign done_slot  = slot;
  assign done_match = match;

  assign ss_we     = (st == S_RUN) && (idx >= len);
  assign ss_flow   = flow;
  assign ss_sig    = sig;
  assign ss_state  = cur;
  assign ss_active = live_mem[int'(sig) * NS + int'(cur)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      flow   <= '0;
      slot   <= '0;
      len    <= '0;
      mask   <= '0;
      starts <= '0;
      offs   <= '0;
      sig    <= '0;
      cur    <= '0;
      idx    <= '0;
      match  <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (req_valid) begin
          flow   <= req_flow;
          slot   <= req_slot;
          len    <= req_len;
          mask   <= req_mask;
          starts <= req_start;
          offs   <= req_off;
          sig    <= '0;
          match  <= '0;
          st     <= S_SIG;
        end
        S_SIG: if (found) begin
          sig <= first;
          cur <= starts[int'(first)*SSTATE_W +: SSTATE_W];
          idx <= offs[int'(first)*LW +: LW];
          st  <= S_RUN;
        end else begin
          st <= S_DONE;
        end
        S_RUN: if (idx < len) begin
          cur <= nxt;
          idx <= idx + 1'b1;
          if (acc_mem[int'(sig) * NS + int'(nxt)]) match[sig] <= 1'b1;
        end else begin
          // signature finished; look for the next one above it
          if (int'(sig) == NUM_SIG - 1) st <= S_DONE;
          else begin
            sig <= sig + 1'b1;
            st  <= S_SIG;
          end
        end
        S_DONE: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
