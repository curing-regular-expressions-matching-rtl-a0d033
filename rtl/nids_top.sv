// Bifurcated, packetized regular-expression matcher for intrusion detection.
//
// Signatures are split offline into short prefixes, which normal traffic
// rarely matches, and the remainder. Every byte of every packet runs through
// the fast path: one counting history-based automaton (H-cFA) for all
// prefixes, making one state traversal per byte with a small per-flow
// context. Only when a prefix matches is the packet handed to the slow
// path, which holds a separate small DFA per signature and sleeps the rest
// of the time.
//
// Data flow:
//  * Ingress: bytes (in_*) with a flow id, sop and eop are written into a
//    packet_buffer slot; at eop a descriptor {flow, slot, len} is queued.
//  * Dispatcher: picks the oldest runnable packet from the HoL buffer, else
//    the next new one. A new packet whose flow has a packet in the slow path
//    (or already waits in the HoL buffer) is parked in the HoL buffer.
//  * Fast path: loads the flow's context, feeds one byte per clock, and after
//    each byte looks at the trigger table of the reached state. The first
//    trigger of each signature in the packet is recorded with its offset and
//    slow-path start state; later triggers of that signature, and triggers of
//    a signature whose slow automaton is still awake for the flow, are
//    masked. At the end the context is stored back.
//  * Protection: the flow's anomaly counter moves (+1/eps on a prefix match,
//    -1 otherwise) and picks one of NUM_Q queues; the slow path serves the
//    least anomalous queue first; a full queue drops the packet.
//  * Slow path: for each requested signature it parses the packet from the
//    trigger offset (or from byte 0 and the saved state for an awake
//    signature), reports matches and records whether the automaton stays
//    awake for the flow's next packet.
//  * Verdict (v_*): one per packet: diverted or not, dropped, match mask.
//    Slow-path verdicts have priority; the fast path waits a cycle if both
//    are ready together.
//
// After reset the design clears all per-flow memories (FLOWS cycles, init_done
// low, in_ready low). The automata are loaded by a host through the tm_*,
// si_*, len_*, tw_* and ta_* ports, which may be written at any time but
// should be stable while traffic flows.
//
// Throughput: the fast path takes len + 4 cycles per packet (load, len bytes,
// last trigger check, finish, plus one idle pick cycle). The split, the
// packetized slow path, anomaly counters with priority queues, the HoL buffer
// and the H-cFA follow the published architecture; the byte-stream ingress,
// the descriptor format, the verdict and the init sweep are this design's.
module nids_top
  import hfa_pkg::*;
#(
  parameter int unsigned STATE_W   = DEF_STATE_W,
  parameter int unsigned FLAGS     = DEF_FLAGS,
  parameter int unsigned NUM_CTR   = DEF_NUM_CTR,
  parameter int unsigned CTR_W     = DEF_CTR_W,
  parameter int unsigned SLOTS     = DEF_SLOTS,
  parameter int unsigned NUM_SIG   = DEF_NUM_SIG,
  parameter int unsigned SSTATE_W  = DEF_SSTATE_W,
  parameter int unsigned FLOWS     = DEF_FLOWS,
  parameter int unsigned K         = DEF_ANOM_K,
  parameter int unsigned INV_EPS   = DEF_INV_EPS,
  parameter int unsigned NUM_Q     = DEF_NUM_Q,
  parameter int unsigned Q_DEPTH   = 8,
  parameter int unsigned HOL_DEPTH = 8,
  parameter int unsigned PKT_SLOTS = DEF_PKT_SLOTS,
  parameter int unsigned MAX_LEN   = DEF_MAX_LEN,
  localparam int unsigned AW      = $clog2(FLOWS),
  localparam int unsigned PSW     = (PKT_SLOTS > 1) ? $clog2(PKT_SLOTS) : 1,
  localparam int unsigned IW      = (MAX_LEN > 1) ? $clog2(MAX_LEN) : 1,
  localparam int unsigned LW      = $clog2(MAX_LEN + 1),
  localparam int unsigned SW      = (NUM_SIG > 1) ? $clog2(NUM_SIG) : 1,
  localparam int unsigned QW      = (NUM_Q > 1) ? $clog2(NUM_Q) : 1,
  localparam int unsigned CIDX_W  = (NUM_CTR > 1) ? $clog2(NUM_CTR) : 1,
  localparam int unsigned ENTRY_W = entry_w(STATE_W, FLAGS),
  localparam int unsigned WORD_W  = SLOTS * ENTRY_W,
  localparam int unsigned CTX_W   = STATE_W + FLAGS + NUM_CTR * CTR_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  output logic                        init_done,
  // packet byte stream
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic                        in_sop,
  input  logic                        in_eop,
  input  logic [AW-1:0]               in_flow,
  input  logic [7:0]                  in_byte,
  // per-packet verdict
  output logic                        v_valid,
  output logic [AW-1:0]               v_flow,
  output logic                        v_diverted,
  output logic                        v_dropped,
  output logic [NUM_SIG-1:0]          v_match,
  // events: fast-path packet finished, with the flow's new anomaly index;
  // a byte found no eligible transition; slow path working
  output logic                        ev_fast_done,
  output logic [K-1:0]                ev_anom_index,
  output logic                        ev_anomalous,
  output logic                        ev_miss,
  output logic                        slow_busy,
  // fast-path automaton programming
  input  logic                        tm_we,
  input  logic [STATE_W-1:0]          tm_state,
  input  logic [7:0]                  tm_char,
  input  logic [WORD_W-1:0]           tm_word,
  input  logic                        si_we,
  input  logic [STATE_W-1:0]          si_state,
  input  logic [NUM_SIG-1:0]          si_trig,
  input  logic [NUM_SIG*SSTATE_W-1:0] si_start,
  input  logic                        len_we,
  input  logic [CIDX_W-1:0]           len_idx,
  input  logic [CTR_W-1:0]            len_val,
  // slow-path automata programming
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

  // ---------------------------------------------------------------- types
  typedef struct packed {
    logic [AW-1:0]  flow;
    logic [PSW-1:0] slot;
    logic [LW-1:0]  len;
  } desc_t;

  typedef struct packed {
    logic [AW-1:0]               flow;
    logic [PSW-1:0]              slot;
    logic [LW-1:0]               len;
    logic [NUM_SIG-1:0]          mask;
    logic [NUM_SIG*SSTATE_W-1:0] start;
    logic [NUM_SIG*LW-1:0]       off;
  } req_t;

  localparam int unsigned DESC_W = $bits(desc_t);
  localparam int unsigned REQ_W  = $bits(req_t);

  // ---------------------------------------------------------------- packet buffer
  logic           pb_alloc_valid, pb_alloc;
  logic [PSW-1:0] pb_alloc_slot;
  logic           pb_free_en;
  logic [PSW-1:0] pb_free_slot;
  logic           pb_wr_en;
  logic [PSW-1:0] pb_wr_slot;
  logic [IW-1:0]  pb_wr_idx;
  logic [PSW-1:0] fp_slot, sp_slot;
  logic [IW-1:0]  fp_idx, sp_idx;
  logic [7:0]     fp_byte, sp_byte;

  packet_buffer #(.PKT_SLOTS(PKT_SLOTS), .MAX_LEN(MAX_LEN)) u_pbuf (
    .clk, .rst_n,
    .alloc_valid(pb_alloc_valid), .alloc_slot(pb_alloc_slot), .alloc(pb_alloc),
    .free_en(pb_free_en), .free_slot(pb_free_slot),
    .wr_en(pb_wr_en), .wr_slot(pb_wr_slot), .wr_idx(pb_wr_idx), .wr_byte(in_byte),
    .ra_slot(fp_slot), .ra_idx(fp_idx), .ra_byte(fp_byte),
    .rb_slot(sp_slot), .rb_idx(sp_idx), .rb_byte(sp_byte)
  );

  // ---------------------------------------------------------------- ingress
  logic           in_pkt;
  logic [PSW-1:0] in_slot;
  logic [LW-1:0]  in_len;
  logic [AW-1:0]  in_cur_flow;
  logic           if_push, if_pop, if_empty, if_full;
  desc_t          if_head, if_new;
  logic           in_fire, in_start;

  assign in_ready = init_done && (in_pkt || (pb_alloc_valid && !if_full));
  assign in_fire  = in_valid && in_ready;
  assign in_start = in_fire && !in_pkt;           // first byte of a packet
  assign pb_alloc = in_start;
  assign pb_wr_en   = in_fire && (in_start || in_len < LW'(MAX_LEN));
  assign pb_wr_slot = in_start ? pb_alloc_slot : in_slot;
  assign pb_wr_idx  = in_start ? '0 : IW'(in_len);
  assign if_push  = in_fire && in_eop;
  assign if_new   = '{flow: in_start ? in_flow : in_cur_flow,
                      slot: in_start ? pb_alloc_slot : in_slot,
                      len:  in_start ? LW'(1)
                                     : ((in_len < LW'(MAX_LEN)) ? in_len + 1'b1 : in_len)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt      <= 1'b0;
      in_slot     <= '0;
      in_len      <= '0;
      in_cur_flow <= '0;
    end else if (in_fire) begin
      if (in_start) begin
        in_slot     <= pb_alloc_slot;
        in_cur_flow <= in_flow;
        in_len      <= LW'(1);
      end else if (in_len < LW'(MAX_LEN)) begin
        in_len <= in_len + 1'b1;      // bytes beyond MAX_LEN are discarded
      end
      in_pkt <= !in_eop;
    end
  end

  logic [DESC_W-1:0] if_head_bits;
  sync_fifo #(.DEPTH(4), .W(DESC_W)) u_ififo (
    .clk, .rst_n, .push(if_push), .push_data(DESC_W'(if_new)), .pop(if_pop),
    .head(if_head_bits), .empty(if_empty), .full(if_full)
  );
  assign if_head = desc_t'(if_head_bits);

  // ---------------------------------------------------------------- per-flow state
  disp_state_e        ds;
  logic [AW-1:0]      sweep;
  desc_t              cur;
  logic [CTX_W-1:0]   ctx_rd, ctx_out;
  logic               ctx_we;
  logic               busy [FLOWS];   // flow has a packet in the slow path

  flow_state_mem #(.FLOWS(FLOWS), .W(CTX_W)) u_ctx (
    .clk, .rd_addr(cur.flow), .rd_data(ctx_rd),
    .wr_en(ctx_we || ds == D_INIT), .wr_addr(ds == D_INIT ? sweep : cur.flow),
    .wr_data(ds == D_INIT ? '0 : ctx_out)
  );

  logic          an_upd, an_matched, an_anom;
  logic [K-1:0]  an_index;
  logic [QW-1:0] an_q;
  anomaly_counter #(.FLOWS(FLOWS), .K(K), .INV_EPS(INV_EPS), .NUM_Q(NUM_Q)) u_anom (
    .clk, .flow(cur.flow), .upd(an_upd), .matched(an_matched),
    .index(an_index), .qclass(an_q), .anomalous(an_anom),
    .clr_en(ds == D_INIT), .clr_addr(sweep)
  );

  logic [NUM_SIG-1:0]          ss_rd_active;
  logic [NUM_SIG*SSTATE_W-1:0] ss_rd_state;
  logic                        sp_ss_we, sp_ss_active;
  logic [AW-1:0]               sp_ss_flow;
  logic [SW-1:0]               sp_ss_sig;
  logic [SSTATE_W-1:0]         sp_ss_state;
  sleep_status #(.FLOWS(FLOWS), .NUM_SIG(NUM_SIG), .SSTATE_W(SSTATE_W)) u_sleep (
    .clk, .rd_flow(cur.flow), .rd_active(ss_rd_active), .rd_state(ss_rd_state),
    .wr_en(sp_ss_we || ds == D_INIT), .wr_row(ds == D_INIT),
    .wr_flow(ds == D_INIT ? sweep : sp_ss_flow), .wr_sig(sp_ss_sig),
    .wr_active(sp_ss_active), .wr_state(sp_ss_state)
  );

  // ---------------------------------------------------------------- HoL buffer
  logic              hol_push, hol_full, hol_has, hol_pop_valid, hol_pop;
  logic [DESC_W-1:0] hol_pop_bits;
  logic              blk_set, blk_clr;
  logic [AW-1:0]     blk_set_flow;
  logic              sp_done;
  logic [AW-1:0]     sp_done_flow;
  logic [PSW-1:0]    sp_done_slot;
  logic [NUM_SIG-1:0] sp_done_match;

  // a set and a clear never name the same flow in one cycle (a busy flow is
  // never dispatched), so the two updates share the HoL port by priority
  hol_buffer #(.DEPTH(HOL_DEPTH), .FLOW_W(AW), .W(DESC_W)) u_hol (
    .clk, .rst_n,
    .push(hol_push), .push_data(DESC_W'(if_head)), .push_flow(if_head.flow),
    .push_blocked(busy[if_head.flow]), .full(hol_full),
    .lookup_flow(if_head.flow), .has_flow(hol_has),
    .pop_valid(hol_pop_valid), .pop_data(hol_pop_bits), .pop(hol_pop),
    .blk_set(blk_set && !blk_clr), .blk_clr(blk_clr),
    .blk_flow(blk_clr ? sp_done_flow : blk_set_flow)
  );

  // ---------------------------------------------------------------- fast path
  logic                        fp_valid;
  logic [NUM_SIG-1:0]          fp_trig;
  logic [NUM_SIG*SSTATE_W-1:0] fp_start;
  logic                        fp_miss;

  hfa_engine #(
    .STATE_W(STATE_W), .FLAGS(FLAGS), .NUM_CTR(NUM_CTR), .CTR_W(CTR_W),
    .SLOTS(SLOTS), .NUM_SIG(NUM_SIG), .SSTATE_W(SSTATE_W)
  ) u_fast (
    .clk, .rst_n,
    .ctx_ld(ds == D_LOAD), .ctx_in(ctx_rd), .ctx_out,
    .byte_valid(fp_valid), .byte_in(fp_byte),
    .trig(fp_trig), .slow_start(fp_start), .miss(fp_miss),
    .tm_we, .tm_state, .tm_char, .tm_word,
    .si_we, .si_state, .si_trig, .si_start,
    .len_we, .len_idx, .len_val
  );

  // ---------------------------------------------------------------- dispatcher
  logic [LW-1:0]               idx;          // next byte to feed
  logic [NUM_SIG-1:0]          act;          // signatures awake for the flow
  logic [NUM_SIG*SSTATE_W-1:0] act_state;
  logic [NUM_SIG-1:0]          newtrig;      // first triggers in this packet
  logic [NUM_SIG*SSTATE_W-1:0] new_start;
  logic [NUM_SIG*LW-1:0]       new_off;
  logic                        matched;      // some prefix matched in the packet
  logic                        check;        // fp_trig belongs to byte idx-1

  logic          q_enq, q_drop, q_deq, q_valid;
  logic [REQ_W-1:0] q_head;
  req_t          req;
  logic          divert;

  assign fp_slot  = cur.slot;
  assign fp_idx   = IW'(idx);
  assign fp_valid = (ds == D_RUN);

  // trigger bookkeeping for the byte consumed in the previous cycle
  logic [NUM_SIG-1:0] fresh;
  assign fresh = check ? (fp_trig & ~act & ~newtrig) : '0;

  always_comb begin
    req.flow = cur.flow;
    req.slot = cur.slot;
    req.len  = cur.len;
    req.mask = act | newtrig;
    for (int s = 0; s < NUM_SIG; s++) begin
      req.start[s*SSTATE_W +: SSTATE_W] = act[s] ? act_state[s*SSTATE_W +: SSTATE_W]
                                                 : new_start[s*SSTATE_W +: SSTATE_W];
      req.off[s*LW +: LW] = act[s] ? '0 : new_off[s*LW +: LW];
    end
  end

  logic finish_go;
  assign divert    = |(act | newtrig);
  assign finish_go = (ds == D_FINISH) && !sp_done;
  assign ctx_we    = finish_go;
  assign an_upd    = finish_go;
  assign an_matched = matched;
  assign q_enq     = finish_go && divert;
  assign blk_set   = q_enq && !q_drop;
  assign blk_set_flow = cur.flow;

  // choosing the next packet
  logic take_hol, take_new, park_new;
  assign take_hol = (ds == D_IDLE) && hol_pop_valid;
  assign park_new = (ds == D_IDLE) && !hol_pop_valid && !if_empty
                    && (busy[if_head.flow] || hol_has) && !hol_full;
  assign take_new = (ds == D_IDLE) && !hol_pop_valid && !if_empty
                    && !busy[if_head.flow] && !hol_has;
  assign hol_pop  = take_hol;
  assign hol_push = park_new;
  assign if_pop   = park_new || take_new;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ds        <= D_INIT;
      sweep     <= '0;
      init_done <= 1'b0;
      cur       <= '0;
      idx       <= '0;
      act       <= '0;
      act_state <= '0;
      newtrig   <= '0;
      new_start <= '0;
      new_off   <= '0;
      matched   <= 1'b0;
      check     <= 1'b0;
    end else begin

      // trigger bookkeeping (D_RUN and D_LAST)
      if (check) begin
        if (|fp_trig) matched <= 1'b1;
        for (int s = 0; s < NUM_SIG; s++) begin
          if (fresh[s]) begin
            newtrig[s] <= 1'b1;
            new_start[s*SSTATE_W +: SSTATE_W] <= fp_start[s*SSTATE_W +: SSTATE_W];
            new_off[s*LW +: LW] <= idx;
          end
        end
      end

      unique case (ds)
        D_INIT: begin
          if (sweep == AW'(FLOWS - 1)) begin
            ds        <= D_IDLE;
            init_done <= 1'b1;
          end
          sweep <= sweep + 1'b1;
        end
        D_IDLE: begin
          check <= 1'b0;
          if (take_hol) begin
            cur <= desc_t'(hol_pop_bits);
            ds  <= D_LOAD;
          end else if (take_new) begin
            cur <= if_head;
            ds  <= D_LOAD;
          end
        end
        D_LOAD: begin
          act       <= ss_rd_active;
          act_state <= ss_rd_state;
          newtrig   <= '0;
          matched   <= 1'b0;
          idx       <= '0;
          ds        <= D_RUN;
        end
        D_RUN: begin
          check <= 1'b1;
          idx   <= idx + 1'b1;
          if (idx + 1'b1 >= cur.len) ds <= D_LAST;
        end
        D_LAST: begin
          check <= 1'b0;
          ds    <= D_FINISH;
        end
        D_FINISH: if (!sp_done) ds <= D_IDLE;
        default: ds <= D_IDLE;
      endcase
    end
  end

  // busy flags: cleared by the sweep and by slow-path completion, set when a
  // packet is queued for the slow path (never the same flow in one cycle)
  always_ff @(posedge clk) begin
    if (ds == D_INIT) busy[sweep] <= 1'b0;
    if (sp_done) busy[sp_done_flow] <= 1'b0;
    if (blk_set) busy[cur.flow] <= 1'b1;
  end

  assign ev_fast_done  = finish_go;
  assign ev_anom_index = an_index;
  assign ev_anomalous  = finish_go && an_anom;
  assign ev_miss       = check && fp_miss;

  // ---------------------------------------------------------------- queues and slow path
  slow_path_queues #(.NUM_Q(NUM_Q), .DEPTH(Q_DEPTH), .W(REQ_W)) u_q (
    .clk, .rst_n,
    .enq(q_enq), .enq_q(an_q), .enq_data(REQ_W'(req)), .enq_drop(q_drop),
    .deq(q_deq), .deq_valid(q_valid), .deq_data(q_head)
  );

  req_t sp_req;
  assign sp_req = req_t'(q_head);

  slow_path_dfa #(
    .NUM_SIG(NUM_SIG), .SSTATE_W(SSTATE_W), .FLOWS(FLOWS),
    .PKT_SLOTS(PKT_SLOTS), .MAX_LEN(MAX_LEN)
  ) u_slow (
    .clk, .rst_n,
    .req_valid(q_valid), .req_ready(q_deq),
    .req_flow(sp_req.flow), .req_slot(sp_req.slot), .req_len(sp_req.len),
    .req_mask(sp_req.mask), .req_start(sp_req.start), .req_off(sp_req.off),
    .pb_slot(sp_slot), .pb_idx(sp_idx), .pb_byte(sp_byte),
    .ss_we(sp_ss_we), .ss_flow(sp_ss_flow), .ss_sig(sp_ss_sig),
    .ss_active(sp_ss_active), .ss_state(sp_ss_state),
    .done(sp_done), .done_flow(sp_done_flow), .done_slot(sp_done_slot),
    .done_match(sp_done_match), .busy(slow_busy),
    .tw_en, .tw_sig, .tw_state, .tw_char, .tw_next,
    .ta_en, .ta_sig, .ta_state, .ta_acc, .ta_live
  );

  assign blk_clr = sp_done;

  // ---------------------------------------------------------------- verdicts
  always_comb begin
    v_valid      = 1'b0;
    v_flow       = cur.flow;
    v_diverted   = 1'b0;
    v_dropped    = 1'b0;
    v_match      = '0;
    pb_free_en   = 1'b0;
    pb_free_slot = cur.slot;
    if (sp_done) begin
      v_valid      = 1'b1;
      v_flow       = sp_done_flow;
      v_diverted   = 1'b1;
      v_match      = sp_done_match;
      pb_free_en   = 1'b1;
      pb_free_slot = sp_done_slot;
    end else if (finish_go && (!divert || q_drop)) begin
      v_valid    = 1'b1;
      v_diverted = divert;
      v_dropped  = q_drop;
      pb_free_en = 1'b1;
    end
  end

  // every packet starts with a byte marked sop
  assert property (@(posedge clk) disable iff (!rst_n) in_fire && !in_pkt |-> in_sop);

  // a packet is never both dispatched and finished in the slow path
  assert property (@(posedge clk) disable iff (!rst_n)
                   sp_done |-> sp_done_flow != cur.flow || ds == D_IDLE || ds == D_INIT);

endmodule
