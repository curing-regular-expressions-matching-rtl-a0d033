// Denial-of-service experiment on the matcher, with a single queue, so all slow-path requests are served in arrival order (protection off).
//
// Fifty flows share one packetized engine, like the published protection
// experiment: first all flows are normal (a prefix in about 1% of packets),
// then 10 flows turn anomalous and send packets full of signature pieces,
// then 25 do, overloading the slow path. The three signatures, the traffic
// pieces, the reference NFAs and the verdict and anomaly checks are those
// of the end-to-end test. Without protection the overload must also cost normal flows packets,
// which is what the anomaly queues prevent.
// A packet counts as normal when its flow was normal when it was sent and
// its anomaly index was below the top class (a normal flow that hits two
// prefixes close together is briefly, and rightly, treated as anomalous).
module tb_nids_dos_noprot;
  import hfa_pkg::*;

  localparam int unsigned STATE_W = 3, FLAGS = 16, NUM_CTR = 6, CTR_W = 16, SLOTS = 8;
  localparam int unsigned NUM_SIG = 3, SSTATE_W = 4, FLOWS = 64, K = 8, INV_EPS = 100;
  localparam int unsigned NUM_Q = 1, Q_DEPTH = 2, HOL_DEPTH = 4, PKT_SLOTS = 8, MAX_LEN = 64;
  localparam int NPKT = 3000;
  localparam bit R2_LONG = 1;  // r2 with the trailing [^j]*j part
  localparam int NUSED = 3;    // signatures in use
  localparam int ATTACK_PCT = 60; // share of packets from anomalous flows once there are any
  localparam int NTF = 50;  // flows carrying traffic
  int attack_lo = NTF;      // flows at and above this one are anomalous

  localparam int unsigned AW = $clog2(FLOWS);
  localparam int unsigned SW = (NUM_SIG > 1) ? $clog2(NUM_SIG) : 1;
  localparam int unsigned ENTRY_W = entry_w(STATE_W, FLAGS);
  localparam int unsigned WORD_W = SLOTS * ENTRY_W;
  localparam int unsigned CIDX_W = (NUM_CTR > 1) ? $clog2(NUM_CTR) : 1;
  localparam int unsigned FLAG = 15;   // history flag of the [^ij]* closure

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init_done, in_valid = 0, in_ready, in_sop = 0, in_eop = 0;
  logic [AW-1:0] in_flow = 0, v_flow;
  logic [7:0] in_byte = 0;
  logic v_valid, v_diverted, v_dropped;
  logic [NUM_SIG-1:0] v_match;
  logic ev_fast_done, ev_anomalous, ev_miss, slow_busy;
  logic [K-1:0] ev_anom_index;
  logic tm_we = 0, si_we = 0, len_we = 0, tw_en = 0, ta_en = 0, ta_acc = 0, ta_live = 0;
  logic [STATE_W-1:0] tm_state = 0, si_state = 0;
  logic [7:0] tm_char = 0, tw_char = 0;
  logic [WORD_W-1:0] tm_word = '0;
  logic [NUM_SIG-1:0] si_trig = 0;
  logic [NUM_SIG*SSTATE_W-1:0] si_start = 0;
  logic [CIDX_W-1:0] len_idx = 0;
  logic [CTR_W-1:0] len_val = 0;
  logic [SW-1:0] tw_sig = 0, ta_sig = 0;
  logic [SSTATE_W-1:0] tw_state = 0, tw_next = 0, ta_state = 0;

  nids_top #(.STATE_W(STATE_W), .FLAGS(FLAGS), .NUM_CTR(NUM_CTR), .CTR_W(CTR_W), .SLOTS(SLOTS),
             .NUM_SIG(NUM_SIG), .SSTATE_W(SSTATE_W), .FLOWS(FLOWS), .K(K), .INV_EPS(INV_EPS),
             .NUM_Q(NUM_Q), .Q_DEPTH(Q_DEPTH), .HOL_DEPTH(HOL_DEPTH), .PKT_SLOTS(PKT_SLOTS),
             .MAX_LEN(MAX_LEN)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #80000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference NFAs
  function automatic logic [7:0] nstep(int sig, logic [7:0] n, byte unsigned x);
    logic [7:0] r;
    r = 8'b1;
    if (sig == 0) begin
      if (x == "g" || x == "h") r[1] = 1;
      if (n[1] && x == "d") r[2] = 1;
      if (n[2] && x != "i" && x != "j") r[2] = 1;
      if (n[2] && (x == "i" || x == "j")) r[3] = 1;
      if (n[3] && x == "e") r[4] = 1;
    end else if (sig == 1) begin
      if (x == "f") r[1] = 1;
      if (n[1] && x == "a") r[2] = 1;
      if (n[2] && x == "g") r[3] = 1;
      if (n[3] && x != "i") r[3] = 1;
      if (n[3] && x == "i") r[4] = 1;
      if (R2_LONG && n[4] && x != "j") r[4] = 1;
      if (R2_LONG && n[4] && x == "j") r[5] = 1;
    end else begin
      if (x == "a") r[1] = 1;
      if (n[1] && (x == "g" || x == "h")) r[2] = 1;
      if (n[2] && x == "i") r[3] = 1;
      if (n[3] && x != "l") r[3] = 1;
      if (n[3] && (x == "a" || x == "e")) r[4] = 1;
      if (n[4] && x == "c") r[5] = 1;
    end
    return r;
  endfunction
  function automatic bit nacc(int sig, logic [7:0] n);
    return (sig == 0) ? n[4] : (sig == 2) ? n[5] : R2_LONG ? n[5] : n[4];
  endfunction
  // state at or past the end of the prefix: slow path must stay awake
  function automatic bit nlive(int sig, logic [7:0] n);
    return (sig == 0) ? (n[3] | n[4]) : (sig == 2) ? (|n[5:2]) : (|n[5:1]);
  endfunction
  // prefix just completed
  function automatic bit ntrig(int sig, logic [7:0] n);
    return (sig == 0) ? n[3] : (sig == 2) ? n[2] : n[1];
  endfunction

  logic [7:0] dstate [NUM_SIG][$];
  function automatic int find(int sig, logic [7:0] n);
    foreach (dstate[sig][i]) if (dstate[sig][i] == n) return i;
    return -1;
  endfunction

  task automatic build_slow(int sig);
    dstate[sig].push_back(8'b1);
    for (int i = 0; i < dstate[sig].size(); i++) begin
      for (int c = 0; c < 256; c++) begin
        logic [7:0] t;
        int id;
        t = nstep(sig, dstate[sig][i], byte'(c));
        id = find(sig, t);
        if (id < 0) begin
          dstate[sig].push_back(t);
          id = dstate[sig].size() - 1;
        end
        @(negedge clk);
        tw_en = 1; tw_sig = SW'(sig); tw_state = SSTATE_W'(i); tw_char = 8'(c); tw_next = SSTATE_W'(id);
      end
    end
    @(negedge clk);
    tw_en = 0;
    foreach (dstate[sig][i]) begin
      @(negedge clk);
      ta_en = 1; ta_sig = SW'(sig); ta_state = SSTATE_W'(i);
      ta_acc = nacc(sig, dstate[sig][i]); ta_live = nlive(sig, dstate[sig][i]);
    end
    @(negedge clk);
    ta_en = 0;
  endtask

  // fast path: base states F0 = {}, F1 = {after [gh]}, F3 = {prefix 1
  // complete}, FF = {prefix 2 complete}, FA = {after a}, F13 = {after [gh],
  // prefix 3 complete}; the closure [^ij]* of prefix 1 is the flag
  localparam int F0 = 0, F1 = 1, F3 = 2, FF = 3, FA = 4, F13 = 5;
  function automatic logic [ENTRY_W-1:0] mk(logic [FLAGS-1:0] set, logic [FLAGS-1:0] clr,
                                            logic [FLAGS-1:0] cond, int nxt);
    return {1'b1, 1'b0, set, clr, cond, STATE_W'(nxt)};
  endfunction
  task automatic build_fast();
    logic [FLAGS-1:0] fl;
    fl = FLAGS'(1) << FLAG;
    for (int s = 0; s < 6; s++) begin
      for (int c = 0; c < 256; c++) begin
        logic [WORD_W-1:0] w;
        byte unsigned x;
        int b;
        bit ij;
        x = byte'(c);
        ij = (x == "i" || x == "j");
        b = (x == "g" || x == "h") ? ((s == FA) ? F13 : F1) : (x == "f") ? FF : (x == "a") ? FA : F0;
        w = '0;
        w[0 +: ENTRY_W] = mk(((s == F1 || s == F13) && x == "d") ? fl : '0, ij ? fl : '0, '0, b);
        if (ij) w[ENTRY_W +: ENTRY_W] = mk('0, fl, fl, F3);
        @(negedge clk);
        tm_we = 1; tm_state = STATE_W'(s); tm_char = 8'(c); tm_word = w;
      end
    end
    @(negedge clk);
    tm_we = 0;
    for (int s = 0; s < (1 << STATE_W); s++) begin
      @(negedge clk);
      si_we = 1; si_state = STATE_W'(s);
      si_trig = (s == F3) ? NUM_SIG'(1) : (s == FF) ? NUM_SIG'(2) : (s == F13) ? NUM_SIG'(4) : '0;
      si_start = '0;
      si_start[0 +: SSTATE_W] = SSTATE_W'(find(0, 8'b1001));
      si_start[SSTATE_W +: SSTATE_W] = SSTATE_W'(find(1, 8'b0011));
      si_start[2*SSTATE_W +: SSTATE_W] = SSTATE_W'(find(2, 8'b0101));
    end
    @(negedge clk);
    si_we = 0;
  endtask

  // ------------------------------------------------------------ expectations
  typedef struct { bit div; bit normal; logic [NUM_SIG-1:0] m; } vexp_t;
  vexp_t vq [NTF][$];
  bit aq [NTF][$];
  logic [7:0] nf [NTF][NUM_SIG];
  int ranom [NTF];
  int sanom [NTF];
  bit tainted [NTF];

  int n_div = 0, n_mask = 0, n_wake = 0, n_sleep = 0, n_hol = 0, n_drop = 0, n_anom = 0;
  int n_normal_div = 0, n_attack_div = 0;
  int n_prio = 0, n_flag = 0, n_verd = 0, n_normal_drop = 0, n_attack_drop = 0, n_match = 0;

  // verdict and anomaly monitors
  always @(posedge clk) if (rst_n) begin
    if (v_valid) begin
      n_verd++;
      checks++;
      if (int'(v_flow) >= NTF || vq[int'(v_flow)].size() == 0) begin failures++; $display("verdict for idle flow %0d", v_flow); end
      else begin
        vexp_t e;
        e = vq[int'(v_flow)].pop_front();
        if (e.div && e.normal) n_normal_div++;
        if (e.div && !e.normal) n_attack_div++;
        if (v_dropped) begin
          n_drop++;
          if (!e.div && !tainted[int'(v_flow)]) begin failures++; $display("dropped packet was not for the slow path"); end
          tainted[int'(v_flow)] = 1;
          if (e.normal) n_normal_drop++; else n_attack_drop++;
        end else if (!tainted[int'(v_flow)]) begin
          if (v_diverted != e.div || v_match != e.m) begin
            failures++;
            $display("flow %0d verdict div %0d match %b, want %0d %b", v_flow, v_diverted, v_match, e.div, e.m);
          end
          if (v_match != 0) n_match++;
        end
      end
    end
    if (ev_fast_done) begin
      int f, want;
      bit m;
      f = int'(dut.cur.flow);
      checks++;
      if (f >= NTF || aq[f].size() == 0) begin failures++; $display("fast done for idle flow"); end
      else begin
        m = aq[f].pop_front();
        want = m ? ranom[f] + INV_EPS : (ranom[f] > 0 ? ranom[f] - 1 : 0);
        if (want > 255) want = 255;
        if (int'(ev_anom_index) != want) begin failures++; $display("anomaly index %0d want %0d", ev_anom_index, want); end
        ranom[f] = want;
      end
      if (ev_anomalous) n_anom++;
    end
    if (ev_miss) begin failures++; $display("fast path found no transition"); end
    // mechanism counters, read from inside the design
    if (dut.u_hol.push && !dut.u_hol.full) n_hol++;
    if (dut.check && |(dut.fp_trig & dut.newtrig & ~dut.act)) n_mask++;
    if (dut.ds == D_LOAD && dut.ss_rd_active != 0) n_wake++;
    if (dut.sp_ss_we && !dut.sp_ss_active) n_sleep++;
    if (dut.q_enq && !dut.q_drop) n_div++;
    if (dut.q_deq) begin
      for (int q = 0; q < NUM_Q; q++)
        if (q > int'(dut.u_q.sel) && dut.u_q.cnt[q] != 0) n_prio++;
    end
    if (dut.fp_valid && dut.u_fast.u_sel.hit && dut.u_fast.u_sel.clr_mask[FLAG] && dut.u_fast.flags[FLAG]
        && dut.u_fast.u_sel.next_state == STATE_W'(F3)) n_flag++;
  end

  // ------------------------------------------------------------ traffic
  string normal_alpha = "xyzabcdeklm";
  // kind 0: random traffic for the flow; kind 1: fixed packet text
  task automatic send_packet(int f, int kind = 0, string txt = "");
    byte unsigned p [$];
    int len;
    vexp_t e;
    bit trg;
    len = (kind == 1) ? 0 : $urandom_range(40, 8);
    for (int k = 0; k < txt.len(); k++) p.push_back(txt[k]);
    for (int i = 0; i < len; i++) begin
      if (f >= attack_lo && $urandom_range(3) == 0) begin
        // attack: pieces of both signatures
        string s;
        case ($urandom_range(3)) 0: s = "gdxie"; 1: s = "fagxixj"; 2: s = "agixlagixac"; default: s = "fagfxixj"; endcase
        for (int k = 0; k < s.len() && p.size() < len; k++) p.push_back(s[k]);
      end else if (f < attack_lo && $urandom_range(2499) == 0) begin
        string s;
        s = ($urandom_range(1) == 0) ? "hdi" : "f";
        for (int k = 0; k < s.len() && p.size() < len; k++) p.push_back(s[k]);
      end else if (p.size() < len) begin
        p.push_back(normal_alpha[$urandom_range(normal_alpha.len() - 1)]);
      end
    end
    len = p.size();
    // reference
    e.div = 0; e.m = 0; trg = 0; e.normal = 0;
    for (int s = 0; s < NUSED; s++) if (nlive(s, nf[f][s])) e.div = 1;
    for (int i = 0; i < len; i++) begin
      for (int s = 0; s < NUSED; s++) begin
        nf[f][s] = nstep(s, nf[f][s], p[i]);
        if (nacc(s, nf[f][s])) e.m[s] = 1;
        if (ntrig(s, nf[f][s])) begin e.div = 1; trg = 1; end
      end
    end
    // the anomaly index this packet will carry, known at send time
    sanom[f] = trg ? sanom[f] + INV_EPS : (sanom[f] > 0 ? sanom[f] - 1 : 0);
    if (sanom[f] > 255) sanom[f] = 255;
    e.normal = (f < attack_lo) && (sanom[f] < 192);
    vq[f].push_back(e);
    aq[f].push_back(trg);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      in_valid = 1; in_flow = AW'(f); in_byte = p[i]; in_sop = (i == 0); in_eop = (i == len - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    for (int f = 0; f < NTF; f++) begin
      ranom[f] = 0; sanom[f] = 0; tainted[f] = 0;
      for (int s = 0; s < NUSED; s++) nf[f][s] = 8'b1;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    build_slow(0);
    build_slow(1);
    build_slow(2);
    build_fast();
    wait (init_done);
    for (int n = 0; n < NPKT; n++) begin
      // phases: no anomalous flow, 10, then 25
      int f;
      attack_lo = (n < NPKT / 3) ? NTF : (n < 2 * NPKT / 3) ? NTF - 10 : NTF - 25;
      if (attack_lo < NTF && $urandom_range(99) < ATTACK_PCT) f = attack_lo + $urandom_range(NTF - 1 - attack_lo);
      else f = $urandom_range(attack_lo - 1);
      send_packet(f);
    end
    // directed: four attack packets from different flows keep the slow path
    // busy, then a normal flow with a low anomaly index completes a prefix;
    // its request has to be served before the waiting attack requests
    repeat (200) @(negedge clk);
    for (int k = 0; k < 4; k++)
      send_packet(NTF - 1 - k, 1, "gdxifagxxxxxxxxxxxxxxxxxxxxxxxxxxxxxxxxx");
    begin
      int lo;
      lo = 0;
      for (int f = 1; f < attack_lo; f++) if (ranom[f] < ranom[lo]) lo = f;
      send_packet(lo, 1, "fxx");
    end
    // drain
    begin
      int t;
      t = 0;
      while (t < 20000) begin
        bit empty;
        @(negedge clk);
        empty = 1;
        for (int f = 0; f < NTF; f++) if (vq[f].size() != 0) empty = 0;
        if (empty) break;
        t++;
      end
    end
    for (int f = 0; f < NTF; f++) begin
      checks++;
      if (vq[f].size() != 0) begin failures++; $display("flow %0d: %0d packets without verdict", f, vq[f].size()); end
    end
    $display("verdicts %0d diverted %0d matched %0d masked %0d resumed %0d slept %0d parked %0d dropped %0d anomalous %0d priority %0d flag %0d",
             n_verd, n_div, n_match, n_mask, n_wake, n_sleep, n_hol, n_drop, n_anom, n_prio, n_flag);
    checks++; if (n_div == 0)   begin failures++; $display("no diversion"); end
    checks++; if (n_match == 0) begin failures++; $display("no match"); end
    checks++; if (n_mask == 0)  begin failures++; $display("no masked trigger"); end
    checks++; if (n_wake == 0)  begin failures++; $display("no resumed slow path"); end
    checks++; if (n_sleep == 0) begin failures++; $display("no slow path sleep"); end
    checks++; if (n_hol == 0)   begin failures++; $display("no HoL parking"); end
    checks++; if (n_drop == 0)  begin failures++; $display("no overflow drop"); end
    checks++; if (n_anom == 0)  begin failures++; $display("no anomalous flow"); end
    checks++; if (n_flag == 0)  begin failures++; $display("no conditional transition"); end
    // no protection: the overload reaches normal flows too
    $display("normal flows lost %0d of %0d diverted packets, anomalous flows %0d of %0d",
             n_normal_drop, n_normal_div, n_attack_drop, n_attack_div);
    checks++; if (n_normal_drop == 0) begin failures++; $display("normal flows lost nothing without protection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
