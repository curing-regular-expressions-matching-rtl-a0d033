// Self-checking test of the slow path.
//
// Two signatures are used: r1 = .*[gh]d[^ij]*[ij]e and r2 = .*fag[^i]*i[^j]*j,
// cut after the prefixes [gh]d[^ij]*[ij] and f. The testbench turns each
// NFA into a DFA by subset construction, loads the DFAs with accept bits and
// live bits (the subset holds an NFA state at or beyond the end of the
// prefix), and sends requests for random packets with random signature
// masks, start states and offsets. The reference is a direct simulation of
// the NFA bit sets: the match mask, every sleep-status write (final state
// and awake bit) and the processing time (one byte per clock plus a few
// cycles per signature) are compared.
module tb_slow_path_dfa;
  localparam int unsigned NUM_SIG = 2, SSTATE_W = 4, FLOWS = 64, PKT_SLOTS = 4, MAX_LEN = 64;
  localparam int unsigned LW = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_ready;
  logic [5:0] req_flow = 0;
  logic [1:0] req_slot = 0;
  logic [LW-1:0] req_len = 0;
  logic [NUM_SIG-1:0] req_mask = 0;
  logic [NUM_SIG*SSTATE_W-1:0] req_start = 0;
  logic [NUM_SIG*LW-1:0] req_off = 0;
  logic [1:0] pb_slot;
  logic [5:0] pb_idx;
  logic [7:0] pb_byte;
  logic ss_we, ss_active, done, busy;
  logic [5:0] ss_flow, done_flow;
  logic [0:0] ss_sig;
  logic [SSTATE_W-1:0] ss_state;
  logic [1:0] done_slot;
  logic [NUM_SIG-1:0] done_match;
  logic tw_en = 0, ta_en = 0, ta_acc = 0, ta_live = 0;
  logic [0:0] tw_sig = 0, ta_sig = 0;
  logic [SSTATE_W-1:0] tw_state = 0, tw_next = 0, ta_state = 0;
  logic [7:0] tw_char = 0;

  slow_path_dfa #(.NUM_SIG(NUM_SIG), .SSTATE_W(SSTATE_W), .FLOWS(FLOWS),
                  .PKT_SLOTS(PKT_SLOTS), .MAX_LEN(MAX_LEN)) dut (.*);

  logic [7:0] pkt [PKT_SLOTS][MAX_LEN];
  assign pb_byte = pkt[pb_slot][pb_idx];

  int checks = 0, failures = 0;
  int unsigned cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;
  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // NFA step; bit 0 is the .* start state
  function automatic logic [7:0] nstep(int sig, logic [7:0] n, byte unsigned x);
    logic [7:0] r;
    r = 8'b1;
    if (sig == 0) begin
      if (x == "g" || x == "h") r[1] = 1;
      if (n[1] && x == "d") r[2] = 1;
      if (n[2] && x != "i" && x != "j") r[2] = 1;
      if (n[2] && (x == "i" || x == "j")) r[3] = 1;
      if (n[3] && x == "e") r[4] = 1;
    end else begin
      if (x == "f") r[1] = 1;
      if (n[1] && x == "a") r[2] = 1;
      if (n[2] && x == "g") r[3] = 1;
      if (n[3] && x != "i") r[3] = 1;
      if (n[3] && x == "i") r[4] = 1;
      if (n[4] && x != "j") r[4] = 1;
      if (n[4] && x == "j") r[5] = 1;
    end
    return r;
  endfunction
  function automatic bit nacc(int sig, logic [7:0] n);
    return (sig == 0) ? n[4] : n[5];
  endfunction
  function automatic bit nlive(int sig, logic [7:0] n);
    return (sig == 0) ? (n[3] | n[4]) : (|n[5:1]);
  endfunction

  string alpha = "fghijdeax";
  logic [7:0] dstate [NUM_SIG][$];   // DFA state id -> NFA subset

  function automatic int find(int sig, logic [7:0] n);
    foreach (dstate[sig][i]) if (dstate[sig][i] == n) return i;
    return -1;
  endfunction

  task automatic build(int sig);
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
        tw_en = 1; tw_sig = 1'(sig); tw_state = SSTATE_W'(i); tw_char = 8'(c); tw_next = SSTATE_W'(id);
      end
    end
    @(negedge clk);
    tw_en = 0;
    checks++;
    if (dstate[sig].size() > 16) begin failures++; $display("DFA too big"); end
    foreach (dstate[sig][i]) begin
      @(negedge clk);
      ta_en = 1; ta_sig = 1'(sig); ta_state = SSTATE_W'(i);
      ta_acc = nacc(sig, dstate[sig][i]); ta_live = nlive(sig, dstate[sig][i]);
    end
    @(negedge clk);
    ta_en = 0;
  endtask

  // expected sleep-status writes
  typedef struct { int sig; int st; bit act; } ssw_t;
  ssw_t exp_w [$];
  always @(posedge clk) begin
    if (ss_we) begin
      checks++;
      if (exp_w.size() == 0) begin failures++; $display("unexpected ss write"); end
      else begin
        ssw_t e;
        e = exp_w.pop_front();
        if (int'(ss_sig) != e.sig || int'(ss_state) != e.st || ss_active != e.act || ss_flow != req_flow) begin
          failures++;
          $display("ss write sig %0d st %0d act %0d, want sig %0d st %0d act %0d", ss_sig, ss_state, ss_active, e.sig, e.st, e.act);
        end
      end
    end
  end

  int wakes = 0, sleeps = 0, n_match = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    build(0);
    build(1);
    for (int n = 0; n < 400; n++) begin
      int len, t0, budget;
      logic [NUM_SIG-1:0] m, want;
      len = $urandom_range(MAX_LEN - 1, 1);
      req_slot = 2'($urandom);
      for (int i = 0; i < MAX_LEN; i++) pkt[req_slot][i] = alpha[$urandom_range(8)];
      m = NUM_SIG'($urandom_range(3, 1));
      want = 0;
      budget = 4;
      for (int s = 0; s < NUM_SIG; s++) begin
        int st, off;
        logic [7:0] nset;
        st  = $urandom_range(dstate[s].size() - 1);
        off = $urandom_range(len);
        req_start[s*SSTATE_W +: SSTATE_W] = SSTATE_W'(st);
        req_off[s*LW +: LW] = LW'(off);
        if (m[s]) begin
          nset = dstate[s][st];
          for (int i = off; i < len; i++) begin
            nset = nstep(s, nset, pkt[req_slot][i]);
            if (nacc(s, nset)) want[s] = 1;
          end
          exp_w.push_back('{s, find(s, nset), nlive(s, nset)});
          if (nlive(s, nset)) wakes++; else sleeps++;
          budget += len - off + 2;
        end
      end
      if (want != 0) n_match++;
      @(negedge clk);
      req_valid = 1; req_flow = 6'($urandom); req_len = LW'(len); req_mask = m;
      t0 = cycles;
      @(negedge clk);
      req_valid = 0;
      while (!done && cycles - t0 < 1000) @(negedge clk);
      checks++;
      if (!done || done_match != want || done_slot != req_slot || done_flow != req_flow) begin
        failures++;
        $display("request %0d: match %b want %b", n, done_match, want);
      end
      checks++;
      if (cycles - t0 > budget) begin failures++; $display("too slow: %0d > %0d", cycles - t0, budget); end
      @(negedge clk);
    end
    checks++;
    if (exp_w.size() != 0 || wakes == 0 || sleeps == 0 || n_match == 0) begin
      failures++; $display("coverage: wakes %0d sleeps %0d n_match %0d left %0d", wakes, sleeps, n_match, exp_w.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
