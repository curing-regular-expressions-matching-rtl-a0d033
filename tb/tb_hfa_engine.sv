// Self-checking test of the H-cFA fast-path engine.
//
// Two automata for the signatures r1 = .*ab[^a]*c and r2 = .*def are built
// here, as the history-based construction prescribes: six base states
// (0),(0,1),(0,3),(0,4),(0,5),(0,6) and one history flag for the closure
// state of r1. Phase A uses a plain flag (closure [^a]*); phase B replaces
// the closure by the length restriction [^a]{4} and gives the flag a
// counter loaded with 4. Random strings over {a..f,x} are fed one byte per
// clock and after every byte the engine's state is compared with an
// explicit NFA simulation (bit sets) of the same expressions. The worked
// strings "cdabc" (phase A) and "abdefdc" (phase B) must end accepted.
// Context load is checked by saving the context mid-stream, disturbing the
// engine and loading it back. Trigger outputs are checked for the two
// accepting states.
module tb_hfa_engine;
  import hfa_pkg::*;

  localparam int unsigned STATE_W = 3;
  localparam int unsigned FLAGS   = 16;
  localparam int unsigned NUM_CTR = 6;
  localparam int unsigned CTR_W   = 16;
  localparam int unsigned SLOTS   = 8;
  localparam int unsigned NUM_SIG = 3;
  localparam int unsigned SSTATE_W = 3;
  localparam int unsigned ENTRY_W = entry_w(STATE_W, FLAGS);
  localparam int unsigned WORD_W  = SLOTS * ENTRY_W;
  localparam int unsigned CTX_W   = STATE_W + FLAGS + NUM_CTR * CTR_W;

  // base states
  localparam int S0 = 0, S01 = 1, S03 = 2, S04 = 3, S05 = 4, S06 = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                        ctx_ld = 0;
  logic [CTX_W-1:0]            ctx_in = '0, ctx_out;
  logic                        byte_valid = 0;
  logic [7:0]                  byte_in = 0;
  logic [NUM_SIG-1:0]          trig;
  logic [NUM_SIG*SSTATE_W-1:0] slow_start;
  logic                        miss;
  logic                        tm_we = 0;
  logic [STATE_W-1:0]          tm_state = 0;
  logic [7:0]                  tm_char = 0;
  logic [WORD_W-1:0]           tm_word = '0;
  logic                        si_we = 0;
  logic [STATE_W-1:0]          si_state = 0;
  logic [NUM_SIG-1:0]          si_trig = 0;
  logic [NUM_SIG*SSTATE_W-1:0] si_start = 0;
  logic                        len_we = 0;
  logic [2:0]                  len_idx = 0;
  logic [CTR_W-1:0]            len_val = 0;

  hfa_engine #(.STATE_W(STATE_W), .FLAGS(FLAGS), .NUM_CTR(NUM_CTR), .CTR_W(CTR_W),
               .SLOTS(SLOTS), .NUM_SIG(NUM_SIG), .SSTATE_W(SSTATE_W)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;
  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ENTRY_W-1:0] mk(logic gt, logic [FLAGS-1:0] set, logic [FLAGS-1:0] clr,
                                            logic [FLAGS-1:0] cond, int nxt);
    return {1'b1, gt, set, clr, cond, STATE_W'(nxt)};
  endfunction

  // base transition of the six states, closure ignored
  function automatic int base(int s, byte unsigned x);
    if (x == "a") return S01;
    if (x == "d") return S04;
    if (x == "e" && s == S04) return S05;
    if (x == "f" && s == S05) return S06;
    return S0;
  endfunction

  int unsigned F;      // flag index in use
  bit          counted;

  task automatic load_automaton(bit cnt);
    logic [FLAGS-1:0] fl;
    counted = cnt;
    F  = cnt ? 0 : 15;   // flag 0 owns a counter, flag 15 does not
    fl = FLAGS'(1) << F;
    for (int s = 0; s < 6; s++) begin
      for (int c = 0; c < 256; c++) begin
        logic [WORD_W-1:0] w;
        byte unsigned x;
        bit setc;
        x = byte'(c);
        w = '0;
        setc = (x == "b" && s == S01);
        // unconditional: base move; "b" after "a" enters the closure,
        // "a" leaves it
        w[0 +: ENTRY_W] = mk(1'b0, setc ? fl : '0, (x == "a") ? fl : '0, '0, base(s, x));
        if (!setc && x != "a") begin
          if (x == "c")
            // closure complete: accept r1. With the length restriction the
            // flag is left; with [^a]* it stays, since "c" is in [^a].
            w[ENTRY_W +: ENTRY_W] = mk(1'b0, '0, cnt ? fl : '0, fl, S03);
          else if (cnt)
            // counter expired without "c": the restriction is broken
            w[ENTRY_W +: ENTRY_W] = mk(1'b0, '0, fl, fl, base(s, x));
        end
        @(negedge clk);
        tm_we = 1; tm_state = STATE_W'(s); tm_char = 8'(c); tm_word = w;
      end
    end
    for (int s = 0; s < 8; s++) begin
      @(negedge clk);
      tm_we = 0;
      si_we = 1; si_state = STATE_W'(s);
      si_trig  = (s == S03) ? 3'b001 : (s == S06) ? 3'b010 : 3'b000;
      si_start = (s == S03) ? 9'o5 : (s == S06) ? 9'o30 : 9'o0;
    end
    @(negedge clk);
    si_we = 0;
    len_we = 1; len_idx = 0; len_val = 4;
    @(negedge clk);
    len_we = 0;
  endtask

  // reference NFA: bit 0..6 as in the expression's NFA; bits 7..10 are the
  // four gap positions of [^a]{4} (phase B)
  logic [10:0] nfa;
  function automatic logic [10:0] nfa_step(logic [10:0] n, byte unsigned x, bit cnt);
    logic [10:0] r;
    r = 11'b1;                                   // state 0 loops on .*
    if (x == "a") r[1] = 1;
    if (n[1] && x == "b") r[2] = 1;
    if (!cnt) begin
      if (n[2] && x != "a") r[2] = 1;            // [^a]*
      if (n[2] && x == "c") r[3] = 1;
    end else begin
      if (n[2] && x != "a") r[7] = 1;
      if (n[7] && x != "a") r[8] = 1;
      if (n[8] && x != "a") r[9] = 1;
      if (n[9] && x != "a") r[10] = 1;
      if (n[10] && x == "c") r[3] = 1;
    end
    if (x == "d") r[4] = 1;
    if (n[4] && x == "e") r[5] = 1;
    if (n[5] && x == "f") r[6] = 1;
    return r;
  endfunction

  function automatic int expect_state(logic [10:0] n);
    if (n[3]) return S03;
    if (n[6]) return S06;
    if (n[5]) return S05;
    if (n[4]) return S04;
    if (n[1]) return S01;
    return S0;
  endfunction

  task automatic feed(byte unsigned x);
    @(negedge clk);
    byte_valid = 1; byte_in = x;
    nfa = nfa_step(nfa, x, counted);
    @(posedge clk);
    #1;
    byte_valid = 0;
    checks++;
    if (int'(ctx_out[STATE_W-1:0]) != expect_state(nfa)) begin
      failures++;
      $display("state mismatch after '%c': got %0d want %0d", x, ctx_out[STATE_W-1:0], expect_state(nfa));
    end
    checks++;
    if (trig != ((expect_state(nfa) == S03) ? 3'b001 : (expect_state(nfa) == S06) ? 3'b010 : 3'b000)) begin
      failures++;
      $display("trigger mismatch after '%c'", x);
    end
    checks++;
    if (miss) begin
      failures++;
      $display("unexpected miss");
    end
  endtask

  task automatic reset_parse();
    @(negedge clk);
    ctx_ld = 1; ctx_in = '0;
    @(negedge clk);
    ctx_ld = 0;
    nfa = 11'b1;
  endtask

  task automatic feed_str(string s);
    for (int i = 0; i < s.len(); i++) feed(s[i]);
  endtask

  string alpha = "abcdefx";

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------- phase A: H-FA with closure flag
    load_automaton(0);
    reset_parse();
    feed_str("cdabc");
    checks++;
    if (ctx_out[STATE_W-1:0] != STATE_W'(S03)) begin failures++; $display("cdabc not accepted"); end
    checks++;
    if (slow_start[2:0] != 3'd5) begin failures++; $display("slow start wrong"); end
    reset_parse();
    for (int i = 0; i < 3000; i++) feed(alpha[$urandom_range(6)]);

    // back-to-back bytes: one state traversal per clock
    reset_parse();
    begin
      int unsigned t0;
      string s = "xxabxxxcdef";
      @(negedge clk);
      t0 = cycles;
      for (int i = 0; i < s.len(); i++) begin
        byte_valid = 1; byte_in = s[i];
        nfa = nfa_step(nfa, s[i], 0);
        @(negedge clk);
      end
      byte_valid = 0;
      checks++;
      if (cycles - t0 != s.len()) begin failures++; $display("rate wrong"); end
      checks++;
      if (ctx_out[STATE_W-1:0] != STATE_W'(S06)) begin failures++; $display("burst result wrong"); end
    end

    // context save / restore in the middle of a closure
    reset_parse();
    feed_str("xab");
    begin
      logic [CTX_W-1:0] saved;
      logic [10:0] nsaved;
      saved = ctx_out; nsaved = nfa;
      reset_parse();
      feed_str("aaa");
      @(negedge clk);
      ctx_ld = 1; ctx_in = saved;
      @(negedge clk);
      ctx_ld = 0;
      nfa = nsaved;
      feed_str("xyzc");
      checks++;
      if (ctx_out[STATE_W-1:0] != STATE_W'(S03)) begin failures++; $display("restored context lost"); end
    end

    // ---------------- phase B: H-cFA with counter, [^a]{4}
    load_automaton(1);
    reset_parse();
    feed_str("abdefdc");
    checks++;
    if (ctx_out[STATE_W-1:0] != STATE_W'(S03)) begin failures++; $display("abdefdc not accepted"); end
    reset_parse();
    feed_str("abdefdxc");
    checks++;
    if (ctx_out[STATE_W-1:0] == STATE_W'(S03)) begin failures++; $display("gap of 5 accepted"); end
    reset_parse();
    for (int i = 0; i < 6000; i++) begin
      // bias towards b..f so the restriction is reached often
      if ($urandom_range(3) == 0) feed("a");
      else feed(alpha[$urandom_range(6)]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
