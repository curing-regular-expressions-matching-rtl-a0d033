// Self-checking test of the transition memory: random words are written to
// random (state, character) addresses of a reduced memory (8 states) and
// read back combinationally against a reference copy; the last write to an
// address must win and other addresses must be untouched.
module tb_hfa_trans_mem;
  import hfa_pkg::*;
  localparam int unsigned STATE_W = 3, FLAGS = 16, SLOTS = 8;
  localparam int unsigned WORD_W = SLOTS * entry_w(STATE_W, FLAGS);

  logic clk = 0;
  always #5 clk = ~clk;
  logic [STATE_W-1:0] rd_state = 0, wr_state = 0;
  logic [7:0] rd_char = 0, wr_char = 0;
  logic [WORD_W-1:0] rd_word, wr_word = '0;
  logic wr_en = 0;

  hfa_trans_mem #(.STATE_W(STATE_W), .FLAGS(FLAGS), .SLOTS(SLOTS)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WORD_W-1:0] ref_mem [1 << (STATE_W + 8)];

  function automatic logic [WORD_W-1:0] rnd();
    logic [WORD_W-1:0] w;
    for (int i = 0; i < WORD_W; i += 32) w[i +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    // fill everything once
    for (int a = 0; a < (1 << (STATE_W + 8)); a++) begin
      @(negedge clk);
      wr_en = 1; {wr_state, wr_char} = (STATE_W+8)'(a); wr_word = rnd();
      ref_mem[a] = wr_word;
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      wr_en = 1'($urandom);
      {wr_state, wr_char} = (STATE_W+8)'($urandom);
      wr_word = rnd();
      {rd_state, rd_char} = ($urandom_range(3) == 0) ? {wr_state, wr_char} : (STATE_W+8)'($urandom);
      #1;
      checks++;
      if (rd_word !== ref_mem[{rd_state, rd_char}]) begin failures++; $display("read mismatch"); end
      @(posedge clk);
      if (wr_en) ref_mem[{wr_state, wr_char}] = wr_word;
    end
    wr_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
