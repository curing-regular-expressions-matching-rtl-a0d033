// Self-checking test of the history buffer.
//
// Random set/reset masks, loads and length programming are applied for many
// cycles; a reference model kept in the testbench (flags, counters, lengths)
// is updated by the same rules: set wins over reset, a set loads the flag's
// counter with its length, a reset clears it, otherwise a positive counter
// counts down by one per step. Flags, counters and the zero / above-zero
// outputs are compared every cycle. The worked case of a counter of 4
// reaching zero after exactly four further characters is checked directly.
module tb_hfa_history;
  localparam int unsigned FLAGS = 16, NUM_CTR = 6, CTR_W = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ld = 0, step = 0, len_we = 0;
  logic [FLAGS-1:0] ld_flags = 0, set_mask = 0, clr_mask = 0, flags, ok_eq, ok_gt;
  logic [NUM_CTR*CTR_W-1:0] ld_ctrs = 0, ctrs;
  logic [2:0] len_idx = 0;
  logic [CTR_W-1:0] len_val = 0;

  hfa_history #(.FLAGS(FLAGS), .NUM_CTR(NUM_CTR), .CTR_W(CTR_W)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [FLAGS-1:0] rf = 0;
  int unsigned rc [NUM_CTR];
  int unsigned rl [NUM_CTR];

  task automatic compare();
    checks++;
    if (flags !== rf) begin failures++; $display("flags %h want %h", flags, rf); end
    for (int i = 0; i < NUM_CTR; i++) begin
      checks++;
      if (ctrs[i*CTR_W +: CTR_W] != CTR_W'(rc[i]) || ok_eq[i] != (rc[i] == 0) || ok_gt[i] != (rc[i] != 0)) begin
        failures++; $display("ctr %0d = %0d want %0d", i, ctrs[i*CTR_W +: CTR_W], rc[i]);
      end
    end
    checks++;
    if (ok_eq[FLAGS-1:NUM_CTR] != '1 || ok_gt[FLAGS-1:NUM_CTR] != '1) begin failures++; $display("uncounted flags"); end
  endtask

  initial begin
    for (int i = 0; i < NUM_CTR; i++) begin rc[i] = 0; rl[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // program lengths
    for (int i = 0; i < NUM_CTR; i++) begin
      @(negedge clk);
      len_we = 1; len_idx = 3'(i); len_val = CTR_W'(i + 2); rl[i] = i + 2;
    end
    @(negedge clk);
    len_we = 0;
    // worked case: set flag 0 with length 4, then four characters
    @(negedge clk); len_we = 1; len_idx = 0; len_val = 4; rl[0] = 4;
    @(negedge clk); len_we = 0; step = 1; set_mask = 1;
    @(negedge clk); set_mask = 0;
    checks++;
    if (ctrs[CTR_W-1:0] != 4) begin failures++; $display("load 4 failed"); end
    repeat (4) @(negedge clk);
    step = 0;
    checks++;
    if (ctrs[CTR_W-1:0] != 0 || !ok_eq[0] || !flags[0]) begin failures++; $display("count to 0 failed"); end
    rf = flags;
    for (int i = 0; i < NUM_CTR; i++) rc[i] = ctrs[i*CTR_W +: CTR_W];
    // random
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      ld = ($urandom_range(30) == 0);
      step = 1'($urandom);
      set_mask = ($urandom_range(3) == 0) ? FLAGS'($urandom) & FLAGS'($urandom) : '0;
      clr_mask = ($urandom_range(3) == 0) ? FLAGS'($urandom) : '0;
      ld_flags = FLAGS'($urandom);
      for (int i = 0; i < NUM_CTR; i++) ld_ctrs[i*CTR_W +: CTR_W] = CTR_W'($urandom_range(9));
      @(posedge clk);
      if (ld) begin
        rf = ld_flags;
        for (int i = 0; i < NUM_CTR; i++) rc[i] = ld_ctrs[i*CTR_W +: CTR_W];
      end else if (step) begin
        rf = (rf & ~clr_mask) | set_mask;
        for (int i = 0; i < NUM_CTR; i++) begin
          if (set_mask[i]) rc[i] = rl[i];
          else if (clr_mask[i]) rc[i] = 0;
          else if (rc[i] != 0) rc[i]--;
        end
      end
      #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
