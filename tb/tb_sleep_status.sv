// Self-checking test of the sleep status store: rows are cleared with the
// row write, then random single-signature writes (awake bit and saved slow
// state) are checked against a reference, including that a write to one
// signature leaves the flow's other signatures unchanged.
module tb_sleep_status;
  localparam int unsigned FLOWS = 1024, NUM_SIG = 3, SSTATE_W = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [9:0] rd_flow = 0, wr_flow = 0;
  logic [NUM_SIG-1:0] rd_active;
  logic [NUM_SIG*SSTATE_W-1:0] rd_state;
  logic wr_en = 0, wr_row = 0, wr_active = 0;
  logic [1:0] wr_sig = 0;
  logic [SSTATE_W-1:0] wr_state = 0;

  sleep_status #(.FLOWS(FLOWS), .NUM_SIG(NUM_SIG), .SSTATE_W(SSTATE_W)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NUM_SIG-1:0] ra [FLOWS];
  logic [NUM_SIG*SSTATE_W-1:0] rs [FLOWS];
  initial begin
    for (int f = 0; f < FLOWS; f++) begin
      @(negedge clk);
      wr_en = 1; wr_row = 1; wr_flow = 10'(f);
      ra[f] = 0; rs[f] = 0;
    end
    @(negedge clk);
    wr_row = 0;
    for (int n = 0; n < 10000; n++) begin
      @(negedge clk);
      wr_en = 1'($urandom);
      wr_flow = 10'($urandom);
      wr_sig = 2'($urandom_range(NUM_SIG - 1));
      wr_active = 1'($urandom);
      wr_state = 3'($urandom);
      rd_flow = ($urandom_range(2) == 0) ? wr_flow : 10'($urandom);
      #1;
      checks++;
      if (rd_active !== ra[rd_flow] || rd_state !== rs[rd_flow]) begin failures++; $display("mismatch"); end
      @(posedge clk);
      if (wr_en) begin
        ra[wr_flow][wr_sig] = wr_active;
        rs[wr_flow][wr_sig*SSTATE_W +: SSTATE_W] = wr_state;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
