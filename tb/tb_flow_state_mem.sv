// Self-checking test of the per-flow context store: random contexts are
// written for random flows of a reduced store (4096 flows) and read back
// against a reference copy, with reads of the written flow in the same
// cycle seeing the old value until the clock edge.
module tb_flow_state_mem;
  localparam int unsigned FLOWS = 4096, W = 126;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [11:0] rd_addr = 0, wr_addr = 0;
  logic [W-1:0] rd_data, wr_data = 0;
  logic wr_en = 0;

  flow_state_mem #(.FLOWS(FLOWS), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] ref_mem [FLOWS];
  initial begin
    for (int a = 0; a < FLOWS; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 12'(a); wr_data = {$urandom, $urandom, $urandom, $urandom};
      ref_mem[a] = wr_data;
    end
    for (int n = 0; n < 10000; n++) begin
      @(negedge clk);
      wr_en = 1'($urandom);
      wr_addr = 12'($urandom);
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      rd_addr = ($urandom_range(2) == 0) ? wr_addr : 12'($urandom);
      #1;
      checks++;
      if (rd_data !== ref_mem[rd_addr]) begin failures++; $display("mismatch at %0d", rd_addr); end
      @(posedge clk);
      if (wr_en) ref_mem[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
