// Self-checking test of the anomaly counters with the published settings
// (8 bits, eps = 0.01, so +100 per prefix-matching packet, -1 otherwise).
// A well-behaved flow matching one packet in 200 must stay in the lowest
// queue class and never be flagged; an attacking flow matching every tenth
// packet must reach the ceiling (255) and be flagged anomalous. Random
// updates of many flows are compared with a reference model, and the clear
// port is checked.
module tb_anomaly_counter;
  localparam int unsigned FLOWS = 256, K = 8, INV_EPS = 100, NUM_Q = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] flow = 0, clr_addr = 0;
  logic upd = 0, matched = 0, anomalous, clr_en = 0;
  logic [K-1:0] index;
  logic [1:0] qclass;

  anomaly_counter #(.FLOWS(FLOWS), .K(K), .INV_EPS(INV_EPS), .NUM_Q(NUM_Q)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int r [FLOWS];
  task automatic update(int f, bit m);
    int want;
    bit  wa;
    @(negedge clk);
    flow = 8'(f); matched = m; upd = 1;
    want = m ? r[f] + INV_EPS : (r[f] > 0 ? r[f] - 1 : 0);
    wa = 0;
    if (want >= 255) begin want = 255; wa = m; end
    #1;
    checks++;
    if (index != 8'(want) || anomalous != wa || qclass != 2'(want >> 6)) begin
      failures++;
      $display("flow %0d: index %0d want %0d anom %0d", f, index, want, anomalous);
    end
    r[f] = want;
    @(posedge clk);
    #1 upd = 0;
  endtask

  initial begin
    for (int f = 0; f < FLOWS; f++) begin
      @(negedge clk);
      clr_en = 1; clr_addr = 8'(f); r[f] = 0;
    end
    @(negedge clk);
    clr_en = 0;
    begin
      int anom_seen = 0, worst = 0;
      for (int p = 0; p < 2000; p++) begin
        update(1, (p % 200) == 199);
        if (anomalous) anom_seen++;
        if (r[1] > worst) worst = r[1];
      end
      checks++;
      if (anom_seen != 0 || worst > 100) begin failures++; $display("normal flow misjudged"); end
      anom_seen = 0;
      for (int p = 0; p < 300; p++) begin
        update(2, (p % 10) == 0);
        if (anomalous) anom_seen++;
      end
      checks++;
      if (anom_seen == 0 || r[2] < 200) begin failures++; $display("attacker not flagged"); end
    end
    for (int n = 0; n < 5000; n++) update($urandom_range(FLOWS - 1), ($urandom_range(9) == 0));
    // clear port
    @(negedge clk);
    clr_en = 1; clr_addr = 2;
    @(negedge clk);
    clr_en = 0; r[2] = 0;
    update(2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
