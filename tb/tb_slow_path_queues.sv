// Self-checking test of the slow-path request queues: random pushes into
// random classes and random pops, compared with NUM_Q reference queues. The
// popped entry must always come from the lowest non-empty class, in FIFO
// order within the class, and a push into a full class must be reported as
// dropped and leave the queue unchanged.
module tb_slow_path_queues;
  localparam int unsigned NUM_Q = 4, DEPTH = 8, W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enq = 0, deq = 0, enq_drop, deq_valid;
  logic [1:0] enq_q = 0;
  logic [W-1:0] enq_data = 0, deq_data;

  slow_path_queues #(.NUM_Q(NUM_Q), .DEPTH(DEPTH), .W(W)) dut (.*);

  int checks = 0, failures = 0, drops = 0;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] rq [NUM_Q][$];
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int hq;
      @(negedge clk);
      enq = ($urandom_range(9) < ((n / 2000) % 2 ? 7 : 4));
      enq_q = 2'($urandom);
      enq_data = $urandom;
      deq = 1'($urandom);
      #1;
      hq = -1;
      for (int q = NUM_Q - 1; q >= 0; q--) if (rq[q].size() != 0) hq = q;
      checks++;
      if (deq_valid != (hq >= 0)) begin failures++; $display("valid mismatch"); end
      else if (hq >= 0) begin
        checks++;
        if (deq_data != rq[hq][0]) begin failures++; $display("head mismatch"); end
      end
      checks++;
      if (enq_drop != (enq && rq[enq_q].size() == DEPTH)) begin failures++; $display("drop mismatch n=%0d q=%0d size=%0d cnt=%0d", n, enq_q, rq[enq_q].size(), dut.cnt[enq_q]); end
      @(posedge clk);
      if (enq_drop) drops++;
      begin
        bit room;
        room = rq[enq_q].size() < DEPTH;
        if (deq && hq >= 0) void'(rq[hq].pop_front());
        if (enq && room) rq[enq_q].push_back(enq_data);
      end
    end
    checks++;
    if (drops == 0) begin failures++; $display("overflow never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
