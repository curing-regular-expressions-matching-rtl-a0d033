// Self-checking test of the packet buffer: slots are allocated until none
// is free (the lowest free slot must be offered), random payloads are
// written and read back through both read ports, slots are freed in random
// order and reallocated.
module tb_packet_buffer;
  localparam int unsigned PKT_SLOTS = 16, MAX_LEN = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic alloc_valid, alloc = 0, free_en = 0, wr_en = 0;
  logic [3:0] alloc_slot, free_slot = 0, wr_slot = 0, ra_slot = 0, rb_slot = 0;
  logic [7:0] wr_idx = 0, ra_idx = 0, rb_idx = 0, wr_byte = 0, ra_byte, rb_byte;

  packet_buffer #(.PKT_SLOTS(PKT_SLOTS), .MAX_LEN(MAX_LEN)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] ref_mem [PKT_SLOTS][MAX_LEN];
  bit used [PKT_SLOTS];

  initial begin
    for (int s = 0; s < PKT_SLOTS; s++) used[s] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      // allocate all free slots
      forever begin
        int lo;
        @(negedge clk);
        lo = -1;
        for (int s = PKT_SLOTS - 1; s >= 0; s--) if (!used[s]) lo = s;
        checks++;
        if (alloc_valid != (lo >= 0) || (lo >= 0 && alloc_slot != 4'(lo))) begin failures++; $display("alloc mismatch"); end
        if (lo < 0) break;
        alloc = 1;
        @(negedge clk);
        alloc = 0;
        used[lo] = 1;
        for (int i = 0; i < MAX_LEN; i++) begin
          wr_en = 1; wr_slot = 4'(lo); wr_idx = 8'(i); wr_byte = 8'($urandom);
          ref_mem[lo][i] = wr_byte;
          @(negedge clk);
        end
        wr_en = 0;
      end
      for (int n = 0; n < 500; n++) begin
        ra_slot = 4'($urandom); ra_idx = 8'($urandom);
        rb_slot = 4'($urandom); rb_idx = 8'($urandom);
        #1;
        checks++;
        if (ra_byte != ref_mem[ra_slot][ra_idx] || rb_byte != ref_mem[rb_slot][rb_idx]) begin
          failures++; $display("read mismatch");
        end
      end
      // free a random half
      for (int s = 0; s < PKT_SLOTS; s++) begin
        if ($urandom_range(1) == 1) begin
          @(negedge clk);
          free_en = 1; free_slot = 4'(s); used[s] = 0;
          @(negedge clk);
          free_en = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
