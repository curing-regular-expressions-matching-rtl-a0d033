// Self-checking test of the transition selector.
//
// Random sets of SLOTS transitions (random valid bits, conditions of 0..3
// flags, counter modes) are presented with random history flags and counter
// states. A reference written as a plain search computes which slots are
// eligible and the largest condition size; the selector must report a hit
// exactly when some slot is eligible and pick an eligible slot of maximal
// size (slot sets with ties are generated too; the lowest such slot wins).
module tb_hfa_select;
  import hfa_pkg::*;

  localparam int unsigned STATE_W = 14;
  localparam int unsigned FLAGS   = 16;
  localparam int unsigned SLOTS   = 8;
  localparam int unsigned ENTRY_W = entry_w(STATE_W, FLAGS);

  logic [SLOTS*ENTRY_W-1:0] word;
  logic [FLAGS-1:0] flags, ok_eq, ok_gt;
  logic hit;
  logic [STATE_W-1:0] next_state;
  logic [FLAGS-1:0] set_mask, clr_mask;

  hfa_select #(.STATE_W(STATE_W), .FLAGS(FLAGS), .SLOTS(SLOTS)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [FLAGS-1:0] cond [SLOTS];
      logic gt [SLOTS];
      logic v [SLOTS];
      int best, bestw, cnt;
      flags = FLAGS'($urandom);
      ok_eq = FLAGS'($urandom) | 16'hFFC0;     // flags 6..15 have no counter
      for (int f = 0; f < 6; f++) ok_gt[f] = !ok_eq[f];
      ok_gt[15:6] = '1;
      for (int s = 0; s < SLOTS; s++) begin
        cond[s] = '0;
        cnt = $urandom_range(3);
        for (int k = 0; k < cnt; k++) cond[s][$urandom_range(FLAGS-1)] = 1'b1;
        if (n % 3 == 0) cond[s] = cond[s] & flags;   // make many eligible
        gt[s] = 1'($urandom);
        v[s]  = ($urandom_range(7) != 0);
        word[s*ENTRY_W +: ENTRY_W] = {v[s], gt[s], FLAGS'($urandom), FLAGS'($urandom), cond[s],
                                       STATE_W'(s * 1000 + n % 997)};
      end
      #1;
      best = -1; bestw = -1;
      for (int s = 0; s < SLOTS; s++) begin
        logic [FLAGS-1:0] okc;
        okc = gt[s] ? ok_gt : ok_eq;
        if (v[s] && (cond[s] & ~flags) == 0 && (cond[s] & ~okc) == 0) begin
          if ($countones(cond[s]) > bestw) begin
            bestw = $countones(cond[s]);
            best = s;
          end
        end
      end
      checks++;
      if (hit != (best >= 0)) begin
        failures++;
        $display("hit mismatch n=%0d", n);
      end else if (best >= 0) begin
        checks++;
        if (next_state != word[best*ENTRY_W +: STATE_W] ||
            set_mask != word[best*ENTRY_W + STATE_W + 2*FLAGS +: FLAGS] ||
            clr_mask != word[best*ENTRY_W + STATE_W + FLAGS +: FLAGS]) begin
          failures++;
          $display("choice mismatch n=%0d want slot %0d", n, best);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
