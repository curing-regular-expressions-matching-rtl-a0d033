// Small synchronous FIFO (helper).
//
// DEPTH entries of W bits. push is ignored when full, pop when empty; both
// may happen in one cycle. head shows the oldest entry combinationally.
// Reset empties it.
module sync_fifo #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = 32,
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] push_data,
  input  logic         pop,
  output logic [W-1:0] head,
  output logic         empty,
  output logic         full
);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] rd, wr;
  logic [PW:0]   cnt;

  assign empty = (cnt == 0);
  assign full  = (cnt == (PW+1)'(DEPTH));
  assign head  = mem[rd];

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (do_push) mem[wr] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd  <= '0;
      wr  <= '0;
      cnt <= '0;
    end else begin
      if (do_push) wr <= (wr == PW'(DEPTH - 1)) ? '0 : wr + 1'b1;
      if (do_pop) rd <= (rd == PW'(DEPTH - 1)) ? '0 : rd + 1'b1;
      cnt <= cnt + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

endmodule
