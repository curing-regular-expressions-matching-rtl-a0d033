// Payload store for packets in flight.
//
// The fast path reads a packet once, but a packet diverted to the slow path
// is parsed again from the point where its prefix matched, and a packet
// waiting behind a busy flow is parsed later; so payloads are kept here
// until the packet's verdict. The buffer has PKT_SLOTS slots of MAX_LEN
// bytes. alloc_valid/alloc_slot offer the lowest free slot; alloc takes it.
// free_en returns a slot. One byte write port (ingress) and two
// combinational read ports (fast path, slow path). Reset frees all slots;
// the payload itself is not cleared. Size and organisation are choices of
// this design.
module packet_buffer
  import hfa_pkg::*;
#(
  parameter int unsigned PKT_SLOTS = DEF_PKT_SLOTS,
  parameter int unsigned MAX_LEN   = DEF_MAX_LEN,
  localparam int unsigned PSW      = (PKT_SLOTS > 1) ? $clog2(PKT_SLOTS) : 1,
  localparam int unsigned IW       = (MAX_LEN > 1) ? $clog2(MAX_LEN) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic           alloc_valid,
  output logic [PSW-1:0] alloc_slot,
  input  logic           alloc,
  input  logic           free_en,
  input  logic [PSW-1:0] free_slot,
  input  logic           wr_en,
  input  logic [PSW-1:0] wr_slot,
  input  logic [IW-1:0]  wr_idx,
  input  logic [7:0]     wr_byte,
  input  logic [PSW-1:0] ra_slot,
  input  logic [IW-1:0]  ra_idx,
  output logic [7:0]     ra_byte,
  input  logic [PSW-1:0] rb_slot,
  input  logic [IW-1:0]  rb_idx,
  output logic [7:0]     rb_byte
);

  logic [7:0]           mem [PKT_SLOTS * MAX_LEN];
  logic [PKT_SLOTS-1:0] used;

  always_comb begin
    alloc_valid = 1'b0;
    alloc_slot  = '0;
    for (int i = PKT_SLOTS - 1; i >= 0; i--) begin
      if (!used[i]) begin
        alloc_valid = 1'b1;
        alloc_slot  = PSW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) used <= '0;
    else begin
      if (free_en) used[free_slot] <= 1'b0;
      if (alloc && alloc_valid) used[alloc_slot] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[int'(wr_slot) * MAX_LEN + int'(wr_idx)] <= wr_byte;
  end

  assign ra_byte = mem[int'(ra_slot) * MAX_LEN + int'(ra_idx)];
  assign rb_byte = mem[int'(rb_slot) * MAX_LEN + int'(rb_idx)];

endmodule
