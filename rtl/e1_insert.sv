// E1 insert unit: puts user bytes into the selected time slots of the
// outgoing stream. A buffer holds one byte per slot; the user writes it at
// any time through ins_we/ins_addr/ins_wdata, and the byte is sent, MSB
// first, in every frame for each slot whose bit is set in ins_mask, in place
// of the received bits. All other bits, slot 0 (alignment) always, and the
// whole stream while not aligned, pass through unchanged. tx_bit is
// registered: one cycle after bit_i. The buffer is not reset: write a slot
// before enabling it in ins_mask. Inserting into selected slots of 32
// eight-bit slots follows the case study; the per-slot buffer is this
// design's choice.
module e1_insert #(
  parameter int unsigned SLOTS     = e1_pkg::SLOTS,
  parameter int unsigned SLOT_BITS = e1_pkg::SLOT_BITS,
  localparam int unsigned SW = $clog2(SLOTS),
  localparam int unsigned BW = $clog2(SLOT_BITS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bit_i,
  input  logic [SW-1:0]        slot_i,
  input  logic [BW-1:0]        bitn_i,
  input  logic                 in_sync,
  input  logic [SLOTS-1:0]     ins_mask,
  input  logic                 ins_we,
  input  logic [SW-1:0]        ins_addr,
  input  logic [SLOT_BITS-1:0] ins_wdata,
  output logic                 tx_bit
);
  logic [SLOT_BITS-1:0] ins_buf [SLOTS];
  logic [SLOT_BITS-1:0] cur;
  logic                 sel;

  assign sel = in_sync && ins_mask[slot_i] && (slot_i != '0);
  assign cur = ins_buf[slot_i];

  always_ff @(posedge clk) begin
    if (ins_we) ins_buf[ins_addr] <= ins_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tx_bit <= 1'b0;
    else        tx_bit <= sel ? cur[BW'(SLOT_BITS - 1) - bitn_i] : bit_i;
  end
endmodule
