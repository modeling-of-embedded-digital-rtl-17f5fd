// E1 drop/insert unit (DropInsert): on a 2.048 Mbit/s E1 line it takes the
// contents of selected time slots out of the received frames (drop) and
// replaces the contents of selected slots with local data on the way out
// (insert), passing everything else through.
// Structure: e1_frame_sync aligns to the frame and labels each bit with its
// slot and bit number; e1_drop and e1_insert act on that labelled stream.
// Timing: one bit per clock; rx_bit reaches tx_bit 2 cycles later; a dropped
// byte is strobed 2 cycles after its last bit was received. The 32 x 8-bit
// frame, slot 0 for synchronisation and the bit rate follow the case study;
// the split into three blocks and their interfaces are this design's.
module drop_insert #(
  parameter int unsigned SLOTS     = e1_pkg::SLOTS,
  parameter int unsigned SLOT_BITS = e1_pkg::SLOT_BITS,
  localparam int unsigned SW = $clog2(SLOTS),
  localparam int unsigned BW = $clog2(SLOT_BITS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rx_bit,
  output logic                 tx_bit,
  output logic                 in_sync,
  output logic                 frame_start,
  input  logic [SLOTS-1:0]     drop_mask,
  output logic                 drop_valid,
  output logic [SW-1:0]        drop_slot,
  output logic [SLOT_BITS-1:0] drop_data,
  input  logic [SLOTS-1:0]     ins_mask,
  input  logic                 ins_we,
  input  logic [SW-1:0]        ins_addr,
  input  logic [SLOT_BITS-1:0] ins_wdata
);
  logic          a_bit;
  logic [SW-1:0] a_slot;
  logic [BW-1:0] a_bitn;

  e1_frame_sync #(.SLOTS(SLOTS), .SLOT_BITS(SLOT_BITS)) u_sync (
    .clk, .rst_n, .rx_bit, .bit_o(a_bit), .slot_o(a_slot), .bitn_o(a_bitn),
    .in_sync, .frame_start);

  e1_drop #(.SLOTS(SLOTS), .SLOT_BITS(SLOT_BITS)) u_drop (
    .clk, .rst_n, .bit_i(a_bit), .slot_i(a_slot), .bitn_i(a_bitn), .in_sync,
    .drop_mask, .drop_valid, .drop_slot, .drop_data);

  e1_insert #(.SLOTS(SLOTS), .SLOT_BITS(SLOT_BITS)) u_ins (
    .clk, .rst_n, .bit_i(a_bit), .slot_i(a_slot), .bitn_i(a_bitn), .in_sync,
    .ins_mask, .ins_we, .ins_addr, .ins_wdata, .tx_bit);
endmodule
