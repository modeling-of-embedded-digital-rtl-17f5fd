// E1 drop unit: takes the selected time slots out of the aligned stream.
// For every slot whose bit is set in drop_mask it collects the slot's bits,
// first bit received into the MSB, and when the last bit arrives it presents
// the byte on drop_data with its slot number on drop_slot and a one-cycle
// drop_valid strobe (registered, one cycle after the last bit). Nothing is
// dropped without frame alignment, and slot 0, which carries the alignment,
// is never dropped. Dropping selected slots of 32 eight-bit slots follows the
// case study; the byte-strobe interface is this design's choice.
module e1_drop #(
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
  input  logic [SLOTS-1:0]     drop_mask,
  output logic                 drop_valid,
  output logic [SW-1:0]        drop_slot,
  output logic [SLOT_BITS-1:0] drop_data
);
  logic [SLOT_BITS-2:0] sh;       // bits received so far
  logic [SLOT_BITS-1:0] sh_next;
  logic                 sel;

  assign sel     = in_sync && drop_mask[slot_i] && (slot_i != '0);
  assign sh_next = {sh, bit_i};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh         <= '0;
      drop_valid <= 1'b0;
      drop_slot  <= '0;
      drop_data  <= '0;
    end else begin
      drop_valid <= 1'b0;
      if (sel) begin
        sh <= sh_next[SLOT_BITS-2:0];
        if (bitn_i == BW'(SLOT_BITS - 1)) begin
          drop_valid <= 1'b1;
          drop_slot  <= slot_i;
          drop_data  <= sh_next;
        end
      end
    end
  end
endmodule
