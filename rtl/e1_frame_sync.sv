// E1 frame alignment: finds where frames start in a received E1 bit stream
// and labels every bit with its time slot and bit number.
// One bit arrives per cycle of the 2.048 MHz clock. A 7-bit window of the
// latest bits is compared with the alignment word 0011011, which occupies
// bits 2..8 of slot 0 in every other frame. While hunting, a match fixes the
// bit counter; alignment is declared when, one frame later, bit 2 of slot 0
// is 1 (a frame without the word) and, one more frame later, the word is
// there again. Once aligned, the word is checked every other frame and
// alignment is lost after LOSS_FAS consecutive errored words.
// Outputs are registered: bit_o is rx_bit one cycle late, together with its
// slot (slot_o), bit number (bitn_o, 0 = first bit of the slot, the MSB),
// in_sync, and frame_start (high on bit 0 of slot 0 while aligned).
// The frame format (32 slots of 8 bits, slot 0 for synchronisation, one bit
// per 488 ns) follows the case study; the alignment procedure is a
// simplified form of the one in the E1 standard (no CRC-4 multiframe).
module e1_frame_sync #(
  parameter int unsigned SLOTS     = e1_pkg::SLOTS,
  parameter int unsigned SLOT_BITS = e1_pkg::SLOT_BITS,
  localparam int unsigned SW = $clog2(SLOTS),
  localparam int unsigned BW = $clog2(SLOT_BITS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rx_bit,
  output logic          bit_o,
  output logic [SW-1:0] slot_o,
  output logic [BW-1:0] bitn_o,
  output logic          in_sync,
  output logic          frame_start
);
  import e1_pkg::*;

  localparam int unsigned CW = SW + BW;           // bit position in the frame
  localparam logic [CW-1:0] POS_BIT2 = CW'(1);    // bit 2 of slot 0
  localparam logic [CW-1:0] POS_BIT8 = CW'(7);    // bit 8 of slot 0

  sync_state_e state;
  logic [5:0]    sr;          // the six bits before rx_bit
  logic [6:0]    win;
  logic [CW-1:0] cnt;         // position of rx_bit (meaningless while hunting)
  logic          fas_frame;   // current frame carries the alignment word
  logic [1:0]    err;         // consecutive errored alignment words
  logic          word_ok, at_word, at_bit2;

  assign win     = {sr, rx_bit};
  assign word_ok = (win == FAS_WORD);
  assign at_word = (cnt == POS_BIT8) && fas_frame;
  assign at_bit2 = (cnt == POS_BIT2) && !fas_frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_HUNT;
      sr          <= '0;
      cnt         <= '0;
      fas_frame   <= 1'b0;
      err         <= '0;
      bit_o       <= 1'b0;
      slot_o      <= '0;
      bitn_o      <= '0;
      in_sync     <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      sr          <= win[5:0];
      bit_o       <= rx_bit;
      slot_o      <= cnt[CW-1:BW];
      bitn_o      <= cnt[BW-1:0];
      in_sync     <= (state == ST_SYNC);
      frame_start <= (state == ST_SYNC) && (cnt == '0);

      // Free-running position counter; the frame type alternates.
      cnt <= cnt + 1'b1;
      if (cnt == CW'(SLOTS * SLOT_BITS - 1)) fas_frame <= !fas_frame;

      unique case (state)
        ST_HUNT: if (word_ok) begin
          cnt       <= POS_BIT8 + 1'b1;
          fas_frame <= 1'b1;
          state     <= ST_CHK_NFAS;
        end
        ST_CHK_NFAS: if (at_bit2) state <= rx_bit ? ST_CHK_FAS : ST_HUNT;
        ST_CHK_FAS: if (at_word) begin
          state <= word_ok ? ST_SYNC : ST_HUNT;
          err   <= '0;
        end
        ST_SYNC: if (at_word) begin
          if (word_ok) begin
            err <= '0;
          end else if (err == 2'(LOSS_FAS - 1)) begin
            err   <= '0;
            state <= ST_HUNT;
          end else begin
            err <= err + 1'b1;
          end
        end
        default: state <= ST_HUNT;
      endcase
    end
  end
endmodule
