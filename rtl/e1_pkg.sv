// Shared constants and types of the E1 drop/insert unit.
// An E1 frame has 32 time slots of 8 bits (256 bits, 125 us at 2.048 MHz).
// Slot 0 carries the frame alignment word 0011011 in bits 2..8 of every
// other frame; the frames in between carry a 1 in bit 2 (ITU-T G.704).
package e1_pkg;
  parameter int unsigned SLOTS     = 32;
  parameter int unsigned SLOT_BITS = 8;
  parameter logic [6:0]  FAS_WORD  = 7'b0011011;  // bits 2..8 of slot 0
  parameter int unsigned LOSS_FAS  = 3;           // errored words before loss

  typedef enum logic [1:0] {
    ST_HUNT,      // searching for the alignment word
    ST_CHK_NFAS,  // word seen, expect bit 2 = 1 one frame later
    ST_CHK_FAS,   // expect the word again two frames later
    ST_SYNC       // aligned
  } sync_state_e;
endpackage
