// Testbench helper package: builds an E1 bit stream and remembers, for every
// bit, its slot, bit number, frame number and the byte of its slot.
// Slot 0 alternates between the alignment word frame (1 0011011, first bit
// the Si bit) and the other frame (1 1 0 11111: bit 2 = 1). Slots 1..31 carry
// random bytes, sent MSB first.
// A simple serial frame search can be led astray by payload that imitates
// the word, so tests that time re-alignment use quiet payload.
package tb_e1_ref;
  localparam logic [7:0] TS0_FAS  = 8'b1001_1011;
  localparam logic [7:0] TS0_BAD  = 8'b1011_1011;   // errored alignment word
  localparam logic [7:0] TS0_NFAS = 8'b1101_1111;

  class e1_stream;
    bit         bits[$];
    int         slot[$];      // -1 for filler bits outside frames
    int         bitn[$];
    int         fno[$];
    logic [7:0] byt[$];
    int         nframes = 0;

    function void add_filler(int n);
      for (int i = 0; i < n; i++) begin
        bits.push_back(1'b1); slot.push_back(-1); bitn.push_back(0);
        fno.push_back(-1); byt.push_back(8'hff);
      end
    endfunction

    // One frame; frames alternate FAS / NFAS starting with FAS.
    // corrupt replaces the alignment word of a FAS frame by an errored one.
    // quiet payload bytes have a 1 in every other bit, so no two zeros follow
    // each other and the payload cannot imitate the alignment word.
    function void add_frame(bit corrupt, bit quiet = 0);
      logic [7:0] b;
      for (int s = 0; s < 32; s++) begin
        if (s == 0) b = (nframes % 2 == 0) ? (corrupt ? TS0_BAD : TS0_FAS) : TS0_NFAS;
        else        b = quiet ? (8'($urandom) | 8'haa) : 8'($urandom);
        for (int i = 0; i < 8; i++) begin
          bits.push_back(b[7-i]); slot.push_back(s); bitn.push_back(i);
          fno.push_back(nframes); byt.push_back(b);
        end
      end
      nframes++;
    endfunction
  endclass
endpackage
