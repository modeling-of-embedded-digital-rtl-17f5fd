// Self-checking testbench of e1_frame_sync. The stream starts with filler
// ones at a random bit offset, then runs whole frames. Checks: alignment is
// declared exactly at bit 8 of slot 0 of the third frame (word, bit-2 check,
// word), so the first bit labelled in_sync is slot 1 bit 0 of frame 2; every
// bit labelled in_sync carries the right slot and bit number; frame_start
// marks slot 0 bit 0; bit_o is rx_bit one cycle late; two errored alignment
// words in a row keep alignment, three lose it exactly after the third; and
// alignment is found again at the third frame after the next word (with
// payload that cannot imitate the word).
module tb_e1_frame_sync;
  import tb_e1_ref::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rx_bit = 1'b1, bit_o, in_sync, frame_start;
  logic [4:0] slot_o;
  logic [2:0] bitn_o;
  e1_frame_sync dut (.clk, .rst_n, .rx_bit, .bit_o, .slot_o, .bitn_o, .in_sync, .frame_start);

  e1_stream st = new();

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int first_sync = -1, lost_at = -1, regain_at = -1, loss_frame, n;
    bit prev_sync = 0;
    st.add_filler(37 + int'($urandom % 200));
    for (int f = 0; f < 12; f++) st.add_frame(0);
    // Frames 12, 14 errored (alignment kept), 18, 20, 22 errored (lost at 22).
    // Quiet payload from frame 21 on, so re-alignment takes a fixed time.
    for (int f = 12; f < 32; f++) st.add_frame(f == 12 || f == 14 || f == 18 || f == 20 || f == 22, f >= 21);
    loss_frame = 22;
    n = st.bits.size();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k <= n; k++) begin
      @(negedge clk);
      if (k > 0) begin
        check(bit_o == st.bits[k-1], $sformatf("bit_o at bit %0d", k-1));
        if (in_sync) begin
          check(st.slot[k-1] >= 0 && int'(slot_o) == st.slot[k-1] && int'(bitn_o) == st.bitn[k-1],
                $sformatf("label of bit %0d: slot %0d.%0d, expected %0d.%0d", k-1,
                          slot_o, bitn_o, st.slot[k-1], st.bitn[k-1]));
          check(frame_start == (st.slot[k-1] == 0 && st.bitn[k-1] == 0), $sformatf("frame_start at bit %0d", k-1));
        end
        if (in_sync && !prev_sync) begin
          if (first_sync < 0) first_sync = k-1; else if (regain_at < 0) regain_at = k-1;
        end
        if (!in_sync && prev_sync && lost_at < 0) lost_at = k-1;
        prev_sync = in_sync;
      end
      if (k < n) rx_bit = st.bits[k];
    end
    check(first_sync >= 0 && st.fno[first_sync] == 2 && st.slot[first_sync] == 1 && st.bitn[first_sync] == 0,
          "alignment not declared at slot 1 bit 0 of frame 2");
    check(lost_at >= 0 && st.fno[lost_at] == loss_frame && st.slot[lost_at] == 1 && st.bitn[lost_at] == 0,
          $sformatf("alignment not lost right after frame %0d's word", loss_frame));
    check(lost_at < 0 || st.fno[lost_at] > 14, "alignment lost after only two errored words");
    check(regain_at > lost_at && st.fno[regain_at] == loss_frame + 4 && st.slot[regain_at] == 1 && st.bitn[regain_at] == 0,
          $sformatf("alignment not regained (lost at %0d, regained at %0d)", lost_at, regain_at));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
