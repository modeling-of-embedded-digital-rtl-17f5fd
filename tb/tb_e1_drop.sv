// Self-checking testbench of e1_drop, driven with an already labelled stream
// (slot and bit number per bit). Frames 0-1 are marked unaligned, frames 2-9
// aligned. For each aligned frame exactly the slots of drop_mask except slot 0
// must be delivered, in slot order, each with the byte that was sent in it,
// one cycle after its last bit. The mask changes between frames.
module tb_e1_drop;
  import tb_e1_ref::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        bit_i = 0, in_sync = 0, drop_valid;
  logic [4:0]  slot_i = 0, drop_slot;
  logic [2:0]  bitn_i = 0;
  logic [31:0] drop_mask = 0;
  logic [7:0]  drop_data;
  e1_drop dut (.clk, .rst_n, .bit_i, .slot_i, .bitn_i, .in_sync, .drop_mask,
               .drop_valid, .drop_slot, .drop_data);

  e1_stream st = new();
  int       exp_slot[$];
  logic [7:0] exp_byte[$];
  int       exp_time[$];
  int       got_slot[$], got_time[$];
  logic [7:0] got_byte[$];

  always @(posedge clk)
    if (rst_n && drop_valid) begin
      got_slot.push_back(drop_slot); got_byte.push_back(drop_data); got_time.push_back($time / 10);
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] mask;
    for (int f = 0; f < 10; f++) st.add_frame(0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < st.bits.size(); k++) begin
      @(negedge clk);
      if (st.slot[k] == 0 && st.bitn[k] == 0) begin
        mask = (st.fno[k] % 3 == 0) ? 32'hffff_ffff : $urandom;
        drop_mask = mask;
      end
      bit_i = st.bits[k]; slot_i = 5'(st.slot[k]); bitn_i = 3'(st.bitn[k]);
      in_sync = st.fno[k] >= 2;
      if (in_sync && st.bitn[k] == 7 && st.slot[k] != 0 && mask[st.slot[k]]) begin
        exp_slot.push_back(st.slot[k]); exp_byte.push_back(st.byt[k]);
        exp_time.push_back($time / 10 + 1);   // strobe seen one cycle later
      end
    end
    @(negedge clk);
    in_sync = 0;
    repeat (3) @(negedge clk);
    check(got_slot.size() == exp_slot.size(), $sformatf("%0d bytes dropped, expected %0d", got_slot.size(), exp_slot.size()));
    for (int i = 0; i < exp_slot.size() && i < got_slot.size(); i++) begin
      check(got_slot[i] == exp_slot[i] && got_byte[i] == exp_byte[i],
            $sformatf("byte %0d: slot %0d %02h, expected slot %0d %02h", i, got_slot[i], got_byte[i], exp_slot[i], exp_byte[i]));
      check(got_time[i] == exp_time[i], $sformatf("byte %0d strobed at %0d, expected %0d", i, got_time[i], exp_time[i]));
    end
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
