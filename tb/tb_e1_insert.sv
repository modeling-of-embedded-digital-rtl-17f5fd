// Self-checking testbench of e1_insert, driven with an already labelled
// stream. The insert buffer is written while frames run, also for slots that
// are being sent. tx_bit must equal, one cycle later, the buffered byte's bit
// (MSB first) in every slot of ins_mask except slot 0 while aligned, and the
// received bit everywhere else, including all of frames 0-1 (unaligned).
module tb_e1_insert;
  import tb_e1_ref::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        bit_i = 0, in_sync = 0, ins_we = 0, tx_bit;
  logic [4:0]  slot_i = 0, ins_addr = 0;
  logic [2:0]  bitn_i = 0;
  logic [31:0] ins_mask = 0;
  logic [7:0]  ins_wdata = 0;
  e1_insert dut (.clk, .rst_n, .bit_i, .slot_i, .bitn_i, .in_sync, .ins_mask,
                 .ins_we, .ins_addr, .ins_wdata, .tx_bit);

  e1_stream   st = new();
  logic [7:0] ref_buf [32];
  int         inserted = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit exp_tx, exp_next;
    logic [7:0] b;
    for (int f = 0; f < 8; f++) st.add_frame(0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Fill the buffer before use.
    for (int s = 0; s < 32; s++) begin
      @(negedge clk);
      ins_we = 1; ins_addr = 5'(s); ins_wdata = 8'($urandom); ref_buf[s] = ins_wdata;
    end
    @(negedge clk); ins_we = 0;
    exp_next = 0;
    for (int k = 0; k < st.bits.size(); k++) begin
      @(negedge clk);
      if (k > 0) check(tx_bit == exp_next, $sformatf("tx bit %0d (frame %0d slot %0d bit %0d)", k-1,
                                                      st.fno[k-1], st.slot[k-1], st.bitn[k-1]));
      if (st.slot[k] == 0 && st.bitn[k] == 0) ins_mask = $urandom | 32'h1;   // slot 0 bit set, must be ignored
      bit_i = st.bits[k]; slot_i = 5'(st.slot[k]); bitn_i = 3'(st.bitn[k]);
      in_sync = st.fno[k] >= 2;
      // Reference: the byte as buffered before this edge's write.
      b = ref_buf[st.slot[k]];
      if (in_sync && st.slot[k] != 0 && ins_mask[st.slot[k]]) begin
        exp_next = b[7 - st.bitn[k]]; inserted++;
      end else exp_next = st.bits[k];
      // Random writes, also to the slot in flight (takes effect after this edge).
      ins_we = ($urandom % 8) == 0;
      ins_addr = 5'($urandom); ins_wdata = 8'($urandom);
      if (ins_we) ref_buf[ins_addr] = ins_wdata;
    end
    @(negedge clk);
    check(tx_bit == exp_next, "last tx bit");
    check(inserted > 300, $sformatf("only %0d inserted bits", inserted));
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
