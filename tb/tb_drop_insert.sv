// Self-checking testbench of drop_insert, the whole E1 drop/insert unit.
// The received stream starts with filler at a random offset; frames 12, 14,
// 18, 20 and 22 carry an errored alignment word, so alignment is taken at
// frame 2, survives two errored words, is lost at frame 22 and taken again at
// frame 26 (payload from frame 21 on cannot imitate the alignment word).
// Checks, against a model of which bits are aligned: every dropped byte (slot
// and value, 2 cycles after its last bit) and every transmitted bit (inserted
// byte or received bit, 2 cycles after reception); in_sync and frame_start.
module tb_drop_insert;
  import tb_e1_ref::*;
  logic clk = 0, rst_n = 0;
  always #244 clk = ~clk;    // 2.048 MHz
  int checks = 0, failures = 0;

  logic        rx_bit = 1, tx_bit, in_sync, frame_start, drop_valid, ins_we = 0;
  logic [31:0] drop_mask, ins_mask;
  logic [4:0]  drop_slot, ins_addr = 0;
  logic [7:0]  drop_data, ins_wdata = 0;
  drop_insert dut (.clk, .rst_n, .rx_bit, .tx_bit, .in_sync, .frame_start, .drop_mask,
                   .drop_valid, .drop_slot, .drop_data, .ins_mask, .ins_we, .ins_addr, .ins_wdata);

  e1_stream   st = new();
  logic [7:0] ref_buf [32];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int pos(int f, int s, int b);
    return f * 256 + s * 8 + b;
  endfunction

  function automatic bit aligned(int k);
    int p;
    if (st.fno[k] < 0) return 0;
    p = pos(st.fno[k], st.slot[k], st.bitn[k]);
    return p >= pos(2, 1, 0) && !(p >= pos(22, 1, 0) && p < pos(26, 1, 0));
  endfunction

  initial begin
    int n, ndrop = 0, nins = 0, k;
    logic [7:0] b;
    bit sel;
    st.add_filler(1 + int'($urandom % 300));
    for (int f = 0; f < 30; f++) st.add_frame(f == 12 || f == 14 || f == 18 || f == 20 || f == 22, f >= 21);
    n = st.bits.size();
    drop_mask = $urandom; ins_mask = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 32; s++) begin
      @(negedge clk);
      ins_we = 1; ins_addr = 5'(s); ins_wdata = 8'($urandom); ref_buf[s] = ins_wdata;
    end
    @(negedge clk); ins_we = 0;
    for (int c = 0; c < n + 2; c++) begin
      // Outputs now reflect rx bit c-2 (tx, drop) and c-1 (labels).
      if (c >= 2) begin
        k = c - 2;
        sel = aligned(k) && st.slot[k] != 0;
        b = ref_buf[st.slot[k] < 0 ? 0 : st.slot[k]];
        if (sel && ins_mask[st.slot[k]]) begin
          check(tx_bit == b[7 - st.bitn[k]], $sformatf("inserted bit %0d", k)); nins++;
        end else
          check(tx_bit == st.bits[k], $sformatf("passed bit %0d", k));
        if (sel && drop_mask[st.slot[k]] && st.bitn[k] == 7) begin
          check(drop_valid && int'(drop_slot) == st.slot[k] && drop_data == st.byt[k],
                $sformatf("dropped byte of frame %0d slot %0d", st.fno[k], st.slot[k]));
          ndrop++;
        end else
          check(!drop_valid, $sformatf("spurious drop strobe after bit %0d", k));
      end
      if (c >= 1 && c - 1 < n) begin
        check(in_sync == aligned(c-1), $sformatf("in_sync for bit %0d (frame %0d)", c-1, st.fno[c-1]));
        check(frame_start == (aligned(c-1) && st.slot[c-1] == 0 && st.bitn[c-1] == 0),
              $sformatf("frame_start for bit %0d", c-1));
      end
      if (c < n) rx_bit = st.bits[c];
      @(negedge clk);
    end
    check(ndrop > 100 && nins > 1000, $sformatf("only %0d drops, %0d inserted bits", ndrop, nins));
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
