// Self-checking testbench of delta_y: random (y1, y2) pairs with random gaps;
// both outputs must carry y2 - y1, in order, although their receivers
// acknowledge independently (one of them much slower than the other).
module tb_delta_y;
  localparam int unsigned W = 32;
  localparam int N = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  sdl_chan #(.W(W)) ri3 (clk, rst_n), ri4 (clk, rst_n), r2 (clk, rst_n), r8 (clk, rst_n);
  delta_y dut (.clk, .rst_n, .ri3, .ri4, .r2, .r8);
  tb_chan_src  #(.W(W)) s3 (.clk, .rst_n, .ch(ri3));
  tb_chan_src  #(.W(W)) s4 (.clk, .rst_n, .ch(ri4));
  tb_chan_sink #(.W(W)) k2 (.clk, .rst_n, .ch(r2));
  tb_chan_sink #(.W(W)) k8 (.clk, .rst_n, .ch(r8));

  logic [W-1:0] exp_q[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [W-1:0] a, b, e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    s3.stall_pct = 20; s4.stall_pct = 40; k2.stall_pct = 10; k8.stall_pct = 70;
    for (int i = 0; i < N; i++) begin
      a = $urandom; b = $urandom;
      if (i % 3 == 0) b = a - W'(i);   // downward edges too
      s3.q.push_back(a); s4.q.push_back(b);
      exp_q.push_back(b - a);
    end
    while (k2.got.size() < N || k8.got.size() < N) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      e = exp_q.pop_front();
      check(k2.got[i] == e, $sformatf("r2 word %0d: got %0d expected %0d", i, $signed(k2.got[i]), $signed(e)));
      check(k8.got[i] == e, $sformatf("r8 word %0d: got %0d expected %0d", i, $signed(k8.got[i]), $signed(e)));
    end
    check(k8.waits > 0 && k2.waits > 0, "back-pressure was never applied");
    repeat (5) @(posedge clk);
    check(!r2.send && !r8.send, "extra output word");
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
