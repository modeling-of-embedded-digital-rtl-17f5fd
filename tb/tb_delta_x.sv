// Self-checking testbench of delta_x: random (x1, x2) pairs arrive on two
// channels with random gaps and random back-pressure; every result must be
// x2 - x1, in order. Also checks the 2-cycle latency of a lone pair with an
// always-ready receiver.
module tb_delta_x;
  localparam int unsigned W = 32;
  localparam int N = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  sdl_chan #(.W(W)) ri1 (clk, rst_n), ri2 (clk, rst_n), r1 (clk, rst_n);
  delta_x dut (.clk, .rst_n, .ri1, .ri2, .r1);
  tb_chan_src  #(.W(W)) s1 (.clk, .rst_n, .ch(ri1));
  tb_chan_src  #(.W(W)) s2 (.clk, .rst_n, .ch(ri2));
  tb_chan_sink #(.W(W)) k  (.clk, .rst_n, .ch(r1));

  logic [W-1:0] exp_q[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int t0, lat;
    logic [W-1:0] a, b, g, e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Latency of one pair.
    k.stall_pct = 0;
    @(posedge clk);
    s1.q.push_back(32'd10); s2.q.push_back(32'd3);
    exp_q.push_back(32'd3 - 32'd10);
    @(posedge clk); t0 = $time / 10;
    while (!r1.send) @(posedge clk);
    lat = $time / 10 - t0;
    check(lat == 2, $sformatf("latency %0d, expected 2", lat));
    // Random traffic with stalls on both sides.
    s1.stall_pct = 30; s2.stall_pct = 50; k.stall_pct = 40;
    for (int i = 0; i < N; i++) begin
      a = $urandom; b = $urandom;
      if (i < 4) begin a = {1'b1, 31'd0}; b = 32'h7fffffff; end  // wrap-around
      s1.q.push_back(a); s2.q.push_back(b);
      exp_q.push_back(b - a);
    end
    while (k.got.size() < N + 1) @(posedge clk);
    for (int i = 0; i < N + 1; i++) begin
      g = k.got.pop_front(); e = exp_q.pop_front();
      check(g == e, $sformatf("result %0d: got %0d expected %0d", i, $signed(g), $signed(e)));
    end
    check(k.waits > 0, "back-pressure was never applied");
    repeat (5) @(posedge clk);
    check(!r1.send, "extra output word");
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
