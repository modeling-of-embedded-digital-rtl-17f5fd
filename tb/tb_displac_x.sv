// Self-checking testbench of displac_x: random signed (delta_x, delta_y)
// pairs, every sign combination, zero numerator and zero divisor. Each result
// must equal (delta_x * 2^16) / delta_y truncated toward zero (0 for a zero
// divisor), computed here in 64-bit arithmetic. Also checks that a division
// takes WIDTH+FRAC+2 = 50 cycles from operands held to result offered.
module tb_displac_x;
  localparam int unsigned W = 32;
  localparam int unsigned F = 16;
  localparam int N = 150;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  sdl_chan #(.W(W)) r1 (clk, rst_n), r2 (clk, rst_n), r3 (clk, rst_n);
  displac_x dut (.clk, .rst_n, .r1, .r2, .r3);
  tb_chan_src  #(.W(W)) s1 (.clk, .rst_n, .ch(r1));
  tb_chan_src  #(.W(W)) s2 (.clk, .rst_n, .ch(r2));
  tb_chan_sink #(.W(W)) k  (.clk, .rst_n, .ch(r3));

  longint exp_q[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint ref_div(longint a, longint b);
    if (b == 0) return 0;
    return (a * 65536) / b;           // SystemVerilog '/' truncates toward zero
  endfunction

  initial begin
    longint a, b;
    int t0, lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Latency: operands offered together, receiver always ready.
    @(posedge clk);
    s1.q.push_back(W'(100)); s2.q.push_back(W'(-7));
    exp_q.push_back(ref_div(100, -7));
    @(posedge clk); t0 = $time / 10;   // operands offered from this cycle
    while (!r3.send) @(posedge clk);
    lat = $time / 10 - t0;
    // 1 cycle into the holding registers, then W+F+2 in the divider.
    check(lat == int'(W + F + 3), $sformatf("latency %0d, expected %0d", lat, W + F + 3));
    s1.stall_pct = 40; s2.stall_pct = 20; k.stall_pct = 50;
    for (int i = 0; i < N; i++) begin
      a = longint'($signed(16'($urandom)));
      b = longint'($signed(12'($urandom)));
      case (i % 8)
        0: b = 0;
        1: a = 0;
        2: begin a = -a; b = (b == 0) ? 1 : b; end
        3: begin a = 32767; b = 1; end             // largest exact ratio
        4: begin a = -32768; b = 1; end
        default: ;
      endcase
      s1.q.push_back(W'(a)); s2.q.push_back(W'(b));
      exp_q.push_back(ref_div(a, b));
    end
    while (k.got.size() < N + 1) @(posedge clk);
    for (int i = 0; i < N + 1; i++)
      check(longint'($signed(k.got[i])) == exp_q[i],
            $sformatf("word %0d: got %0d expected %0d", i, $signed(k.got[i]), exp_q[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
