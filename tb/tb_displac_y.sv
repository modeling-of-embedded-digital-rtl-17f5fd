// Self-checking testbench of displac_y: random signed pairs, equal values and
// values of opposite sign; every result must be +1 when y2 >= y1 (signed)
// and -1 otherwise.
module tb_displac_y;
  localparam int unsigned W = 32;
  localparam int N = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  sdl_chan #(.W(W)) ri5 (clk, rst_n), ri6 (clk, rst_n), r5 (clk, rst_n);
  displac_y dut (.clk, .rst_n, .ri5, .ri6, .r5);
  tb_chan_src  #(.W(W)) s5 (.clk, .rst_n, .ch(ri5));
  tb_chan_src  #(.W(W)) s6 (.clk, .rst_n, .ch(ri6));
  tb_chan_sink #(.W(W)) k  (.clk, .rst_n, .ch(r5));

  int exp_q[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int a, b;
    repeat (3) @(posedge clk);
    rst_n = 1;
    s5.stall_pct = 30; s6.stall_pct = 30; k.stall_pct = 30;
    for (int i = 0; i < N; i++) begin
      a = $urandom; b = $urandom;
      case (i % 4)
        0: b = a;                              // equal: upward
        1: begin a = -5; b = 7; end
        2: begin a = 7;  b = -5; end
        default: ;
      endcase
      s5.q.push_back(a); s6.q.push_back(b);
      exp_q.push_back((b >= a) ? 1 : -1);
    end
    while (k.got.size() < N) @(posedge clk);
    for (int i = 0; i < N; i++)
      check($signed(k.got[i]) == exp_q[i], $sformatf("word %0d: got %0d expected %0d", i, $signed(k.got[i]), exp_q[i]));
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
