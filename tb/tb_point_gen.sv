// Self-checking testbench of point_gen: edges of every direction are fed as
// (x1_1, y1_1, displac_x, displac_y, delta_y2) with random gaps; the points
// must match the reference model, lie within one unit of the true edge, and
// each edge's done_ok must come after its last point. Receivers stall at
// random. Also checks the 2-cycle spacing of points with ready receivers.
module tb_point_gen;
  import tb_poly_ref::*;
  localparam int unsigned W = 32;
  localparam int N = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  sdl_chan #(.W(W)) r7 (clk, rst_n), r6 (clk, rst_n), r3 (clk, rst_n), r5 (clk, rst_n),
                    r8 (clk, rst_n), ro1 (clk, rst_n), ro2 (clk, rst_n);
  sdl_chan #(.W(1)) ro3 (clk, rst_n);
  point_gen dut (.clk, .rst_n, .r7, .r6, .r3, .r5, .r8, .ro1, .ro2, .ro3);
  tb_chan_src  #(.W(W)) s7 (.clk, .rst_n, .ch(r7));
  tb_chan_src  #(.W(W)) s6 (.clk, .rst_n, .ch(r6));
  tb_chan_src  #(.W(W)) s3 (.clk, .rst_n, .ch(r3));
  tb_chan_src  #(.W(W)) s5 (.clk, .rst_n, .ch(r5));
  tb_chan_src  #(.W(W)) s8 (.clk, .rst_n, .ch(r8));
  tb_chan_sink #(.W(W)) kx (.clk, .rst_n, .ch(ro1));
  tb_chan_sink #(.W(W)) ky (.clk, .rst_n, .ch(ro2));
  tb_chan_sink #(.W(1)) kd (.clk, .rst_n, .ch(ro3));

  int xs[$], ys[$], ends[$], edge_of[$];
  int ex1[$], ey1[$], ex2[$], ey2[$];
  int done_at[$];   // points received (on ro1) when each done_ok arrived
  int ptimes[$];

  always @(posedge clk) begin
    if (rst_n && ro3.send && ro3.ack) done_at.push_back(kx.got.size() + int'(ro1.send && ro1.ack));
    if (rst_n && ro1.send && ro1.ack) ptimes.push_back($time / 10);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_edge(int x1, int y1, int x2, int y2);
    int s = (y2 >= y1) ? 1 : -1;
    s7.q.push_back(W'(x1)); s6.q.push_back(W'(y1));
    s3.q.push_back(W'(slope(x1, y1, x2, y2)));
    s5.q.push_back(W'(s)); s8.q.push_back(W'(y2 - y1));
    edge_points(x1, y1, x2, y2, xs, ys);
    while (edge_of.size() < xs.size()) edge_of.push_back(ex1.size());
    ex1.push_back(x1); ey1.push_back(y1); ex2.push_back(x2); ey2.push_back(y2);
    ends.push_back(xs.size());
  endtask

  initial begin
    int x1, y1, x2, y2, e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Rate: a 9-point edge with nothing stalling.
    send_edge(0, 0, 5, 8);
    while (kd.got.size() < 1) @(posedge clk);
    for (int i = 1; i < ptimes.size(); i++)
      check(ptimes[i] - ptimes[i-1] == 2, $sformatf("point spacing %0d, expected 2", ptimes[i] - ptimes[i-1]));
    // Random edges, stalls everywhere.
    s7.stall_pct = 30; s3.stall_pct = 50; s8.stall_pct = 20;
    kx.stall_pct = 30; ky.stall_pct = 60; kd.stall_pct = 50;
    send_edge(10, 10, 3, 2);     // downward, leftward
    send_edge(-7, 4, 20, 4);     // horizontal
    send_edge(100, -50, 100, -20);
    for (int i = 0; i < N; i++) begin
      x1 = int'($urandom % 2001) - 1000; y1 = int'($urandom % 2001) - 1000;
      x2 = int'($urandom % 2001) - 1000; y2 = y1 + int'($urandom % 61) - 30;
      send_edge(x1, y1, x2, y2);
    end
    while (kd.got.size() < ends.size()) @(posedge clk);
    check(kx.got.size() == xs.size() && ky.got.size() == ys.size(), "point count");
    for (int i = 0; i < xs.size() && i < kx.got.size() && i < ky.got.size(); i++) begin
      e = edge_of[i];
      check($signed(kx.got[i]) == xs[i] && $signed(ky.got[i]) == ys[i],
            $sformatf("point %0d: got (%0d,%0d) expected (%0d,%0d)", i,
                      $signed(kx.got[i]), $signed(ky.got[i]), xs[i], ys[i]));
      check(near_edge(ex1[e], ey1[e], ex2[e], ey2[e], $signed(kx.got[i]), $signed(ky.got[i])),
            $sformatf("point %0d off the edge", i));
    end
    for (int i = 0; i < ends.size(); i++)
      check(done_at[i] == ends[i], $sformatf("done_ok %0d after %0d points, expected %0d", i, done_at[i], ends[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
