// Self-checking testbench of poly_gen_points, the whole Polygon edge walker.
// A convex polygon is sent edge by edge, each coordinate on every input
// channel that carries a copy of it, first with no stalls (to check the
// latency to the first point, WIDTH+FRAC+8 = 56 cycles, and the 2-cycle point
// spacing) and then with random gaps and back-pressure, followed by random
// edges. All points must match the reference model and lie within one unit
// of their edge; every scan line of the polygon must be met by at least two
// edge points (the ends of its fill line); done_ok must close each edge.
module tb_poly_gen_points;
  import tb_poly_ref::*;
  localparam int unsigned W = 32;
  localparam int NV = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]          ci_send, ci_ack;
  logic [7:0][W-1:0]   ci_data;
  logic [2:0]          co_send, co_ack;
  logic [W-1:0]        pnt_x, pnt_y;

  poly_gen_points dut (.clk, .rst_n, .ci_send, .ci_ack, .ci_data, .co_send, .co_ack,
                       .co1_data(pnt_x), .co2_data(pnt_y));

  // Testbench-side channels tied to the plain ports.
  sdl_chan #(.W(W)) ci [8] (clk, rst_n);
  sdl_chan #(.W(W)) co1 (clk, rst_n), co2 (clk, rst_n);
  sdl_chan #(.W(1)) co3 (clk, rst_n);
  for (genvar c = 0; c < 8; c++) begin : g_ci
    assign ci_send[c] = ci[c].send;
    assign ci_data[c] = ci[c].data;
    assign ci[c].ack  = ci_ack[c];
    tb_chan_src #(.W(W)) src (.clk, .rst_n, .ch(ci[c]));
  end
  assign co1.send = co_send[0]; assign co1.data = pnt_x;
  assign co2.send = co_send[1]; assign co2.data = pnt_y;
  assign co3.send = co_send[2]; assign co3.data = 1'b1;
  assign co_ack = {co3.ack, co2.ack, co1.ack};
  tb_chan_sink #(.W(W)) kx (.clk, .rst_n, .ch(co1));
  tb_chan_sink #(.W(W)) ky (.clk, .rst_n, .ch(co2));
  tb_chan_sink #(.W(1)) kd (.clk, .rst_n, .ch(co3));

  int xs[$], ys[$], ends[$], edge_of[$];
  int ex1[$], ey1[$], ex2[$], ey2[$];
  int done_at[$], ptimes[$];

  always @(posedge clk) begin
    if (rst_n && co3.send && co3.ack) done_at.push_back(kx.got.size() + int'(co1.send && co1.ack));
    if (rst_n && co1.send && co1.ack) ptimes.push_back($time / 10);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Channel order: ci1 x1, ci3 x2, ci2 y1, ci4 y2, ci2_2 y1, ci4_1 y2, ci1_1 x1, ci2_1 y1.
  task automatic send_edge(int x1, int y1, int x2, int y2);
    g_ci[0].src.q.push_back(W'(x1)); g_ci[1].src.q.push_back(W'(x2));
    g_ci[2].src.q.push_back(W'(y1)); g_ci[3].src.q.push_back(W'(y2));
    g_ci[4].src.q.push_back(W'(y1)); g_ci[5].src.q.push_back(W'(y2));
    g_ci[6].src.q.push_back(W'(x1)); g_ci[7].src.q.push_back(W'(y1));
    edge_points(x1, y1, x2, y2, xs, ys);
    while (edge_of.size() < xs.size()) edge_of.push_back(ex1.size());
    ex1.push_back(x1); ey1.push_back(y1); ex2.push_back(x2); ey2.push_back(y2);
    ends.push_back(xs.size());
  endtask

  task automatic set_stall(int unsigned pct);
    g_ci[0].src.stall_pct = pct; g_ci[1].src.stall_pct = pct / 2;
    g_ci[2].src.stall_pct = pct; g_ci[3].src.stall_pct = pct / 3;
    g_ci[4].src.stall_pct = pct; g_ci[5].src.stall_pct = pct / 2;
    g_ci[6].src.stall_pct = pct; g_ci[7].src.stall_pct = pct / 4;
    kx.stall_pct = pct; ky.stall_pct = pct / 2; kd.stall_pct = pct;
  endtask

  int vx[NV] = '{10, 30, 25, 5, 0};
  int vy[NV] = '{0, 10, 40, 35, 15};

  initial begin
    int t0, lat, e, ymin, ymax, hits, npoly;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    send_edge(vx[0], vy[0], vx[1], vy[1]);
    @(posedge clk); t0 = $time / 10;
    while (!co_send[0]) @(posedge clk);
    lat = $time / 10 - t0;
    check(lat == int'(W + 16 + 8), $sformatf("latency to first point %0d, expected %0d", lat, W + 24));
    while (kd.got.size() < 1) @(posedge clk);
    for (int i = 1; i < ptimes.size(); i++)
      check(ptimes[i] - ptimes[i-1] == 2, $sformatf("point spacing %0d at %0d of %0d", ptimes[i] - ptimes[i-1], i, ptimes.size()));
    set_stall(40);
    for (int v = 1; v < NV; v++) send_edge(vx[v], vy[v], vx[(v+1)%NV], vy[(v+1)%NV]);
    npoly = ends.size();
    send_edge(3, 3, -9, 3);            // horizontal edge
    for (int i = 0; i < 10; i++)
      send_edge(int'($urandom % 401) - 200, int'($urandom % 401) - 200,
                int'($urandom % 401) - 200, int'($urandom % 401) - 200);
    while (kd.got.size() < ends.size()) @(posedge clk);
    check(kx.got.size() == xs.size(), $sformatf("point count %0d, expected %0d", kx.got.size(), xs.size()));
    for (int i = 0; i < xs.size() && i < kx.got.size(); i++) begin
      e = edge_of[i];
      check($signed(kx.got[i]) == xs[i] && $signed(ky.got[i]) == ys[i],
            $sformatf("point %0d: got (%0d,%0d) expected (%0d,%0d)", i,
                      $signed(kx.got[i]), $signed(ky.got[i]), xs[i], ys[i]));
      check(near_edge(ex1[e], ey1[e], ex2[e], ey2[e], $signed(kx.got[i]), $signed(ky.got[i])),
            $sformatf("point %0d off its edge", i));
    end
    for (int i = 0; i < ends.size(); i++)
      check(done_at[i] == ends[i], $sformatf("done_ok %0d after %0d points, expected %0d", i, done_at[i], ends[i]));
    // Every scan line of the polygon meets its outline at two or more points.
    ymin = 0; ymax = 40;
    for (int y = ymin; y <= ymax; y++) begin
      hits = 0;
      for (int i = 0; i < ends[npoly-1] && i < ky.got.size(); i++) if ($signed(ky.got[i]) == y) hits++;
      check(hits >= 2, $sformatf("scan line %0d has %0d outline points", y, hits));
    end
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
