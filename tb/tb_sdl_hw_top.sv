// End-to-end testbench of sdl_hw_top at its default parameters. Both designs
// run at once on their own clocks:
//  - Polygon: a convex pentagon plus a downward edge, a horizontal edge and
//    random edges are sent through the eight input channels with random gaps
//    and back-pressure; every point and done_ok is checked against the
//    reference model and every scan line of the pentagon must meet its
//    outline twice or more.
//  - E1 (2.048 MHz): alignment is taken, kept through two errored words, lost
//    after three, and taken again; dropped bytes and transmitted bits are
//    checked against a model of the aligned bits.
// Each mechanism is counted and a failure is counted for any that never
// happened: channel back-pressure, source gaps, downward edge, horizontal
// edge (zero divisor), alignment gained, errored word tolerated, alignment
// lost, alignment regained, slot dropped, slot inserted.
module tb_sdl_hw_top;
  import tb_poly_ref::*;
  import tb_e1_ref::*;
  localparam int unsigned W = 32;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ DUT
  logic poly_clk = 0, poly_rst_n = 0, e1_clk = 0, e1_rst_n = 0;
  always #5   poly_clk = ~poly_clk;
  always #244 e1_clk   = ~e1_clk;

  logic [7:0]        ci_send, ci_ack;
  logic [7:0][W-1:0] ci_data;
  logic [2:0]        co_send, co_ack;
  logic [W-1:0]      pnt_x, pnt_y;
  logic              rx_bit = 1, tx_bit, in_sync, frame_start, drop_valid, ins_we = 0;
  logic [31:0]       drop_mask = 0, ins_mask = 0;
  logic [4:0]        drop_slot, ins_addr = 0;
  logic [7:0]        drop_data, ins_wdata = 0;

  sdl_hw_top dut (
    .poly_clk, .poly_rst_n, .poly_ci_send(ci_send), .poly_ci_ack(ci_ack), .poly_ci_data(ci_data),
    .poly_co_send(co_send), .poly_co_ack(co_ack), .poly_pnt_x(pnt_x), .poly_pnt_y(pnt_y),
    .e1_clk, .e1_rst_n, .e1_rx_bit(rx_bit), .e1_tx_bit(tx_bit), .e1_in_sync(in_sync),
    .e1_frame_start(frame_start), .e1_drop_mask(drop_mask), .e1_drop_valid(drop_valid),
    .e1_drop_slot(drop_slot), .e1_drop_data(drop_data), .e1_ins_mask(ins_mask),
    .e1_ins_we(ins_we), .e1_ins_addr(ins_addr), .e1_ins_wdata(ins_wdata));

  // ------------------------------------------------------------ Polygon side
  sdl_chan #(.W(W)) ci [8] (poly_clk, poly_rst_n);
  sdl_chan #(.W(W)) co1 (poly_clk, poly_rst_n), co2 (poly_clk, poly_rst_n);
  sdl_chan #(.W(1)) co3 (poly_clk, poly_rst_n);
  for (genvar c = 0; c < 8; c++) begin : g_ci
    assign ci_send[c] = ci[c].send;
    assign ci_data[c] = ci[c].data;
    assign ci[c].ack  = ci_ack[c];
    tb_chan_src #(.W(W)) src (.clk(poly_clk), .rst_n(poly_rst_n), .ch(ci[c]));
  end
  assign co1.send = co_send[0]; assign co1.data = pnt_x;
  assign co2.send = co_send[1]; assign co2.data = pnt_y;
  assign co3.send = co_send[2]; assign co3.data = 1'b1;
  assign co_ack = {co3.ack, co2.ack, co1.ack};
  tb_chan_sink #(.W(W)) kx (.clk(poly_clk), .rst_n(poly_rst_n), .ch(co1));
  tb_chan_sink #(.W(W)) ky (.clk(poly_clk), .rst_n(poly_rst_n), .ch(co2));
  tb_chan_sink #(.W(1)) kd (.clk(poly_clk), .rst_n(poly_rst_n), .ch(co3));

  int xs[$], ys[$], ends[$], edge_of[$], ex1[$], ey1[$], ex2[$], ey2[$], done_at[$];
  int n_gap = 0, n_down = 0, n_flat = 0;

  always @(posedge poly_clk) begin
    if (poly_rst_n && co3.send && co3.ack) done_at.push_back(kx.got.size() + int'(co1.send && co1.ack));
    if (poly_rst_n && !ci_send[0] && g_ci[0].src.q.size() > 0) n_gap++;
  end

  task automatic send_edge(int x1, int y1, int x2, int y2);
    g_ci[0].src.q.push_back(W'(x1)); g_ci[1].src.q.push_back(W'(x2));
    g_ci[2].src.q.push_back(W'(y1)); g_ci[3].src.q.push_back(W'(y2));
    g_ci[4].src.q.push_back(W'(y1)); g_ci[5].src.q.push_back(W'(y2));
    g_ci[6].src.q.push_back(W'(x1)); g_ci[7].src.q.push_back(W'(y1));
    edge_points(x1, y1, x2, y2, xs, ys);
    while (edge_of.size() < xs.size()) edge_of.push_back(ex1.size());
    ex1.push_back(x1); ey1.push_back(y1); ex2.push_back(x2); ey2.push_back(y2);
    ends.push_back(xs.size());
    if (y2 < y1) n_down++;
    if (y2 == y1) n_flat++;
  endtask

  int vx[5] = '{10, 30, 25, 5, 0};
  int vy[5] = '{0, 10, 40, 35, 15};

  task automatic run_polygon();
    int e, hits, npoly;
    g_ci[0].src.stall_pct = 30; g_ci[3].src.stall_pct = 50; g_ci[6].src.stall_pct = 20;
    kx.stall_pct = 30; ky.stall_pct = 50; kd.stall_pct = 40;
    for (int v = 0; v < 5; v++) send_edge(vx[v], vy[v], vx[(v+1)%5], vy[(v+1)%5]);
    npoly = ends.size();
    send_edge(-40, 12, -40, 12);
    send_edge(7, 30, -20, 1);
    for (int i = 0; i < 8; i++)
      send_edge(int'($urandom % 1001) - 500, int'($urandom % 1001) - 500,
                int'($urandom % 1001) - 500, int'($urandom % 1001) - 500);
    while (kd.got.size() < ends.size()) @(posedge poly_clk);
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
    for (int y = 0; y <= 40; y++) begin
      hits = 0;
      for (int i = 0; i < ends[npoly-1] && i < ky.got.size(); i++) if ($signed(ky.got[i]) == y) hits++;
      check(hits >= 2, $sformatf("scan line %0d has %0d outline points", y, hits));
    end
  endtask

  // ------------------------------------------------------------ E1 side
  e1_stream   st = new();
  logic [7:0] ref_buf [32];
  int n_gain = 0, n_loss = 0, n_tolerated = 0, n_drop = 0, n_ins = 0;

  function automatic int pos(int f, int s, int b);
    return f * 256 + s * 8 + b;
  endfunction

  function automatic bit aligned(int k);
    int p;
    if (st.fno[k] < 0) return 0;
    p = pos(st.fno[k], st.slot[k], st.bitn[k]);
    return p >= pos(2, 1, 0) && !(p >= pos(22, 1, 0) && p < pos(26, 1, 0));
  endfunction

  task automatic run_e1();
    int n, k;
    logic [7:0] b;
    bit sel, prev = 0;
    st.add_filler(1 + int'($urandom % 300));
    for (int f = 0; f < 30; f++) st.add_frame(f == 12 || f == 14 || f == 18 || f == 20 || f == 22, f >= 21);
    n = st.bits.size();
    drop_mask = $urandom; ins_mask = $urandom;
    for (int s = 0; s < 32; s++) begin
      @(negedge e1_clk);
      ins_we = 1; ins_addr = 5'(s); ins_wdata = 8'($urandom); ref_buf[s] = ins_wdata;
    end
    @(negedge e1_clk); ins_we = 0;
    for (int c = 0; c < n + 2; c++) begin
      if (c >= 2) begin
        k = c - 2;
        sel = aligned(k) && st.slot[k] != 0;
        b = ref_buf[st.slot[k] < 0 ? 0 : st.slot[k]];
        if (sel && ins_mask[st.slot[k]]) begin
          check(tx_bit == b[7 - st.bitn[k]], $sformatf("inserted bit %0d", k)); n_ins++;
        end else
          check(tx_bit == st.bits[k], $sformatf("passed bit %0d", k));
        if (sel && drop_mask[st.slot[k]] && st.bitn[k] == 7) begin
          check(drop_valid && int'(drop_slot) == st.slot[k] && drop_data == st.byt[k],
                $sformatf("dropped byte of frame %0d slot %0d", st.fno[k], st.slot[k]));
          n_drop++;
        end else
          check(!drop_valid, $sformatf("spurious drop strobe after bit %0d", k));
      end
      if (c >= 1 && c - 1 < n) begin
        check(in_sync == aligned(c-1), $sformatf("in_sync for bit %0d", c-1));
        if (in_sync && !prev) n_gain++;
        if (!in_sync && prev) n_loss++;
        if (in_sync && (st.fno[c-1] == 12 || st.fno[c-1] == 14) && st.slot[c-1] == 1 && st.bitn[c-1] == 0)
          n_tolerated++;
        prev = in_sync;
      end
      if (c < n) rx_bit = st.bits[c];
      @(negedge e1_clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge e1_clk);
    poly_rst_n = 1; e1_rst_n = 1;
    fork
      run_polygon();
      run_e1();
    join
    $display("mechanisms: back-pressure %0d, source gaps %0d, downward edges %0d, horizontal edges %0d,",
             kx.waits + ky.waits + kd.waits, n_gap, n_down, n_flat);
    $display("            alignment gained %0d, errored words tolerated %0d, lost %0d, drops %0d, inserted bits %0d",
             n_gain, n_tolerated, n_loss, n_drop, n_ins);
    check(kx.waits + ky.waits + kd.waits > 0, "no back-pressure on the output channels");
    check(n_gap > 0, "no gaps between input words");
    check(n_down > 0, "no downward edge");
    check(n_flat > 0, "no horizontal edge");
    check(n_gain == 2, "alignment not gained twice (first and after the loss)");
    check(n_tolerated == 2, "errored alignment words not tolerated");
    check(n_loss == 1, "alignment never lost");
    check(n_drop > 100, "too few slots dropped");
    check(n_ins > 1000, "too few bits inserted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge e1_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
