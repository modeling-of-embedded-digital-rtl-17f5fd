// point_gen process of the Polygon edge walker: scan-line points of an edge.
// It waits for the five values of one edge: x1_1 (r7), y1_1 (r6), displac_x
// (r3, FRAC fraction bits), displac_y (r5, +1 or -1) and delta_y2 (r8). It
// then takes them into working registers, freeing its inputs for the next
// edge, and walks the edge one scan line at a time: for line i = 0..|delta_y2|
// it sends
//   pnt_y = y1 + i*displac_y                         on ro2,
//   pnt_x = floor(x1 + i*displac_x*displac_y/2^FRAC) on ro1,
// the point where the horizontal fill line at pnt_y meets the edge. The x
// position is accumulated in a WIDTH+FRAC bit register. pnt_x and pnt_y are
// offered together; the next point waits until both were acknowledged. After
// the last point, done_ok (ro3, a one-bit event whose data is 1) is sent;
// the next edge starts only once done_ok has been acknowledged.
// With receivers that acknowledge at once, a point leaves every 2 cycles.
// The inputs, outputs and the role of generating the fill lines follow the
// case study; the stepping scheme and its fixed-point arithmetic are this
// design's choice.
module point_gen #(
  parameter int unsigned WIDTH = poly_pkg::WIDTH,
  parameter int unsigned FRAC  = poly_pkg::FRAC
) (
  input  logic clk,
  input  logic rst_n,
  sdl_chan.rx  r7,    // x1_1
  sdl_chan.rx  r6,    // y1_1
  sdl_chan.rx  r3,    // displac_x
  sdl_chan.rx  r5,    // displac_y
  sdl_chan.rx  r8,    // delta_y2
  sdl_chan.tx  ro1,   // pnt_x
  sdl_chan.tx  ro2,   // pnt_y
  sdl_chan.tx  ro3    // done_ok
);
  localparam int unsigned AW = WIDTH + FRAC;

  typedef enum logic [1:0] {S_IDLE, S_EMIT, S_DONE} state_e;
  state_e state;

  logic [4:0]       full;
  logic [WIDTH-1:0] x1_q, y1_q, dxs_q, dys_q, dy2_q;
  logic             take, emit, fin, busy1, busy2, busy3;
  logic [AW-1:0]    acc, inc_ext;
  logic [WIDTH-1:0] y, cnt, pnt_x;
  logic             down;

  assign take    = (state == S_IDLE) && (&full) && !busy3;  // done_ok of the last edge gone
  assign emit    = (state == S_EMIT) && !busy1 && !busy2;
  assign fin     = (state == S_DONE) && !busy1 && !busy2 && !busy3;
  assign pnt_x   = WIDTH'($signed(acc) >>> FRAC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      acc     <= '0;
      inc_ext <= '0;
      y       <= '0;
      cnt     <= '0;
      down    <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (take) begin
          acc     <= {x1_q, FRAC'(0)};
          inc_ext <= AW'($signed(dxs_q));
          y       <= y1_q;
          down    <= dys_q[WIDTH-1];
          cnt     <= dy2_q[WIDTH-1] ? WIDTH'(-dy2_q) : dy2_q;  // |delta_y2|
          state   <= S_EMIT;
        end
        S_EMIT: if (emit) begin
          if (cnt == '0) begin
            state <= S_DONE;
          end else begin
            acc <= down ? acc - inc_ext : acc + inc_ext;
            y   <= down ? y - 1'b1 : y + 1'b1;
            cnt <= cnt - 1'b1;
          end
        end
        S_DONE:  if (fin) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  chan_in_reg #(.W(WIDTH)) u_x1  (.clk, .rst_n, .ch(r7), .clr(take), .full(full[0]), .q(x1_q));
  chan_in_reg #(.W(WIDTH)) u_y1  (.clk, .rst_n, .ch(r6), .clr(take), .full(full[1]), .q(y1_q));
  chan_in_reg #(.W(WIDTH)) u_dxs (.clk, .rst_n, .ch(r3), .clr(take), .full(full[2]), .q(dxs_q));
  chan_in_reg #(.W(WIDTH)) u_dys (.clk, .rst_n, .ch(r5), .clr(take), .full(full[3]), .q(dys_q));
  chan_in_reg #(.W(WIDTH)) u_dy2 (.clk, .rst_n, .ch(r8), .clr(take), .full(full[4]), .q(dy2_q));

  chan_out_reg #(.W(WIDTH)) u_px (.clk, .rst_n, .ch(ro1), .load(emit), .d(pnt_x), .busy(busy1));
  chan_out_reg #(.W(WIDTH)) u_py (.clk, .rst_n, .ch(ro2), .load(emit), .d(y),     .busy(busy2));
  chan_out_reg #(.W(1))     u_dn (.clk, .rst_n, .ch(ro3), .load(fin),  .d(1'b1),  .busy(busy3));
endmodule
