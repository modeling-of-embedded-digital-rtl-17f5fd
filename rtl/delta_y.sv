// delta_y process of the Polygon edge walker: vertical extent of one edge.
// It waits for y1 on ri3 and y2 on ri4, in either order, and sends
// delta_y = y2 - y1 on two channels: r2 to displac_x and r8 (delta_y2) to
// point_gen. Each output has its own register and handshake, so one receiver
// may take its copy before the other; a new pair is accepted only when both
// copies of the previous result have gone. One cycle from the second input
// to both outputs. The fan-out to two processes follows the case study; the
// operand order and handshake timing are this design's choice.
module delta_y
#(parameter int unsigned WIDTH = poly_pkg::WIDTH) (
  input  logic clk,
  input  logic rst_n,
  sdl_chan.rx  ri3,   // y1
  sdl_chan.rx  ri4,   // y2
  sdl_chan.tx  r2,    // delta_y  -> displac_x
  sdl_chan.tx  r8     // delta_y2 -> point_gen
);
  logic         y1_full, y2_full, busy2, busy8, fire;
  logic [WIDTH-1:0] y1_q, y2_q, dy;

  assign dy   = y2_q - y1_q;
  assign fire = y1_full && y2_full && !busy2 && !busy8;

  chan_in_reg  #(.W(WIDTH)) u_y1 (.clk, .rst_n, .ch(ri3), .clr(fire), .full(y1_full), .q(y1_q));
  chan_in_reg  #(.W(WIDTH)) u_y2 (.clk, .rst_n, .ch(ri4), .clr(fire), .full(y2_full), .q(y2_q));
  chan_out_reg #(.W(WIDTH)) u_r2 (.clk, .rst_n, .ch(r2), .load(fire), .d(dy), .busy(busy2));
  chan_out_reg #(.W(WIDTH)) u_r8 (.clk, .rst_n, .ch(r8), .load(fire), .d(dy), .busy(busy8));
endmodule
