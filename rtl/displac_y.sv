// displac_y process of the Polygon edge walker: scan direction of one edge.
// It waits for y1_2 on ri5 and y2_1 on ri6 (copies of y1 and y2), compares
// them as signed integers and sends displac_y on r5: +1 when y2 >= y1, -1
// otherwise. point_gen adds this step to y on every scan line. One cycle from
// the second input to the output. That the process compares follows the case
// study; encoding the result as a +1/-1 step is this design's choice.
module displac_y
#(parameter int unsigned WIDTH = poly_pkg::WIDTH) (
  input  logic clk,
  input  logic rst_n,
  sdl_chan.rx  ri5,   // y1_2
  sdl_chan.rx  ri6,   // y2_1
  sdl_chan.tx  r5     // displac_y
);
  logic         a_full, b_full, out_busy, fire;
  logic [WIDTH-1:0] a_q, b_q, step;

  assign step = ($signed(b_q) >= $signed(a_q)) ? WIDTH'(1) : '1;  // +1 or -1
  assign fire = a_full && b_full && !out_busy;

  chan_in_reg  #(.W(WIDTH)) u_a   (.clk, .rst_n, .ch(ri5), .clr(fire), .full(a_full), .q(a_q));
  chan_in_reg  #(.W(WIDTH)) u_b   (.clk, .rst_n, .ch(ri6), .clr(fire), .full(b_full), .q(b_q));
  chan_out_reg #(.W(WIDTH)) u_out (.clk, .rst_n, .ch(r5), .load(fire), .d(step), .busy(out_busy));
endmodule
