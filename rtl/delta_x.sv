// delta_x process of the Polygon edge walker: horizontal extent of one edge.
// It waits until both end-point abscissas have arrived, x1 on ri1 and x2 on
// ri2 in either order, and sends delta_x = x2 - x1 on r1. Each input has its
// own holding register; the subtraction takes one cycle and the process
// accepts a new pair once the result has been loaded into the output
// register. Channels are sdl_chan handshakes of WIDTH bits.
// The subtraction and the channel names follow the case study; the operand
// order (end minus start) and the handshake timing are this design's choice.
module delta_x
#(parameter int unsigned WIDTH = poly_pkg::WIDTH) (
  input  logic clk,
  input  logic rst_n,
  sdl_chan.rx  ri1,   // x1
  sdl_chan.rx  ri2,   // x2
  sdl_chan.tx  r1     // delta_x
);
  logic         x1_full, x2_full, out_busy, fire;
  logic [WIDTH-1:0] x1_q, x2_q;

  assign fire = x1_full && x2_full && !out_busy;

  chan_in_reg  #(.W(WIDTH)) u_x1  (.clk, .rst_n, .ch(ri1), .clr(fire), .full(x1_full), .q(x1_q));
  chan_in_reg  #(.W(WIDTH)) u_x2  (.clk, .rst_n, .ch(ri2), .clr(fire), .full(x2_full), .q(x2_q));
  chan_out_reg #(.W(WIDTH)) u_out (.clk, .rst_n, .ch(r1), .load(fire), .d(x2_q - x1_q), .busy(out_busy));
endmodule
