// Polygon edge walker (block_gen_points): the five communicating processes
// that turn one polygon edge into the points of its scan lines.
//   delta_x   = x2 - x1                  (ri1, ri2 -> r1)
//   delta_y   = y2 - y1                  (ri3, ri4 -> r2, r8)
//   displac_y = +1 / -1 from y1 vs y2    (ri5, ri6 -> r5)
//   displac_x = delta_x / delta_y        (r1, r2   -> r3)
//   point_gen: walks the edge from (x1, y1), one point per scan line, then
//              signals done_ok           (r7, r6, r3, r5, r8 -> ro1..ro3)
// All channels are send/ack/data handshakes (a word moves when send and ack
// are both high in a cycle). The eight input channels are brought out as
// bit/array ports, index 0..7 = ci1 (x1), ci3 (x2), ci2 (y1), ci4 (y2),
// ci2_2 (y1_2), ci4_1 (y2_1), ci1_1 (x1_1), ci2_1 (y1_1); the environment
// sends each coordinate on every channel that carries a copy of it. The
// outputs are co1 (pnt_x), co2 (pnt_y) and co3 (done_ok, no data).
// Timing: an edge with all inputs offered together takes WIDTH+FRAC+8 cycles
// to its first point (divider dominated), then 2 cycles per further point.
// The process set, channel names and wiring follow the case study's block
// diagram; widths, handshake timing and arithmetic format are this design's.
module poly_gen_points #(
  parameter int unsigned WIDTH = poly_pkg::WIDTH,
  parameter int unsigned FRAC  = poly_pkg::FRAC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [7:0]           ci_send,
  output logic [7:0]           ci_ack,
  input  logic [7:0][WIDTH-1:0] ci_data,
  output logic [2:0]           co_send,   // co1, co2, co3
  input  logic [2:0]           co_ack,
  output logic [WIDTH-1:0]     co1_data,  // pnt_x
  output logic [WIDTH-1:0]     co2_data   // pnt_y
);
  // Input channels ri1..ri6, r7 (x1_1), r6 (y1_1), in the port order.
  sdl_chan #(.W(WIDTH)) ri1 (clk, rst_n), ri2 (clk, rst_n), ri3 (clk, rst_n), ri4 (clk, rst_n),
                        ri5 (clk, rst_n), ri6 (clk, rst_n), r7 (clk, rst_n), r6 (clk, rst_n);
  // Internal channels and the outputs.
  sdl_chan #(.W(WIDTH)) r1 (clk, rst_n), r2 (clk, rst_n), r3 (clk, rst_n), r5 (clk, rst_n),
                        r8 (clk, rst_n), ro1 (clk, rst_n), ro2 (clk, rst_n);
  sdl_chan #(.W(1))     ro3 (clk, rst_n);

  assign ri1.send = ci_send[0]; assign ri1.data = ci_data[0]; assign ci_ack[0] = ri1.ack;
  assign ri2.send = ci_send[1]; assign ri2.data = ci_data[1]; assign ci_ack[1] = ri2.ack;
  assign ri3.send = ci_send[2]; assign ri3.data = ci_data[2]; assign ci_ack[2] = ri3.ack;
  assign ri4.send = ci_send[3]; assign ri4.data = ci_data[3]; assign ci_ack[3] = ri4.ack;
  assign ri5.send = ci_send[4]; assign ri5.data = ci_data[4]; assign ci_ack[4] = ri5.ack;
  assign ri6.send = ci_send[5]; assign ri6.data = ci_data[5]; assign ci_ack[5] = ri6.ack;
  assign r7.send  = ci_send[6]; assign r7.data  = ci_data[6]; assign ci_ack[6] = r7.ack;
  assign r6.send  = ci_send[7]; assign r6.data  = ci_data[7]; assign ci_ack[7] = r6.ack;

  assign co_send  = {ro3.send, ro2.send, ro1.send};
  assign co1_data = ro1.data;
  assign co2_data = ro2.data;
  assign ro1.ack  = co_ack[0];
  assign ro2.ack  = co_ack[1];
  assign ro3.ack  = co_ack[2];

  delta_x   #(.WIDTH(WIDTH))              u_delta_x   (.clk, .rst_n, .ri1, .ri2, .r1);
  delta_y   #(.WIDTH(WIDTH))              u_delta_y   (.clk, .rst_n, .ri3, .ri4, .r2, .r8);
  displac_y #(.WIDTH(WIDTH))              u_displac_y (.clk, .rst_n, .ri5, .ri6, .r5);
  displac_x #(.WIDTH(WIDTH), .FRAC(FRAC)) u_displac_x (.clk, .rst_n, .r1, .r2, .r3);
  point_gen #(.WIDTH(WIDTH), .FRAC(FRAC)) u_point_gen (.clk, .rst_n, .r7, .r6, .r3, .r5, .r8,
                                                       .ro1, .ro2, .ro3);
endmodule
