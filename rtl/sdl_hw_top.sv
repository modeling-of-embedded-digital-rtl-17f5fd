// Top level holding the two case-study designs side by side: the Polygon
// edge walker (poly_*) and the E1 drop/insert unit (e1_*). They share
// nothing; each has its own clock and reset. See poly_gen_points and
// drop_insert for their interfaces and timing.
module sdl_hw_top #(
  parameter int unsigned WIDTH = poly_pkg::WIDTH,
  parameter int unsigned FRAC  = poly_pkg::FRAC
) (
  // Polygon edge walker
  input  logic                  poly_clk,
  input  logic                  poly_rst_n,
  input  logic [7:0]            poly_ci_send,
  output logic [7:0]            poly_ci_ack,
  input  logic [7:0][WIDTH-1:0] poly_ci_data,
  output logic [2:0]            poly_co_send,
  input  logic [2:0]            poly_co_ack,
  output logic [WIDTH-1:0]      poly_pnt_x,
  output logic [WIDTH-1:0]      poly_pnt_y,
  // E1 drop/insert, clocked at 2.048 MHz
  input  logic                  e1_clk,
  input  logic                  e1_rst_n,
  input  logic                  e1_rx_bit,
  output logic                  e1_tx_bit,
  output logic                  e1_in_sync,
  output logic                  e1_frame_start,
  input  logic [31:0]           e1_drop_mask,
  output logic                  e1_drop_valid,
  output logic [4:0]            e1_drop_slot,
  output logic [7:0]            e1_drop_data,
  input  logic [31:0]           e1_ins_mask,
  input  logic                  e1_ins_we,
  input  logic [4:0]            e1_ins_addr,
  input  logic [7:0]            e1_ins_wdata
);
  poly_gen_points #(.WIDTH(WIDTH), .FRAC(FRAC)) u_poly (
    .clk(poly_clk), .rst_n(poly_rst_n),
    .ci_send(poly_ci_send), .ci_ack(poly_ci_ack), .ci_data(poly_ci_data),
    .co_send(poly_co_send), .co_ack(poly_co_ack),
    .co1_data(poly_pnt_x), .co2_data(poly_pnt_y));

  drop_insert u_e1 (
    .clk(e1_clk), .rst_n(e1_rst_n), .rx_bit(e1_rx_bit), .tx_bit(e1_tx_bit),
    .in_sync(e1_in_sync), .frame_start(e1_frame_start),
    .drop_mask(e1_drop_mask), .drop_valid(e1_drop_valid),
    .drop_slot(e1_drop_slot), .drop_data(e1_drop_data),
    .ins_mask(e1_ins_mask), .ins_we(e1_ins_we), .ins_addr(e1_ins_addr),
    .ins_wdata(e1_ins_wdata));
endmodule
