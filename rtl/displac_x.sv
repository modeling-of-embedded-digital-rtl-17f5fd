// displac_x process of the Polygon edge walker: inverse slope of one edge.
// It waits for delta_x on r1 and delta_y on r2 and sends on r3
//   displac_x = (delta_x * 2^FRAC) / delta_y, truncated toward zero,
// a signed fixed-point number with FRAC fraction bits: the change of x per
// scan line. The division runs on magnitudes in a radix-2 restoring divider,
// one quotient bit per cycle, so a result takes WIDTH+FRAC+2 cycles from the
// cycle both operands are held (1 to load, WIDTH+FRAC iterations, 1 to hand
// the result to the output register). A zero delta_y (horizontal edge) gives
// 0. The result keeps the low WIDTH bits of the quotient, which is exact
// while |delta_x / delta_y| < 2^(WIDTH-FRAC-1).
// That this process divides follows the case study; the fixed-point format,
// the divider structure and the divide-by-zero result are this design's.
module displac_x #(
  parameter int unsigned WIDTH = poly_pkg::WIDTH,
  parameter int unsigned FRAC  = poly_pkg::FRAC
) (
  input  logic clk,
  input  logic rst_n,
  sdl_chan.rx  r1,   // delta_x
  sdl_chan.rx  r2,   // delta_y
  sdl_chan.tx  r3    // displac_x
);
  localparam int unsigned N  = WIDTH + FRAC;     // quotient bits
  localparam int unsigned CW = $clog2(N + 1);

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_DONE} state_e;
  state_e state;

  logic             dx_full, dy_full, out_busy, start, load;
  logic [WIDTH-1:0] dx_q, dy_q, result;
  logic [N-1:0]     dvd;        // dividend, shifted out as quotient shifts in
  logic [WIDTH-1:0] rem;        // partial remainder, always below dvs
  logic [WIDTH-1:0] dvs;        // divisor magnitude
  logic             neg, dvs_zero;
  logic [CW-1:0]    cnt;
  logic [WIDTH:0]   rem_sh;
  logic [WIDTH-1:0] dx_mag, dy_mag;

  assign dx_mag = dx_q[WIDTH-1] ? WIDTH'(-dx_q) : dx_q;
  assign dy_mag = dy_q[WIDTH-1] ? WIDTH'(-dy_q) : dy_q;
  assign start  = (state == S_IDLE) && dx_full && dy_full && !out_busy;
  assign load   = (state == S_DONE);
  assign rem_sh = {rem, dvd[N-1]};
  assign result = dvs_zero ? '0 : (neg ? WIDTH'(-dvd) : dvd[WIDTH-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      dvd      <= '0;
      rem      <= '0;
      dvs      <= '0;
      neg      <= 1'b0;
      dvs_zero <= 1'b0;
      cnt      <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          dvd      <= {dx_mag, FRAC'(0)};
          rem      <= '0;
          dvs      <= dy_mag;
          neg      <= dx_q[WIDTH-1] ^ dy_q[WIDTH-1];
          dvs_zero <= (dy_q == '0);
          cnt      <= CW'(N);
          state    <= S_DIV;
        end
        S_DIV: begin
          if (rem_sh >= {1'b0, dvs}) begin
            rem <= WIDTH'(rem_sh - {1'b0, dvs});
            dvd <= {dvd[N-2:0], 1'b1};
          end else begin
            rem <= WIDTH'(rem_sh);
            dvd <= {dvd[N-2:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
          if (cnt == CW'(1)) state <= S_DONE;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  chan_in_reg  #(.W(WIDTH)) u_dx  (.clk, .rst_n, .ch(r1), .clr(start), .full(dx_full), .q(dx_q));
  chan_in_reg  #(.W(WIDTH)) u_dy  (.clk, .rst_n, .ch(r2), .clr(start), .full(dy_full), .q(dy_q));
  chan_out_reg #(.W(WIDTH)) u_out (.clk, .rst_n, .ch(r3), .load(load), .d(result), .busy(out_busy));
endmodule
