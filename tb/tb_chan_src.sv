// Testbench helper: drives one sdl_chan from a queue. Words pushed into q are
// offered in order; while stall_pct > 0 the source randomly waits between
// words. Once send is high it stays high, data unchanged, until ack.
module tb_chan_src #(parameter int unsigned W = 32) (
  input logic clk,
  input logic rst_n,
  sdl_chan.tx ch
);
  logic [W-1:0] q[$];
  int unsigned  stall_pct = 0;
  int unsigned  sent = 0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch.send <= 1'b0;
      ch.data <= '0;
    end else if (!ch.send || ch.ack) begin
      if (ch.send) sent++;
      if (q.size() > 0 && ($urandom % 100) >= stall_pct) begin
        ch.send <= 1'b1;
        ch.data <= q.pop_front();
      end else begin
        ch.send <= 1'b0;
      end
    end
  end
endmodule
