// Testbench helper: receives one sdl_chan into the queue got. ack is high at
// random with probability (100 - stall_pct)%; waits counts the cycles a word
// was offered but not acknowledged (back-pressure seen by the sender).
module tb_chan_sink #(parameter int unsigned W = 32) (
  input logic clk,
  input logic rst_n,
  sdl_chan.rx ch
);
  logic [W-1:0] got[$];
  int unsigned  stall_pct = 0;
  int unsigned  waits = 0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch.ack <= 1'b0;
    end else begin
      if (ch.send && ch.ack) got.push_back(ch.data);
      if (ch.send && !ch.ack) waits++;
      ch.ack <= ($urandom % 100) >= stall_pct;
    end
  end
endmodule
