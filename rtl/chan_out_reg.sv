// Sending end of one SDL channel: a one-word output register.
// The owning process pulses load with a word while busy is low; the word is
// then offered (send high) until the receiver acknowledges it, after which
// busy falls in the next cycle.
module chan_out_reg #(parameter int unsigned W = 32) (
  input  logic         clk,
  input  logic         rst_n,
  sdl_chan.tx          ch,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic         busy
);
  logic [W-1:0] q;

  assign ch.send = busy;
  assign ch.data = q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      q    <= '0;
    end else if (load) begin
      busy <= 1'b1;
      q    <= d;
    end else if (busy && ch.ack) begin
      busy <= 1'b0;
    end
  end
endmodule
