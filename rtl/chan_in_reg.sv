// Receiving end of one SDL channel: a one-word holding register.
// ack is high while the register is empty, so a word is taken in the first
// cycle it is offered. The owning process reads q while full is high and
// pulses clr when it has used the word, which frees the register for the next
// one in the following cycle.
module chan_in_reg #(parameter int unsigned W = 32) (
  input  logic         clk,
  input  logic         rst_n,
  sdl_chan.rx          ch,
  input  logic         clr,
  output logic         full,
  output logic [W-1:0] q
);
  assign ch.ack = !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 1'b0;
      q    <= '0;
    end else if (ch.send && !full) begin
      full <= 1'b1;
      q    <= ch.data;
    end else if (clr) begin
      full <= 1'b0;
    end
  end
endmodule
